// sdr_pkg: types, constants, the per-standard parameter presets and the OVSF code
// rule shared by the generalized modulator and the receiver of the SDR platform.
//
// The modulator is steered entirely by a parameter record (mod_cfg_t). Its fields are
// the parameters named for the generalized modulator: burst length, precoder on/off,
// NRZ on/off (+1, -1, 0), modulation number (1..4), spreading factors and sequence
// numbers of the I and Q branches, filter number (1..3) and the I/Q lengths used by
// the dual-QPSK serial-to-parallel split. The presets reproduce the published
// parameter table for GSM, IS-136, UTRA-FDD and EDGE. Fields that the table does not
// list (OVSF sequence numbers, channel weights, scrambling code number, scrambling
// enable) are this design's own choices and are set to values typical for a UTRA-FDD
// uplink dedicated channel.
package sdr_pkg;

  // Sample and coefficient word widths.
  localparam int unsigned DW     = 16;   // symbol/chip component width
  localparam int unsigned OW     = 18;   // pulse-shaped sample width
  localparam int unsigned CW     = 16;   // FIR coefficient width (Q1.14)
  localparam int signed   AMP    = 4096; // unit symbol amplitude
  localparam int unsigned OSR    = 4;    // samples per symbol/chip after pulse shaping
  localparam int unsigned NTAPS  = 49;   // FIR length (same as the receive RRC filter)
  localparam int unsigned NBANKS = 3;    // number of pulse-shaping filters
  localparam int unsigned BLW    = 12;   // width of burst/branch length fields
  localparam int unsigned MAX_SF_LOG2 = 9; // spreading factor up to 512

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } cplx_t;

  // NRZ-on-off, encoded as the 2-bit two's complement of +1 / 0 / -1.
  typedef enum logic [1:0] {
    NRZ_OFF   = 2'b00,
    NRZ_PLUS  = 2'b01,
    NRZ_MINUS = 2'b11
  } nrz_mode_t;

  // Modulation number.
  typedef enum logic [2:0] {
    MOD_GMSK     = 3'd1,
    MOD_PI4DQPSK = 3'd2,
    MOD_QPSK     = 3'd3,
    MOD_DUAL     = 3'd4   // dual QPSK (I/Q lengths set) or 8PSK (I/Q lengths zero)
  } mod_num_t;

  // Filter number.
  typedef enum logic [1:0] {
    FLT_GMSK_C0 = 2'd1,
    FLT_RRC_035 = 2'd2,
    FLT_RRC_022 = 2'd3
  } filter_num_t;

  typedef enum logic [1:0] {
    STD_GSM      = 2'd0,
    STD_IS136    = 2'd1,
    STD_UTRA_FDD = 2'd2,
    STD_EDGE     = 2'd3
  } std_t;

  typedef struct packed {
    logic [BLW-1:0] burst_len;    // bits per burst
    logic           precoder_on;
    nrz_mode_t      nrz;
    mod_num_t       mod_num;
    logic [3:0]     sf_i_log2;    // spreading factor I = 2**sf_i_log2
    logic [3:0]     sf_q_log2;
    logic [8:0]     code_i;       // OVSF sequence number, I branch
    logic [8:0]     code_q;
    filter_num_t    filter_num;
    logic [BLW-1:0] i_len;        // bits directed to the I branch (dual QPSK)
    logic [BLW-1:0] q_len;        // bits directed to the Q branch (dual QPSK)
    logic           scramble_on;  // weighting and complex scrambling
    logic [3:0]     beta_d;       // data channel weight, gain = beta_d/16
    logic [3:0]     beta_c;       // control channel weight, gain = beta_c/16
    logic [23:0]    scr_code;     // scrambling code number
  } mod_cfg_t;

  function automatic mod_cfg_t preset_cfg(std_t s);
    mod_cfg_t c;
    c = '0;
    c.nrz        = NRZ_PLUS;
    c.mod_num    = MOD_GMSK;
    c.filter_num = FLT_GMSK_C0;
    c.beta_d     = 4'd15;
    c.beta_c     = 4'd15;
    unique case (s)
      STD_GSM: begin
        c.burst_len = BLW'(148); c.precoder_on = 1'b1; c.nrz = NRZ_PLUS;
        c.mod_num = MOD_GMSK; c.filter_num = FLT_GMSK_C0;
      end
      STD_IS136: begin
        c.burst_len = BLW'(312); c.precoder_on = 1'b0; c.nrz = NRZ_PLUS;
        c.mod_num = MOD_PI4DQPSK; c.filter_num = FLT_RRC_035;
      end
      STD_UTRA_FDD: begin
        c.burst_len = BLW'(330); c.precoder_on = 1'b0; c.nrz = NRZ_MINUS;
        c.mod_num = MOD_DUAL; c.filter_num = FLT_RRC_022;
        c.sf_i_log2 = 4'd3; c.sf_q_log2 = 4'd8;       // SF-I = 8, SF-Q = 256
        c.code_i = 9'd2; c.code_q = 9'd0;             // c(8,2) and c(256,0)
        c.i_len = BLW'(320); c.q_len = BLW'(10);
        c.scramble_on = 1'b1; c.beta_d = 4'd15; c.beta_c = 4'd8;
        c.scr_code = 24'd1;
      end
      default: begin // STD_EDGE
        c.burst_len = BLW'(444); c.precoder_on = 1'b1; c.nrz = NRZ_PLUS;
        c.mod_num = MOD_DUAL; c.filter_num = FLT_GMSK_C0;
      end
    endcase
    return c;
  endfunction

  // 16-point phase table: round(AMP*cos(m*pi/8)), m = 0..15. sin(m*pi/8) = cos((m-4)*pi/8).
  function automatic sample_t cos16(logic [3:0] m);
    logic [3:0] r;
    sample_t    v;
    r = (m > 4'd8) ? 4'(5'd16 - {1'b0, m}) : m;   // cos is even: fold to 0..8
    unique case (r)
      4'd0: v = sample_t'(4096);
      4'd1: v = sample_t'(3784);
      4'd2: v = sample_t'(2896);
      4'd3: v = sample_t'(1567);
      4'd4: v = sample_t'(0);
      4'd5: v = sample_t'(-1567);
      4'd6: v = sample_t'(-2896);
      4'd7: v = sample_t'(-3784);
      default: v = sample_t'(-4096);
    endcase
    return v;
  endfunction

  function automatic cplx_t phase_point(logic [3:0] m);
    cplx_t z;
    z.i = cos16(m);
    z.q = cos16(m - 4'd4);
    return z;
  endfunction

  // Sign of chip k of the OVSF code c(2**sfl, n), 1 meaning -1: the parity of
  // rev(n) & k, where rev reverses the sfl low bits of n.
  function automatic logic ovsf_neg(logic [3:0] sfl, logic [8:0] n, logic [MAX_SF_LOG2-1:0] k);
    logic [8:0] rev;
    rev = '0;
    for (int b = 0; b < MAX_SF_LOG2; b++)
      if (b < int'(sfl)) rev[b] = n[int'(sfl) - 1 - b];
    return ^(rev & k);
  endfunction

endpackage
