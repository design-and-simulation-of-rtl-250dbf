// pulse_shaper: complex impulse-shaping FIR of the generalized modulator.
//
// An interpolating FIR that turns each complex chip (or symbol, when there is no
// spreading) into OSR output samples. cfg.filter_num picks one of three impulse
// responses, each NTAPS long at OSR samples per symbol and centred on tap NTAPS/2:
//   1  main pulse C0(t) of linearised GMSK, BT = 0.3 (Laurent decomposition, L = 4)
//   2  root raised cosine, roll-off 0.35
//   3  root raised cosine, roll-off 0.22
// The coefficients are Q1.14 with the peak at 1.0 (16384). They are read from
// rtl/pulse_coeffs.hex, three banks of NTAPS words in filter order. RRC taps follow
// h(t) = [sin(pi t(1-a)) + 4 a t cos(pi t(1+a))] / [pi t (1 - (4 a t)^2)], t in
// symbols; C0(t) is the product of S(t + iT), i = 0..3, with S built from the
// Gaussian phase pulse as in Laurent's decomposition.
// Polyphase form: the last NPH = ceil(NTAPS/OSR) chips sit in a delay line; output
// sample p (p = 0..OSR-1) of a chip is sum_j h[p + j*OSR] * x[j], rounded and
// shifted right by 14, saturated to OW bits. All NPH products of a phase are computed
// in one cycle. Interface: valid/ready chip in, valid/ready sample out. A chip is
// accepted while the last phase of the previous chip is emitted, so the rate is
// exactly one chip per OSR cycles; the first sample of a chip appears one cycle after
// it is accepted. restart clears the delay line.
module pulse_shaper
  import sdr_pkg::*;
#(
  parameter string COEF_FILE = "rtl/pulse_coeffs.hex"
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mod_cfg_t cfg,
  input  logic     restart,
  input  logic     in_valid,
  output logic     in_ready,
  input  cplx_t    in_chip,
  output logic     out_valid,
  input  logic     out_ready,
  output logic signed [OW-1:0] out_i,
  output logic signed [OW-1:0] out_q
);

  localparam int unsigned NPH = (NTAPS + OSR - 1) / OSR;
  localparam int unsigned PW  = $clog2(OSR);
  localparam int unsigned AW  = DW + CW + $clog2(NPH) + 1;

  logic signed [CW-1:0] coef [NBANKS*NTAPS];
  initial $readmemh(COEF_FILE, coef);

  cplx_t   dline [NPH];
  logic    active;          // dline[0] holds a chip whose phases are being emitted
  logic [PW-1:0] ph;
  logic    emit, last_ph, fire;
  logic [1:0] bank;
  logic signed [AW-1:0] acc_i, acc_q;
  logic signed [OW-1:0] y_i, y_q;

  assign bank     = (cfg.filter_num == 2'd0) ? 2'd0 : 2'(cfg.filter_num - 2'd1);
  assign emit     = active && (!out_valid || out_ready);
  assign last_ph  = (ph == PW'(OSR - 1));
  assign in_ready = (!active || (emit && last_ph)) && !restart;
  assign fire     = in_valid && in_ready;

  function automatic logic signed [OW-1:0] sat_round(logic signed [AW-1:0] a);
    logic signed [AW-1:0] r;
    r = (a + (AW'(1) <<< 13)) >>> 14;
    if (r > AW'((1 <<< (OW - 1)) - 1))  return {1'b0, {(OW-1){1'b1}}};
    if (r < -AW'(1 <<< (OW - 1)))       return {1'b1, {(OW-1){1'b0}}};
    return OW'(r);
  endfunction

  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int j = 0; j < NPH; j++) begin
      if (int'(ph) + j * OSR < NTAPS) begin
        acc_i += AW'(dline[j].i * coef[int'(bank) * NTAPS + int'(ph) + j * OSR]);
        acc_q += AW'(dline[j].q * coef[int'(bank) * NTAPS + int'(ph) + j * OSR]);
      end
    end
    y_i = sat_round(acc_i);
    y_q = sat_round(acc_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      ph        <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      for (int j = 0; j < NPH; j++) dline[j] <= '0;
    end else if (restart) begin
      active    <= 1'b0;
      ph        <= '0;
      out_valid <= 1'b0;
      for (int j = 0; j < NPH; j++) dline[j] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (emit) begin
        out_valid <= 1'b1;
        out_i     <= y_i;
        out_q     <= y_q;
        ph        <= last_ph ? '0 : ph + 1'b1;
        if (last_ph) active <= 1'b0;
      end
      if (fire) begin
        dline[0] <= in_chip;
        for (int j = 1; j < NPH; j++) dline[j] <= dline[j-1];
        active <= 1'b1;
        ph     <= '0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n || restart)
    out_valid && !out_ready |=> out_valid && $stable(out_i) && $stable(out_q));

endmodule
