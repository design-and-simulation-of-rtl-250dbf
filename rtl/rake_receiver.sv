// rake_receiver: multipath (rake) despreader for the UTRA-FDD uplink channel.
//
// Despreads and demodulates the matched-filtered samples and corrects for the
// channel: NFING fingers each pick one propagation path, weight it by the conjugate
// of its complex channel gain and are summed (maximal-ratio combining); the sum is
// descrambled with the conjugate of the complex scrambling code and despread with
// the OVSF codes of the two branches, giving soft DPDCH (I branch) and DPCCH
// (Q branch) symbols.
// Alignment: the input runs at OSR samples per chip. frame_start marks the sample
// that holds chip 0 of the frame for a path of delay 0, at its best sampling
// instant. A path of delay d samples is read DMAX - d samples back in a delay line,
// so all fingers see the same chip at the same time and one code generator serves
// them all; the combined chip is formed DMAX samples after the chip's zero-delay
// instant and then every OSR samples.
// Arithmetic: finger product x * conj(h), h in Q1.14, sum shifted right by 14;
// descrambling by conj(S) = a - jb needs only sign changes; the branch sums are
// Re(.) * c_I over SF_I chips and Im(.) * c_Q over SF_Q chips.
// The finger delays and channel gains are inputs: path search and channel
// estimation are not part of this block. The spreading factors, code numbers and
// scrambling code are those of cfg (the same parameter record as the modulator).
// Interface: in_valid qualifies a sample (one per cycle at most); dpdch_valid and
// dpcch_valid pulse for one cycle with each finished symbol, one cycle after the
// symbol's last chip.
module rake_receiver
  import sdr_pkg::*;
#(
  parameter int unsigned NFING = 3,
  parameter int unsigned DMAX  = 63,          // longest path delay, in samples
  parameter int unsigned IN_W  = OW,
  parameter int unsigned SYM_W = 32,
  parameter int unsigned FRAME_CHIPS = 38400
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  mod_cfg_t               cfg,
  input  logic [$clog2(DMAX+1)-1:0] finger_delay [NFING],
  input  sample_t                finger_gain_i [NFING],
  input  sample_t                finger_gain_q [NFING],
  input  logic                   frame_start,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  output logic                   dpdch_valid,
  output logic signed [SYM_W-1:0] dpdch,
  output logic                   dpcch_valid,
  output logic signed [SYM_W-1:0] dpcch
);

  if (DMAX < 1) begin : g_dmax_check
    $error("rake_receiver: DMAX must be at least 1");
  end

  localparam int unsigned DW2  = IN_W + DW + 2;            // finger product width
  localparam int unsigned CHW  = IN_W + 4;                 // combined chip width
  localparam int unsigned CNTW = $clog2(FRAME_CHIPS);
  localparam int unsigned WW   = $clog2(DMAX + OSR + 1);

  logic signed [IN_W-1:0] dl_i [DMAX+1];   // dl[0] = newest sample
  logic signed [IN_W-1:0] dl_q [DMAX+1];

  logic              running;
  logic [WW-1:0]     wait_cnt;             // samples until the next chip instant
  logic [CNTW-1:0]   idx;                  // chip index in the frame
  logic [MAX_SF_LOG2-1:0] ci, cq;
  logic [MAX_SF_LOG2-1:0] last_i, last_q;
  logic              chip_now, c1, c2, c2_even, c2_use, a_neg, b_neg, wrap;
  logic signed [DW2+1:0] acc_i, acc_q;
  logic signed [CHW-1:0] comb_i, comb_q, dsc_i, dsc_q;
  logic signed [SYM_W-1:0] sum_i, sum_q, term_i, term_q;

  // The delay line, including the sample arriving now.
  function automatic logic signed [IN_W-1:0] tap_i(int k);
    return (k == 0) ? in_i : dl_i[k-1];
  endfunction
  function automatic logic signed [IN_W-1:0] tap_q(int k);
    return (k == 0) ? in_q : dl_q[k-1];
  endfunction

  assign chip_now = in_valid && running && (wait_cnt == '0);
  assign last_i   = MAX_SF_LOG2'((10'd1 << cfg.sf_i_log2) - 10'd1);
  assign last_q   = MAX_SF_LOG2'((10'd1 << cfg.sf_q_log2) - 10'd1);
  assign wrap     = (idx == CNTW'(FRAME_CHIPS - 1));

  scrambling_code_gen u_code (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     ((in_valid && frame_start) || (chip_now && wrap)),
    .code_num (cfg.scr_code),
    .advance  (chip_now),
    .c1       (c1),
    .c2       (c2)
  );

  assign c2_use = idx[0] ? c2_even : c2;
  assign a_neg  = c1;
  assign b_neg  = c1 ^ idx[0] ^ c2_use;

  // Maximal-ratio combining of the fingers, then descrambling.
  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int f = 0; f < NFING; f++) begin
      logic signed [DW2+1:0] xi, xq, gi, gq;   // widened before multiplying
      xi = (DW2+2)'(tap_i(int'(DMAX) - int'(finger_delay[f])));
      xq = (DW2+2)'(tap_q(int'(DMAX) - int'(finger_delay[f])));
      gi = (DW2+2)'(finger_gain_i[f]);
      gq = (DW2+2)'(finger_gain_q[f]);
      acc_i += xi * gi + xq * gq;
      acc_q += xq * gi - xi * gq;
    end
    comb_i = CHW'(acc_i >>> 14);
    comb_q = CHW'(acc_q >>> 14);
    // (x_i + j x_q)(a - j b)
    dsc_i = (a_neg ? -comb_i : comb_i) + (b_neg ? -comb_q : comb_q);
    dsc_q = (a_neg ? -comb_q : comb_q) - (b_neg ? -comb_i : comb_i);
    // despreading: times the OVSF chip of each branch
    term_i = ovsf_neg(cfg.sf_i_log2, cfg.code_i, ci) ? -SYM_W'(dsc_i) : SYM_W'(dsc_i);
    term_q = ovsf_neg(cfg.sf_q_log2, cfg.code_q, cq) ? -SYM_W'(dsc_q) : SYM_W'(dsc_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      wait_cnt    <= '0;
      idx         <= '0;
      ci          <= '0;
      cq          <= '0;
      c2_even     <= 1'b0;
      sum_i       <= '0;
      sum_q       <= '0;
      dpdch_valid <= 1'b0;
      dpcch_valid <= 1'b0;
      dpdch       <= '0;
      dpcch       <= '0;
      for (int k = 0; k <= DMAX; k++) begin
        dl_i[k] <= '0;
        dl_q[k] <= '0;
      end
    end else begin
      dpdch_valid <= 1'b0;
      dpcch_valid <= 1'b0;
      if (in_valid) begin
        dl_i[0] <= in_i;
        dl_q[0] <= in_q;
        for (int k = 1; k <= DMAX; k++) begin
          dl_i[k] <= dl_i[k-1];
          dl_q[k] <= dl_q[k-1];
        end
        if (frame_start) begin
          // chip 0 of the zero-delay path is now dl[0]; it is combined DMAX
          // samples later
          running  <= 1'b1;
          wait_cnt <= WW'(DMAX - 1);
          idx      <= '0;
          ci       <= '0;
          cq       <= '0;
          sum_i    <= '0;
          sum_q    <= '0;
        end else if (running) begin
          if (wait_cnt != '0) begin
            wait_cnt <= wait_cnt - 1'b1;
          end else begin
            wait_cnt <= WW'(OSR - 1);
            idx      <= wrap ? '0 : idx + 1'b1;
            if (!idx[0]) c2_even <= c2;
            if (ci == last_i) begin
              dpdch_valid <= 1'b1;
              dpdch       <= sum_i + term_i;
              sum_i       <= '0;
              ci          <= '0;
            end else begin
              sum_i <= sum_i + term_i;
              ci    <= ci + 1'b1;
            end
            if (cq == last_q) begin
              dpcch_valid <= 1'b1;
              dpcch       <= sum_q + term_q;
              sum_q       <= '0;
              cq          <= '0;
            end else begin
              sum_q <= sum_q + term_q;
              cq    <= cq + 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
