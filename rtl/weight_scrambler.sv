// weight_scrambler: channel weighting and complex scrambling (UTRA-FDD only).
//
// With cfg.scramble_on set, each chip (I = DPDCH, Q = DPCCH) is weighted,
// wI = I*beta_d/16 and wQ = Q*beta_c/16, and the complex chip wI + j*wQ is
// multiplied by the complex scrambling chip S(i) = c1(i) * (1 + j*(-1)^i * c2(2*floor(i/2))),
// whose parts are +-1, so the product needs only sign changes and additions:
// out = (wI*a - wQ*b) + j(wI*b + wQ*a) with S = a + jb. The chip index i restarts,
// and the code generator is reloaded, every FRAME_CHIPS chips (one 10 ms radio
// frame at 3.84 Mchip/s) and on restart. With scramble_on clear, chips pass unchanged.
// Interface: valid/ready chip in and out, one register stage, one chip per cycle.
module weight_scrambler
  import sdr_pkg::*;
#(
  parameter int unsigned FRAME_CHIPS = 38400
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
  output cplx_t    out_chip
);

  localparam int unsigned CNTW = $clog2(FRAME_CHIPS);

  logic [CNTW-1:0] idx;
  logic            c1, c2, c2_even, c2_use;
  logic            fire, a_neg, b_neg, wrap;
  logic signed [DW+4:0] wi, wq;
  sample_t         si, sq;

  assign in_ready = (!out_valid || out_ready) && !restart;
  assign fire     = in_valid && in_ready;
  assign wrap     = (idx == CNTW'(FRAME_CHIPS - 1));

  scrambling_code_gen u_code (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (restart || (fire && wrap)),
    .code_num (cfg.scr_code),
    .advance  (fire),
    .c1       (c1),
    .c2       (c2)
  );

  // c2 is sampled on even chips and reused on the following odd chip.
  assign c2_use = idx[0] ? c2_even : c2;
  assign a_neg  = c1;
  assign b_neg  = c1 ^ idx[0] ^ c2_use;

  always_comb begin
    wi = (in_chip.i * $signed({1'b0, cfg.beta_d})) >>> 4;
    wq = (in_chip.q * $signed({1'b0, cfg.beta_c})) >>> 4;
    si = sample_t'((a_neg ? -wi : wi) - (b_neg ? -wq : wq));
    sq = sample_t'((b_neg ? -wi : wi) + (a_neg ? -wq : wq));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      c2_even   <= 1'b0;
      out_valid <= 1'b0;
      out_chip  <= '0;
    end else if (restart) begin
      idx       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out_chip  <= cfg.scramble_on ? '{i: si, q: sq} : in_chip;
        idx       <= wrap ? '0 : idx + 1'b1;
        if (!idx[0]) c2_even <= c2;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n || restart)
    out_valid && !out_ready |=> out_valid && $stable(out_chip));

endmodule
