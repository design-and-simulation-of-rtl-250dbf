// ovsf_spreader: channelisation (spreading) stage of the generalized modulator.
//
// Spreads the I-branch symbols with the OVSF code c(SF_I, code_i) and the Q-branch
// symbols with c(SF_Q, code_q), where SF = 2**cfg.sf_*_log2. Each output chip holds
// one chip of each branch. An I symbol is used for SF_I chips and a Q symbol for SF_Q
// chips, so the two branches may run at different symbol rates (for the UTRA-FDD
// uplink: DPDCH at SF 8, DPCCH at SF 256). With SF = 1 no spreading takes place and a
// complex symbol passes straight through.
// The OVSF codes are produced from the code-tree rule rather than read from a stored
// table: chip k of c(SF, n) is (-1)^popcount(rev(n) & k), rev reversing the log2(SF)
// bits of n. This yields exactly the rows of the OVSF code tree.
// Interface: two valid/ready symbol inputs, one valid/ready chip output (register
// stage). A chip is produced when both branches offer a symbol; a branch symbol is
// taken (ready) with its last chip. Throughput one chip per cycle.
module ovsf_spreader
  import sdr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  mod_cfg_t cfg,
  input  logic     restart,
  input  logic     i_valid,
  output logic     i_ready,
  input  sample_t  i_data,
  input  logic     q_valid,
  output logic     q_ready,
  input  sample_t  q_data,
  output logic     out_valid,
  input  logic     out_ready,
  output cplx_t    out_chip
);

  logic [MAX_SF_LOG2-1:0] ci, cq;      // chip index within the current symbol
  logic [MAX_SF_LOG2-1:0] last_i, last_q;
  logic                   fire;

  assign last_i  = MAX_SF_LOG2'((10'd1 << cfg.sf_i_log2) - 10'd1);
  assign last_q  = MAX_SF_LOG2'((10'd1 << cfg.sf_q_log2) - 10'd1);
  assign fire    = i_valid && q_valid && (!out_valid || out_ready) && !restart;
  assign i_ready = fire && (ci == last_i);
  assign q_ready = fire && (cq == last_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ci        <= '0;
      cq        <= '0;
      out_valid <= 1'b0;
      out_chip  <= '0;
    end else if (restart) begin
      ci        <= '0;
      cq        <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid  <= 1'b1;
        out_chip.i <= ovsf_neg(cfg.sf_i_log2, cfg.code_i, ci) ? -i_data : i_data;
        out_chip.q <= ovsf_neg(cfg.sf_q_log2, cfg.code_q, cq) ? -q_data : q_data;
        ci         <= (ci == last_i) ? '0 : ci + 1'b1;
        cq         <= (cq == last_q) ? '0 : cq + 1'b1;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n || restart)
    out_valid && !out_ready |=> out_valid && $stable(out_chip));

endmodule
