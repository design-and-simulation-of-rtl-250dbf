// diff_precoder: differential precoder of the generalized modulator (GSM and EDGE).
//
// For every input bit b_k it outputs beta_k = b_k xor b_(k-1). The first bit of each
// burst is precoded against b_(-1) = 1, standing for the dummy bits sent ahead of the
// first user bit. The burst is found by counting input bits against cfg.burst_len.
// With cfg.precoder_on = 0 the bit passes unchanged (the stage is switched off).
// Interface: valid/ready streams of single bits; the output is a register stage, so a
// bit accepted in cycle n is offered in cycle n+1; full throughput of one bit/cycle.
// restart (one cycle) clears the burst counter and any held output.
module diff_precoder
  import sdr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  mod_cfg_t cfg,
  input  logic     restart,
  input  logic     in_valid,
  output logic     in_ready,
  input  logic     in_bit,
  output logic     out_valid,
  input  logic     out_ready,
  output logic     out_bit
);

  logic           prev_bit;
  logic [BLW-1:0] cnt;
  logic           ref_bit;
  logic           fire;

  assign in_ready = (!out_valid || out_ready) && !restart;
  assign fire     = in_valid && in_ready;
  assign ref_bit  = (cnt == '0) ? 1'b1 : prev_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_bit  <= 1'b1;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else if (restart) begin
      prev_bit  <= 1'b1;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out_bit   <= cfg.precoder_on ? (in_bit ^ ref_bit) : in_bit;
        prev_bit  <= in_bit;
        cnt       <= (cnt >= cfg.burst_len - 1'b1) ? '0 : cnt + 1'b1;
      end
    end
  end

  // An offered output is held until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || restart)
    out_valid && !out_ready |=> out_valid && $stable(out_bit));

endmodule
