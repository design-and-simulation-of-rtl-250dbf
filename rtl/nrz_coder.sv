// nrz_coder: NRZ level coder of the generalized modulator.
//
// Turns each precoded bit beta into a signed level d, as selected by cfg.nrz
// (NRZ-on-off): +1 gives d = 1 - 2*beta (0 -> +1, 1 -> -1), -1 gives the reverse
// mapping (0 -> -1, 1 -> +1), and 0 passes the bit as the level 0 or 1.
// The level is a 2-bit two's complement number. Interface: valid/ready streams, one
// register stage (one cycle latency, one bit per cycle). restart drops a held output.
module nrz_coder
  import sdr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  mod_cfg_t          cfg,
  input  logic              restart,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_bit,
  output logic              out_valid,
  input  logic              out_ready,
  output logic signed [1:0] out_level
);

  logic signed [1:0] level;

  always_comb begin
    unique case (cfg.nrz)
      NRZ_PLUS:  level = in_bit ? -2'sd1 :  2'sd1;
      NRZ_MINUS: level = in_bit ?  2'sd1 : -2'sd1;
      default:   level = {1'b0, in_bit};
    endcase
  end

  assign in_ready = (!out_valid || out_ready) && !restart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_level <= '0;
    end else if (restart) begin
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        out_level <= level;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n || restart)
    out_valid && !out_ready |=> out_valid && $stable(out_level));

endmodule
