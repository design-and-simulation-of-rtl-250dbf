// rx_rrc_filter: 49-tap root-raised-cosine receive filter.
//
// The first stage of the UTRA-FDD receiver: a complex FIR matched to the transmit
// pulse (roll-off 0.22, OSR samples per chip), run at the sample rate ahead of the
// rake receiver. Direct form: a NTAPS-deep delay line of complex samples and NTAPS
// multiplies per branch each sample; y[n] = sum_k h[k] x[n-k], rounded and shifted
// right by SHIFT (16 gives about unit gain at the chip instants for the Q1.14,
// peak-normalised taps), saturated to OUT_W bits. The taps are bank 3 of
// rtl/pulse_coeffs.hex (the same RRC as the transmit filter number 3).
// Interface: in_valid qualifies one sample; out_valid follows one cycle after each
// input sample. There is no back-pressure: the filter accepts one sample per cycle.
module rx_rrc_filter
  import sdr_pkg::*;
#(
  parameter int unsigned IN_W  = OW,
  parameter int unsigned OUT_W = OW,
  parameter int unsigned SHIFT = 16,
  parameter string COEF_FILE = "rtl/pulse_coeffs.hex"
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);

  localparam int unsigned AW   = IN_W + CW + $clog2(NTAPS) + 1;
  localparam int unsigned BASE = 2 * NTAPS;   // third bank: RRC 0.22

  logic signed [CW-1:0]   coef [NBANKS*NTAPS];
  initial $readmemh(COEF_FILE, coef);

  logic signed [IN_W-1:0] xi [NTAPS];
  logic signed [IN_W-1:0] xq [NTAPS];
  logic signed [AW-1:0]   acc_i, acc_q;

  function automatic logic signed [OUT_W-1:0] sat_round(logic signed [AW-1:0] a);
    logic signed [AW-1:0] r;
    r = (a + (AW'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (r > AW'((1 <<< (OUT_W - 1)) - 1)) return {1'b0, {(OUT_W-1){1'b1}}};
    if (r < -AW'(1 <<< (OUT_W - 1)))      return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(r);
  endfunction

  // The newest sample enters the sum directly, so the output is registered once.
  always_comb begin
    acc_i = AW'(in_i * coef[BASE]);
    acc_q = AW'(in_q * coef[BASE]);
    for (int k = 1; k < NTAPS; k++) begin
      acc_i += AW'(xi[k-1] * coef[BASE + k]);
      acc_q += AW'(xq[k-1] * coef[BASE + k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      for (int k = 0; k < NTAPS; k++) begin
        xi[k] <= '0;
        xq[k] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= sat_round(acc_i);
        out_q <= sat_round(acc_q);
        xi[0] <= in_i;
        xq[0] <= in_q;
        for (int k = 1; k < NTAPS; k++) begin
          xi[k] <= xi[k-1];
          xq[k] <= xq[k-1];
        end
      end
    end
  end

endmodule
