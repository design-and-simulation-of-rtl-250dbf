// scrambling_code_gen: complex scrambling sequence for the generalized modulator.
//
// Produces the two binary sequences c1 and c2 of a long uplink scrambling code as
// used in UTRA-FDD: x is the m-sequence of x^25 + x^3 + 1, started from the 24-bit
// code number n with bit 24 set; y is the m-sequence of x^25 + x^3 + x^2 + x + 1,
// started from all ones. c1(i) = x(i) xor y(i). c2 is the same Gold sequence shifted
// by 16777232 chips, obtained from masks on the two registers:
// c2(i) = x(i+4) ^ x(i+7) ^ x(i+18) ^ y(i+4) ^ y(i+6) ^ y(i+17).
// The code itself is this design's choice (the standard's long code); the modulator
// only calls for "complex scrambling".
// Interface: `init` (one cycle) reloads the registers for code number `code_num`;
// `advance` steps one chip. c1/c2 always show the values for the current chip i.
module scrambling_code_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [23:0] code_num,
  input  logic        advance,
  output logic        c1,
  output logic        c2
);

  logic [24:0] xs, ys;   // xs[k] = x(i+k)

  assign c1 = xs[0] ^ ys[0];
  assign c2 = xs[4] ^ xs[7] ^ xs[18] ^ ys[4] ^ ys[6] ^ ys[17];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs <= {1'b1, 24'd0};
      ys <= '1;
    end else if (init) begin
      xs <= {1'b1, code_num};
      ys <= '1;
    end else if (advance) begin
      xs <= {xs[3] ^ xs[0], xs[24:1]};
      ys <= {ys[3] ^ ys[2] ^ ys[1] ^ ys[0], ys[24:1]};
    end
  end

endmodule
