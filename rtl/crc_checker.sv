// crc_checker: CRC parity check of a decoded block (RAB subflow 1 of the speech
// channel). A failed check marks the block for discarding, so that the speech
// decoder repeats its last frame.
//
// The block arrives serially: data_len data bits followed by CRC_LEN parity bits,
// first bit first. The data bits are divided by the generator polynomial in a
// CRC_LEN-bit shift register started at zero (bit i of POLY is the coefficient of
// D^i, the D^CRC_LEN term implied); the remainder is then compared, highest
// coefficient first, with the received parity bits. The default generator is the
// 12-bit UTRA-FDD polynomial D^12 + D^11 + D^3 + D^2 + D + 1; polynomial, length and
// bit order are this design's choice.
// Interface: `start` (one cycle) clears the register and takes data_len; bits come on
// in_valid/in_bit (always accepted). One cycle after the last parity bit, `done`
// pulses with crc_ok (remainder matched) and discard = !crc_ok.
module crc_checker #(
  parameter int unsigned CRC_LEN = 12,
  parameter logic [CRC_LEN-1:0] POLY = 12'h80F,
  parameter int unsigned LEN_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] data_len,
  input  logic             in_valid,
  input  logic             in_bit,
  output logic             done,
  output logic             crc_ok,
  output logic             discard
);

  logic [CRC_LEN-1:0] rem;
  logic [LEN_W-1:0]   len, cnt;
  logic [$clog2(CRC_LEN+1)-1:0] pcnt;
  logic               mismatch, active;

  assign discard = done && !crc_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem      <= '0;
      len      <= '0;
      cnt      <= '0;
      pcnt     <= '0;
      mismatch <= 1'b0;
      active   <= 1'b0;
      done     <= 1'b0;
      crc_ok   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem      <= '0;
        len      <= data_len;
        cnt      <= '0;
        pcnt     <= '0;
        mismatch <= 1'b0;
        active   <= 1'b1;
      end else if (active && in_valid) begin
        if (cnt < len) begin
          // divide: feedback is the outgoing top bit xor the incoming bit
          rem <= {rem[CRC_LEN-2:0], 1'b0} ^ ((rem[CRC_LEN-1] ^ in_bit) ? POLY : '0);
          cnt <= cnt + 1'b1;
        end else begin
          // compare the remainder, top bit first, with the parity bits
          if (rem[CRC_LEN-1] != in_bit) mismatch <= 1'b1;
          rem  <= {rem[CRC_LEN-2:0], 1'b0};
          pcnt <= pcnt + 1'b1;
          if (pcnt == $bits(pcnt)'(CRC_LEN - 1)) begin
            active <= 1'b0;
            done   <= 1'b1;
            crc_ok <= !(mismatch || (rem[CRC_LEN-1] != in_bit));
          end
        end
      end
    end
  end

endmodule
