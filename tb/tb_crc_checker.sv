// tb_crc_checker: builds blocks of random data with their 12-bit CRC computed here by
// polynomial long division (D^12 + D^11 + D^3 + D^2 + D + 1), sends them to the
// checker and expects crc_ok; then flips one data or parity bit and expects discard.
// Also checks that done comes exactly one cycle after the last parity bit.
module tb_crc_checker;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [9:0] data_len = '0;
  logic in_valid = 1'b0, in_bit = 1'b0;
  logic done, crc_ok, discard;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc_checker dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CRC by long division of data(D) * D^12 by g(D); returns p_1..p_12 in p[0..11]
  function automatic void crc12(bit d[$], ref bit p[12]);
    // coefficients of g from D^12 down to D^0
    bit g[13] = '{1, 1, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1};
    bit w[$];
    w = d;
    for (int k = 0; k < 12; k++) w.push_back(1'b0);
    for (int k = 0; k < d.size(); k++)
      if (w[k]) for (int j = 0; j < 13; j++) w[k + j] ^= g[j];
    for (int k = 0; k < 12; k++) p[k] = w[d.size() + k];
  endfunction

  task automatic run(int n, int flip);
    bit d[$], p[12], blk[$];
    for (int k = 0; k < n; k++) d.push_back(1'($urandom));
    crc12(d, p);
    blk = d;
    for (int k = 0; k < 12; k++) blk.push_back(p[k]);
    if (flip >= 0) blk[flip] = !blk[flip];
    @(negedge clk);
    start = 1'b1; data_len = 10'(n);
    @(negedge clk);
    start = 1'b0;
    foreach (blk[k]) begin
      in_valid = 1'b1;
      in_bit = blk[k];
      @(negedge clk);
      checks++;
      if (done !== (k == blk.size() - 1)) begin
        failures++;
        $display("FAIL done timing at bit %0d", k);
      end
      if (k == blk.size() - 1) begin
        checks++;
        if (discard !== (flip >= 0)) begin
          failures++;
          $display("FAIL discard=%0b (n=%0d flip=%0d)", discard, n, flip);
        end
      end
      in_valid = 1'b0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    checks++;
    if (flip < 0 && !crc_ok) begin failures++; $display("FAIL good block rejected (n=%0d)", n); end
    if (flip >= 0 && crc_ok !== 1'b0) begin
      failures++; $display("FAIL bad block accepted (n=%0d flip=%0d)", n, flip);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) run($urandom_range(20, 300), -1);
    for (int t = 0; t < 20; t++) begin
      int n;
      n = $urandom_range(20, 300);
      run(n, $urandom_range(0, n + 11));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
