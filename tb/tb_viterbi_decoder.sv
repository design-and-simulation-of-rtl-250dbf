// tb_viterbi_decoder: encodes random blocks with the K = 9 rate 1/2 and rate 1/3
// encoders (written here from the generator polynomials, with 8 zero tail bits),
// flips some code bits, and checks that the decoder returns the information bits
// exactly: error-free blocks, isolated errors, and a short block. Also checks the
// block timing (one symbol per cycle in, traceback as long as the block).
module tb_viterbi_decoder;
  localparam int MAXB = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, rate13 = 1'b0;
  logic [$clog2(MAXB+1)-1:0] n_bits = '0;
  logic in_valid = 1'b0, in_ready;
  logic [2:0] in_sym = '0;
  logic out_valid, out_ready, out_bit, out_last, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  viterbi_decoder #(.MAX_BITS(MAXB)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  function automatic bit par(logic [8:0] v);
    return ^v;
  endfunction

  task automatic run(bit r13, int n, int nerr);
    bit u[$], got[$];
    logic [2:0] sym[$];
    logic [8:0] r;
    int t0;
    for (int k = 0; k < n; k++) u.push_back(1'($urandom));
    r = '0;
    for (int k = 0; k < n + 8; k++) begin
      logic [2:0] c;
      r = {(k < n) ? u[k] : 1'b0, r[8:1]};
      if (r13) c = {par(r & 9'o711), par(r & 9'o663), par(r & 9'o557)};
      else     c = {1'b0, par(r & 9'o753), par(r & 9'o561)};
      sym.push_back(c);
    end
    // isolated errors, at least 20 symbols apart
    for (int e = 0; e < nerr; e++) begin
      int p;
      p = 10 + e * 25;
      if (p < sym.size()) begin
        logic [2:0] t;
        t = sym[p];
        t[$urandom_range(0, r13 ? 2 : 1)] ^= 1'b1;
        sym[p] = t;
      end
    end
    @(negedge clk);
    start = 1'b1; rate13 = r13; n_bits = n[$clog2(MAXB+1)-1:0];
    @(negedge clk);
    start = 1'b0;
    t0 = $time;
    foreach (sym[k]) begin
      in_valid = 1'b1;
      in_sym = sym[k];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    checks++;
    if (($time - t0) / 10 > n + 8 + 1) begin
      failures++;
      $display("FAIL input rate: %0d symbols in %0d cycles", n + 8, ($time - t0) / 10);
    end
    while (got.size() < n) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        got.push_back(out_bit);
        checks++;
        if (out_last !== (got.size() == n)) begin
          failures++;
          $display("FAIL out_last at bit %0d", got.size());
        end
      end
    end
    for (int k = 0; k < n; k++) begin
      checks++;
      if (got[k] !== u[k]) begin
        failures++;
        if (failures < 10) $display("FAIL rate13=%0d bit %0d: got %0b exp %0b", r13, k, got[k], u[k]);
      end
    end
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1'b0, 100, 0);
    run(1'b1, 100, 0);
    run(1'b0, 200, 6);
    run(1'b1, 244, 9);
    run(1'b1, 5, 0);
    run(1'b0, 256, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
