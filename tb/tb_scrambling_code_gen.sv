// tb_scrambling_code_gen: compares c1 and c2 of the long scrambling code generator
// with the sequences built step by step from the two m-sequences, c2 being the Gold
// sequence really advanced by 16777232 chips. Several code numbers, re-initialisation
// and holding (advance low) are covered.
module tb_scrambling_code_gen;
  import tb_ref_pkg::long_code;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0, advance = 1'b0;
  logic [23:0] code_num = '0;
  logic c1, c2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scrambling_code_gen dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int unsigned code, int n);
    bit r1[], r2[];
    long_code(code, n, r1, r2);
    @(negedge clk);
    code_num = code[23:0];
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    for (int i = 0; i < n; i++) begin
      checks++;
      if (c1 !== r1[i] || c2 !== r2[i]) begin
        failures++;
        if (failures < 10) $display("FAIL code %0d chip %0d: got %b%b exp %b%b", code, i, c1, c2, r1[i], r2[i]);
      end
      // hold for a cycle now and then
      if ($urandom_range(0, 4) == 0) begin
        advance = 1'b0;
        @(negedge clk);
      end
      advance = 1'b1;
      @(negedge clk);
      advance = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 500);
    run(1, 500);
    run(24'h5a5a5a, 500);
    run(24'hffffff, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
