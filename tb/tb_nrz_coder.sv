// tb_nrz_coder: checks the three NRZ settings (+1: d = 1-2*beta, -1: reversed,
// 0: no transform) on random bits with back-pressure, including one-cycle latency.
module tb_nrz_coder;
  import sdr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mod_cfg_t cfg;
  logic restart = 1'b0;
  logic in_valid = 1'b0, in_ready, in_bit = 1'b0;
  logic out_valid, out_ready;
  logic signed [1:0] out_level;
  int checks = 0, failures = 0;
  int exp_q[$];

  always #5 clk = ~clk;

  nrz_coder dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int e;
      checks++;
      e = (exp_q.size() != 0) ? exp_q.pop_front() : 99;
      if (int'(out_level) !== e) begin
        failures++;
        $display("FAIL level: got %0d exp %0d (nrz=%0d)", out_level, e, $signed(cfg.nrz));
      end
    end
  end

  bit bp_on = 1'b0;
  always @(negedge clk) out_ready <= bp_on ? 1'($urandom) : 1'b1;

  task automatic run(nrz_mode_t m, int n, bit bp);
    @(negedge clk);
    bp_on = bp;
    cfg.nrz = m;
    for (int k = 0; k < n; k++) begin
      bit bb;
      bb = 1'($urandom);
      in_valid = 1'b1;
      in_bit = bb;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      case (m)
        NRZ_PLUS:  exp_q.push_back(1 - 2 * int'(bb));
        NRZ_MINUS: exp_q.push_back(2 * int'(bb) - 1);
        default:   exp_q.push_back(int'(bb));
      endcase
      @(negedge clk);
      in_valid = 1'b0;
    end
    bp_on = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    cfg = preset_cfg(STD_GSM);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // latency: a bit accepted at an edge is visible right after it
    @(negedge clk);
    cfg.nrz = NRZ_PLUS;
    in_valid = 1'b1; in_bit = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    exp_q.push_back(-1);
    checks++;
    if (!out_valid) begin failures++; $display("FAIL latency"); end
    @(negedge clk);
    run(NRZ_PLUS, 200, 1'b0);
    run(NRZ_MINUS, 200, 1'b1);
    run(NRZ_OFF, 200, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
