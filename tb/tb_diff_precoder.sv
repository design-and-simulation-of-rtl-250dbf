// tb_diff_precoder: drives random bits in bursts through the precoder, with random
// gaps and output back-pressure, and compares with beta_k = b_k xor b_(k-1),
// b_(-1) = 1 at every burst start, and with the bypass when the precoder is off.
module tb_diff_precoder;
  import sdr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mod_cfg_t cfg;
  logic restart = 1'b0;
  logic in_valid = 1'b0, in_ready, in_bit = 1'b0;
  logic out_valid, out_ready = 1'b0, out_bit;
  int checks = 0, failures = 0;
  bit exp_q[$];
  int nbursts_started = 0;

  always #5 clk = ~clk;

  diff_precoder dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: random back-pressure, compare in order.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        bit e;
        e = exp_q.pop_front();
        if (out_bit !== e) begin
          failures++;
          $display("FAIL bit: got %0b exp %0b", out_bit, e);
        end
      end
    end
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic run(bit pre_on, int blen, int nbursts);
    bit prev;
    @(negedge clk);
    cfg = preset_cfg(STD_GSM);
    cfg.precoder_on = pre_on;
    cfg.burst_len = BLW'(blen);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    for (int b = 0; b < nbursts; b++) begin
      prev = 1'b1;
      for (int k = 0; k < blen; k++) begin
        bit bb;
        bb = 1'($urandom);
        while ($urandom_range(0, 4) == 0) @(negedge clk);
        in_valid = 1'b1;
        in_bit = bb;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        exp_q.push_back(pre_on ? (bb ^ prev) : bb);
        prev = bb;
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    cfg = preset_cfg(STD_GSM);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1'b1, 148, 3);
    run(1'b1, 444, 2);
    run(1'b0, 148, 2);
    run(1'b1, 7, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
