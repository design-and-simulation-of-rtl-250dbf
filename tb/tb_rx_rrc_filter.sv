// tb_rx_rrc_filter: the 49-tap receive RRC filter. An impulse of 2^16 must return
// the 49 RRC taps (roll-off 0.22, recomputed here from the closed form); random
// samples with random gaps are then compared with a direct convolution (within
// 2 LSB), and every output must follow its input sample by exactly one cycle.
module tb_rx_rrc_filter;
  import sdr_pkg::*;
  import tb_ref_pkg::rrc_taps;
  import tb_ref_pkg::rnd_sat;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [OW-1:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic signed [OW-1:0] out_i, out_q;
  int checks = 0, failures = 0;
  int h[49];
  longint hist_i[$], hist_q[$];
  longint exp_i[$], exp_q[$];
  int tol = 1;
  bit prev_valid = 1'b0;

  always #5 clk = ~clk;

  rx_rrc_filter dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== prev_valid) begin
        failures++;
        $display("FAIL latency: out_valid %0b after in_valid %0b", out_valid, prev_valid);
      end
      if (out_valid) begin
        longint ei, eq;
        checks++;
        ei = (exp_i.size() != 0) ? exp_i.pop_front() : 99999;
        eq = (exp_q.size() != 0) ? exp_q.pop_front() : 99999;
        if (out_i > ei + tol || out_i < ei - tol || out_q > eq + tol || out_q < eq - tol) begin
          failures++;
          if (failures < 10) $display("FAIL sample: got %0d,%0d exp %0d,%0d", out_i, out_q, ei, eq);
        end
      end
    end
    prev_valid = in_valid;
  end

  task automatic push(int xi, int xq);
    longint si, sq;
    hist_i.push_front(xi);
    hist_q.push_front(xq);
    si = 0; sq = 0;
    for (int k = 0; k < 49 && k < hist_i.size(); k++) begin
      si += longint'(h[k]) * hist_i[k];
      sq += longint'(h[k]) * hist_q[k];
    end
    exp_i.push_back(rnd_sat(si, 16, OW));
    exp_q.push_back(rnd_sat(sq, 16, OW));
    @(negedge clk);
    in_valid = 1'b1;
    in_i = OW'(xi);
    in_q = OW'(xq);
    @(negedge clk);
    in_valid = 1'b0;
    while ($urandom_range(0, 3) == 0) @(negedge clk);
  endtask

  initial begin
    rrc_taps(0.22, h);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // impulse response: tolerance 1 covers rounding of the stored taps
    push(65536, -65536);
    for (int k = 1; k < 60; k++) push(0, 0);
    tol = 2;
    for (int k = 0; k < 400; k++)
      push(int'($urandom_range(0, 16000)) - 8000, int'($urandom_range(0, 16000)) - 8000);
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
