// tb_weight_scrambler: random chips through the weighting and complex scrambling
// stage, compared with S(i) = c1(i) (1 + j (-1)^i c2(2 floor(i/2))) built from the
// reference long code, with wI = floor(I*beta_d/16) and wQ = floor(Q*beta_c/16).
// A short frame (FRAME_CHIPS = 100) checks that the code restarts each frame; the
// bypass with scrambling off and output back-pressure are covered too.
module tb_weight_scrambler;
  import sdr_pkg::*;
  import tb_ref_pkg::long_code;

  localparam int FRAME = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  mod_cfg_t cfg;
  logic restart = 1'b0;
  logic in_valid = 1'b0, in_ready;
  cplx_t in_chip;
  logic out_valid, out_ready;
  cplx_t out_chip;
  int checks = 0, failures = 0;
  int exp_i[$], exp_q[$];
  bit bp = 1'b0;

  always #5 clk = ~clk;

  weight_scrambler #(.FRAME_CHIPS(FRAME)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int ei, eq;
      checks++;
      ei = (exp_i.size() != 0) ? exp_i.pop_front() : 99999;
      eq = (exp_q.size() != 0) ? exp_q.pop_front() : 99999;
      if (int'(out_chip.i) != ei || int'(out_chip.q) != eq) begin
        failures++;
        if (failures < 10) $display("FAIL chip: got %0d,%0d exp %0d,%0d", out_chip.i, out_chip.q, ei, eq);
      end
    end
  end

  task automatic run(bit on, int bd, int bc, int unsigned code, int n, bit with_bp);
    bit r1[], r2[];
    long_code(code, FRAME, r1, r2);
    @(negedge clk);
    cfg = preset_cfg(STD_UTRA_FDD);
    cfg.scramble_on = on;
    cfg.beta_d = 4'(bd); cfg.beta_c = 4'(bc);
    cfg.scr_code = code[23:0];
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    bp = with_bp;
    for (int k = 0; k < n; k++) begin
      int xi, xq, wi, wq, a, b, i;
      xi = $urandom_range(0, 1) ? 4096 : -4096;
      xq = $urandom_range(0, 1) ? 4096 : -4096;
      if (k % 7 == 3) xi = int'($urandom_range(0, 8000)) - 4000;
      i = k % FRAME;
      wi = $rtoi($floor(real'(xi * bd) / 16.0));
      wq = $rtoi($floor(real'(xq * bc) / 16.0));
      a = r1[i] ? -1 : 1;
      b = a * ((i % 2) ? -1 : 1) * (r2[i - i % 2] ? -1 : 1);
      if (on) begin
        exp_i.push_back(wi * a - wq * b);
        exp_q.push_back(wi * b + wq * a);
      end else begin
        exp_i.push_back(xi);
        exp_q.push_back(xq);
      end
      in_valid = 1'b1;
      in_chip.i = 16'(xi);
      in_chip.q = 16'(xq);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
    end
    while (exp_i.size() != 0) @(negedge clk);
    bp = 1'b0;
  endtask

  initial begin
    cfg = preset_cfg(STD_GSM);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1'b1, 15, 8, 1, 350, 1'b0);
    run(1'b1, 9, 15, 24'h123456, 250, 1'b1);
    run(1'b0, 15, 8, 1, 100, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
