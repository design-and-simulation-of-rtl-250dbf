// tb_pulse_shaper: checks the interpolating pulse-shaping FIR for all three filter
// numbers. The RRC responses (roll-off 0.35 and 0.22) are recomputed here from the
// closed-form impulse response; the GMSK C0 bank is checked for its shape (peak of
// 1.0 at the centre, symmetry, support of 5 symbol periods). Random chips are then
// filtered and every output sample is compared with a direct convolution (within
// 2 LSB for the RRC banks, whose taps are recomputed here). Also checks the rate:
// OSR samples per chip, one sample per cycle without back-pressure.
module tb_pulse_shaper;
  import sdr_pkg::*;
  import tb_ref_pkg::rrc_taps;
  import tb_ref_pkg::rnd_sat;

  logic clk = 1'b0, rst_n = 1'b0;
  mod_cfg_t cfg;
  logic restart = 1'b0;
  logic in_valid = 1'b0, in_ready;
  cplx_t in_chip;
  logic out_valid, out_ready;
  logic signed [OW-1:0] out_i, out_q;
  int checks = 0, failures = 0;
  longint exp_i[$], exp_q[$];
  bit bp = 1'b0;
  int h[3][49];
  logic [15:0] rom[147];
  int tol;

  always #5 clk = ~clk;

  pulse_shaper dut (.*);

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
      longint ei, eq;
      checks++;
      ei = (exp_i.size() != 0) ? exp_i.pop_front() : 99999;
      eq = (exp_q.size() != 0) ? exp_q.pop_front() : 99999;
      if (out_i > ei + tol || out_i < ei - tol || out_q > eq + tol || out_q < eq - tol) begin
        failures++;
        if (failures < 10) $display("FAIL sample: got %0d,%0d exp %0d,%0d (filter %0d)", out_i, out_q, ei, eq, cfg.filter_num);
      end
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(int fn, int n, bit with_bp);
    int xi[$], xq[$];
    int t0, t1;
    @(negedge clk);
    cfg = preset_cfg(STD_GSM);
    cfg.filter_num = filter_num_t'(fn);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    tol = (fn == 1) ? 0 : 2;
    for (int k = 0; k < n; k++) begin
      xi.push_back($urandom_range(0, 1) ? 4096 : -4096);
      xq.push_back($urandom_range(0, 1) ? 3000 : -3000);
    end
    for (int k = 0; k < n; k++)
      for (int p = 0; p < OSR; p++) begin
        longint si, sq;
        si = 0; sq = 0;
        for (int j = 0; p + j * OSR < NTAPS; j++)
          if (k - j >= 0) begin
            si += longint'(h[fn-1][p + j * OSR]) * xi[k - j];
            sq += longint'(h[fn-1][p + j * OSR]) * xq[k - j];
          end
        exp_i.push_back(rnd_sat(si, 14, OW));
        exp_q.push_back(rnd_sat(sq, 14, OW));
      end
    bp = with_bp;
    t0 = $time;
    for (int k = 0; k < n; k++) begin
      in_valid = 1'b1;
      in_chip.i = 16'(xi[k]);
      in_chip.q = 16'(xq[k]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    while (exp_i.size() != 0) @(negedge clk);
    t1 = $time;
    if (!with_bp)
      check($sformatf("rate: %0d samples in %0d cycles", n * OSR, (t1 - t0) / 10),
            (t1 - t0) / 10 <= n * OSR + 2);
    bp = 1'b0;
  endtask

  initial begin
    $readmemh("rtl/pulse_coeffs.hex", rom);
    rrc_taps(0.35, h[1]);
    rrc_taps(0.22, h[2]);
    for (int k = 0; k < NTAPS; k++) h[0][k] = int'($signed(rom[k]));
    // stored RRC taps agree with the closed form
    for (int b = 1; b < 3; b++)
      for (int k = 0; k < NTAPS; k++) begin
        int d;
        d = int'($signed(rom[b * NTAPS + k])) - h[b][k];
        check($sformatf("rrc tap %0d/%0d", b, k), d <= 1 && d >= -1);
      end
    // GMSK C0 shape
    check("c0 peak", h[0][24] == 16384);
    for (int k = 0; k < NTAPS; k++) begin
      check("c0 symmetric", h[0][k] == h[0][NTAPS - 1 - k]);
      if (k < 24 - 10 || k > 24 + 10) check("c0 support", h[0][k] == 0);
      if (k > 0 && k <= 24) check("c0 rising", h[0][k] >= h[0][k-1]);
    end
    cfg = preset_cfg(STD_GSM);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1, 60, 1'b0);
    run(2, 60, 1'b1);
    run(3, 80, 1'b0);
    run(3, 40, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
