// tb_ovsf_spreader: spreads random I and Q symbol streams at several pairs of
// spreading factors and code numbers (including SF 1 = no spreading, and the
// UTRA-FDD uplink pair SF 8 / SF 256) and checks every chip against OVSF codes
// built by the code-tree recursion. Also checks the chip rate: with no back-pressure
// one chip per cycle.
module tb_ovsf_spreader;
  import sdr_pkg::*;
  import tb_ref_pkg::ovsf;

  logic clk = 1'b0, rst_n = 1'b0;
  mod_cfg_t cfg;
  logic restart = 1'b0;
  logic i_valid = 1'b0, i_ready, q_valid = 1'b0, q_ready;
  sample_t i_data, q_data;
  logic out_valid, out_ready;
  cplx_t out_chip;
  int checks = 0, failures = 0;
  int exp_i[$], exp_q[$];
  sample_t isym[$], qsym[$];
  bit bp = 1'b0;
  int nchips;

  always #5 clk = ~clk;

  ovsf_spreader dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  // Sources: present the queued symbols, pop on handshake.
  always @(negedge clk) begin
    i_valid <= (isym.size() != 0);
    q_valid <= (qsym.size() != 0);
    if (isym.size() != 0) i_data <= isym[0];
    if (qsym.size() != 0) q_data <= qsym[0];
  end
  always @(posedge clk) begin
    if (i_valid && i_ready) void'(isym.pop_front());
    if (q_valid && q_ready) void'(qsym.pop_front());
    if (rst_n && out_valid && out_ready) begin
      int ei, eq;
      nchips++;
      checks++;
      ei = (exp_i.size() != 0) ? exp_i.pop_front() : 99999;
      eq = (exp_q.size() != 0) ? exp_q.pop_front() : 99999;
      if (int'(out_chip.i) != ei || int'(out_chip.q) != eq) begin
        failures++;
        $display("FAIL chip: got %0d,%0d exp %0d,%0d", out_chip.i, out_chip.q, ei, eq);
      end
    end
  end

  task automatic run(int lsi, int lsq, int ni, int nq, int nchip, bit with_bp);
    int sfi, sfq, t0;
    sample_t di[$], dq[$];
    @(negedge clk);
    cfg = preset_cfg(STD_UTRA_FDD);
    cfg.sf_i_log2 = 4'(lsi); cfg.sf_q_log2 = 4'(lsq);
    cfg.code_i = 9'(ni); cfg.code_q = 9'(nq);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    sfi = 1 << lsi; sfq = 1 << lsq;
    for (int s = 0; s < nchip / sfi; s++) di.push_back($urandom_range(0, 1) ? 16'sd4096 : -16'sd4096);
    for (int s = 0; s < nchip / sfq; s++) dq.push_back($urandom_range(0, 1) ? 16'sd4096 : -16'sd4096);
    for (int c = 0; c < nchip; c++) begin
      exp_i.push_back(int'(di[c / sfi]) * ovsf(sfi, ni, c % sfi));
      exp_q.push_back(int'(dq[c / sfq]) * ovsf(sfq, nq, c % sfq));
    end
    bp = with_bp;
    nchips = 0;
    t0 = $time;
    isym = di; qsym = dq;
    while (exp_i.size() != 0) @(negedge clk);
    if (!with_bp) begin
      checks++;
      // one chip per 10-unit clock period, plus two cycles to start
      if (($time - t0) / 10 > nchip + 3) begin
        failures++;
        $display("FAIL rate: %0d chips in %0d cycles", nchip, ($time - t0) / 10);
      end
    end
    bp = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    cfg = preset_cfg(STD_GSM);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 0, 0, 0, 50, 1'b0);
    run(3, 8, 2, 0, 2560, 1'b0);
    run(2, 2, 3, 1, 400, 1'b1);
    run(3, 8, 5, 77, 2560, 1'b1);
    run(9, 6, 301, 33, 1024, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
