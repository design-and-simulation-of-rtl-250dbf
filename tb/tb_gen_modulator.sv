// tb_gen_modulator: the whole generalized modulator in each of its four presets
// (GSM, IS-136, UTRA-FDD, EDGE), switched one after the other, plus a custom QPSK
// setting. For every configuration, random bursts are sent and every output sample
// is compared with a reference model of the chain (precoding, NRZ, mapping,
// OVSF spreading, weighting and long-code scrambling, FIR). The output is drained
// with random back-pressure in some runs; without it the sample rate is checked:
// one sample per cycle, i.e. OSR cycles per symbol or chip.
module tb_gen_modulator;
  import sdr_pkg::*;
  import tb_ref_pkg::chain_model;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_preset = 1'b0, load_custom = 1'b0;
  std_t std_sel = STD_GSM;
  mod_cfg_t cfg_in = '0, cfg;
  logic bit_valid = 1'b0, bit_ready, bit_in = 1'b0;
  logic smp_valid, smp_ready;
  logic signed [OW-1:0] smp_i, smp_q;
  int checks = 0, failures = 0;
  longint exp_i[$], exp_q[$];
  logic [15:0] coef[147];
  bit bp = 1'b0;

  always #5 clk = ~clk;

  gen_modulator dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) smp_ready <= bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n && smp_valid && smp_ready) begin
      longint ei, eq;
      checks++;
      ei = (exp_i.size() != 0) ? exp_i.pop_front() : 999999;
      eq = (exp_q.size() != 0) ? exp_q.pop_front() : 999999;
      if (smp_i != ei || smp_q != eq) begin
        failures++;
        if (failures < 10) $display("FAIL sample: got %0d,%0d exp %0d,%0d (mod %0d)", smp_i, smp_q, ei, eq, cfg.mod_num);
      end
    end
  end

  task automatic run(bit custom, std_t s, mod_cfg_t c, int nbursts, bit with_bp);
    bit bits[$];
    int t0, cycles, nsmp;
    @(negedge clk);
    if (custom) begin
      cfg_in = c; load_custom = 1'b1;
    end else begin
      std_sel = s; load_preset = 1'b1;
    end
    @(negedge clk);
    load_preset = 1'b0; load_custom = 1'b0;
    for (int k = 0; k < nbursts * int'(cfg.burst_len); k++) bits.push_back(1'($urandom));
    chain_model(cfg, bits, coef, exp_i, exp_q);
    nsmp = exp_i.size();
    bp = with_bp;
    t0 = $time;
    foreach (bits[k]) begin
      bit_valid = 1'b1;
      bit_in = bits[k];
      @(posedge clk);
      while (!bit_ready) @(posedge clk);
      #1;
    end
    bit_valid = 1'b0;
    while (exp_i.size() != 0) @(negedge clk);
    cycles = ($time - t0) / 10;
    if (!with_bp) begin
      checks++;
      // samples leave at one per cycle; the dual-QPSK mode also spends the fill
      // time of each burst, and the first sample needs a few pipeline cycles
      if (cycles > nsmp + ((cfg.i_len != 0) ? nbursts * int'(cfg.burst_len) : 0) + 12) begin
        failures++;
        $display("FAIL rate: %0d samples in %0d cycles", nsmp, cycles);
      end
    end
    bp = 1'b0;
    repeat (60) @(negedge clk);   // the filter tail stays in the delay line
  endtask

  initial begin
    mod_cfg_t c;
    $readmemh("rtl/pulse_coeffs.hex", coef);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1'b0, STD_GSM, '0, 2, 1'b0);
    run(1'b0, STD_IS136, '0, 2, 1'b1);
    run(1'b0, STD_UTRA_FDD, '0, 2, 1'b0);
    run(1'b0, STD_EDGE, '0, 2, 1'b1);
    c = preset_cfg(STD_IS136);
    c.mod_num = MOD_QPSK;
    c.burst_len = 12'd40;
    run(1'b1, STD_GSM, c, 3, 1'b0);
    run(1'b0, STD_GSM, '0, 1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
