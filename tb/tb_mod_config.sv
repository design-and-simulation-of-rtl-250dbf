// tb_mod_config: checks the parameter register against the published parameter
// table (burst length, precoder, NRZ, modulation number, spreading factors, filter
// number, I/Q lengths for GSM, IS-136, UTRA-FDD and EDGE), the reset preset, custom
// loads and the one-cycle restart pulse that follows every load.
module tb_mod_config;
  import sdr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_preset = 1'b0, load_custom = 1'b0;
  std_t std_sel = STD_GSM;
  mod_cfg_t cfg_in, cfg;
  logic restart;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod_config dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Table row: burst, precoder, nrz(+1/0/-1), modnum, SF-I, SF-Q, filter, I-len, Q-len
  task automatic check_row(string s, int bl, int pre, int nrz, int mn, int sfi, int sfq,
                           int fn, int il, int ql);
    check({s, " burst"},    cfg.burst_len, bl);
    check({s, " precoder"}, cfg.precoder_on, pre);
    check({s, " nrz"},      $signed(cfg.nrz), nrz);
    check({s, " modnum"},   cfg.mod_num, mn);
    check({s, " sf_i"},     1 << cfg.sf_i_log2, sfi);
    check({s, " sf_q"},     1 << cfg.sf_q_log2, sfq);
    check({s, " filter"},   cfg.filter_num, fn);
    check({s, " i_len"},    cfg.i_len, il);
    check({s, " q_len"},    cfg.q_len, ql);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_in = '0;
    repeat (3) @(posedge clk);
    #1 check("restart in reset", restart, 1);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check_row("reset", 148, 1, 1, 1, 1, 1, 1, 0, 0);
    check("restart idle", restart, 0);

    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      std_sel = std_t'(s);
      load_preset = 1'b1;
      @(negedge clk);
      load_preset = 1'b0;
      check("restart after load", restart, 1);
      case (s)
        0: check_row("GSM",    148, 1,  1, 1, 1,   1, 1,   0,  0);
        1: check_row("IS-136", 312, 0,  1, 2, 1,   1, 2,   0,  0);
        2: check_row("UTRA",   330, 0, -1, 4, 8, 256, 3, 320, 10);
        3: check_row("EDGE",   444, 1,  1, 4, 1,   1, 1,   0,  0);
        default: ;
      endcase
      @(negedge clk);
      check("restart one cycle", restart, 0);
    end

    // custom load
    @(negedge clk);
    cfg_in = preset_cfg(STD_IS136);
    cfg_in.burst_len = 12'd100;
    cfg_in.filter_num = FLT_RRC_022;
    load_custom = 1'b1;
    @(negedge clk);
    load_custom = 1'b0;
    check("custom burst", cfg.burst_len, 100);
    check("custom filter", cfg.filter_num, 3);
    check("custom restart", restart, 1);
    // without a load the register holds
    repeat (5) @(negedge clk);
    check("hold burst", cfg.burst_len, 100);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
