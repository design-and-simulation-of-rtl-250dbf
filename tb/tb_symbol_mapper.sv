// tb_symbol_mapper: drives random NRZ levels in bursts through the mapper in every
// modulation mode (GMSK with its j^k rotation, pi/4-DQPSK with its phase memory,
// QPSK, 8PSK and the dual-QPSK branch split of the UTRA-FDD uplink) and compares
// both output branches with symbol points computed from real cos/sin. The two
// branches are drained with independent random back-pressure.
module tb_symbol_mapper;
  import sdr_pkg::*;
  import tb_ref_pkg::pt_i;
  import tb_ref_pkg::pt_q;

  logic clk = 1'b0, rst_n = 1'b0;
  mod_cfg_t cfg;
  logic restart = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [1:0] in_level = '0;
  logic i_valid, i_ready, q_valid, q_ready;
  sample_t i_data, q_data;
  int checks = 0, failures = 0;
  int exp_i[$], exp_q[$];

  always #5 clk = ~clk;

  symbol_mapper dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    i_ready <= ($urandom_range(0, 2) != 0);
    q_ready <= ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && i_valid && i_ready) begin
      int e;
      checks++;
      e = (exp_i.size() != 0) ? exp_i.pop_front() : 99999;
      if (int'(i_data) != e) begin
        failures++;
        $display("FAIL I: got %0d exp %0d (mode %0d)", i_data, e, cfg.mod_num);
      end
    end
    if (rst_n && q_valid && q_ready) begin
      int e;
      checks++;
      e = (exp_q.size() != 0) ? exp_q.pop_front() : 99999;
      if (int'(q_data) != e) begin
        failures++;
        $display("FAIL Q: got %0d exp %0d (mode %0d)", q_data, e, cfg.mod_num);
      end
    end
  end

  task automatic send(int lv);
    in_valid = 1'b1;
    in_level = 2'(lv);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic setup(mod_cfg_t c);
    @(negedge clk);
    cfg = c;
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
  endtask

  task automatic drain();
    while (exp_i.size() != 0 || exp_q.size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  // levels: +1/-1 with NRZ on; bit = 1 for level -1
  function automatic int rnd_level();
    return $urandom_range(0, 1) ? 1 : -1;
  endfunction

  task automatic run_gmsk(int blen, int nb, bit nrz_off);
    mod_cfg_t c;
    c = preset_cfg(STD_GSM);
    c.burst_len = BLW'(blen);
    if (nrz_off) c.nrz = NRZ_OFF;
    setup(c);
    for (int b = 0; b < nb; b++)
      for (int k = 0; k < blen; k++) begin
        int d;
        d = nrz_off ? int'($urandom_range(0, 1)) : rnd_level();
        exp_i.push_back(d * pt_i(4 * k));
        exp_q.push_back(d * pt_q(4 * k));
        send(d);
      end
    drain();
  endtask

  task automatic run_2bit(mod_num_t m, int blen, int nb);
    mod_cfg_t c;
    int ph;
    c = preset_cfg(STD_IS136);
    c.mod_num = m;
    c.burst_len = BLW'(blen);
    setup(c);
    for (int b = 0; b < nb; b++) begin
      ph = 0;
      for (int k = 0; k < blen / 2; k++) begin
        int d0, d1;
        bit b0, b1;
        d0 = rnd_level(); d1 = rnd_level();
        b0 = (d0 < 0); b1 = (d1 < 0);
        if (m == MOD_PI4DQPSK) begin
          // +pi/4, +3pi/4, -3pi/4, -pi/4 for 00, 01, 11, 10
          ph += (!b0 && !b1) ? 2 : (!b0 && b1) ? 6 : (b0 && b1) ? -6 : -2;
          exp_i.push_back(pt_i(ph));
          exp_q.push_back(pt_q(ph));
        end else begin
          exp_i.push_back(b0 ? -pt_i(2) : pt_i(2));
          exp_q.push_back(b1 ? -pt_q(2) : pt_q(2));
        end
        send(d0);
        send(d1);
      end
    end
    drain();
  endtask

  task automatic run_8psk(int nb);
    mod_cfg_t c;
    // Gray order of the symbol index l = 0..7
    int gray[8] = '{7, 3, 2, 0, 1, 5, 4, 6};
    c = preset_cfg(STD_EDGE);
    setup(c);
    for (int b = 0; b < nb; b++)
      for (int k = 0; k < 148; k++) begin
        int v, l;
        v = $urandom_range(0, 7);
        for (int n = 0; n < 8; n++) if (gray[n] == v) l = n;
        exp_i.push_back(pt_i(2 * l));
        exp_q.push_back(pt_q(2 * l));
        send(v[2] ? -1 : 1);
        send(v[1] ? -1 : 1);
        send(v[0] ? -1 : 1);
      end
    drain();
  endtask

  task automatic run_dual(int il, int ql, int nb);
    mod_cfg_t c;
    c = preset_cfg(STD_UTRA_FDD);
    c.i_len = BLW'(il);
    c.q_len = BLW'(ql);
    c.burst_len = BLW'(il + ql);
    setup(c);
    for (int b = 0; b < nb; b++) begin
      for (int k = 0; k < il + ql; k++) begin
        int d;
        d = rnd_level();
        if (k < il) exp_i.push_back(d * 4096);
        else        exp_q.push_back(d * 4096);
        send(d);
      end
    end
    drain();
  endtask

  initial begin
    cfg = preset_cfg(STD_GSM);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_gmsk(148, 2, 1'b0);
    run_gmsk(20, 3, 1'b1);
    run_2bit(MOD_PI4DQPSK, 312, 2);
    run_2bit(MOD_QPSK, 40, 3);
    run_8psk(2);
    run_dual(320, 10, 2);
    run_dual(640, 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
