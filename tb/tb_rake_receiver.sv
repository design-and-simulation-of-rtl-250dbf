// tb_rake_receiver: builds a UTRA-FDD uplink chip stream here (DPDCH at SF 8 on I,
// DPCCH at SF 256 on Q, weighting, long-code scrambling), holds each chip for OSR
// samples and passes it through a three-path channel with complex gains. The rake,
// given the path delays and gains, must return every DPDCH and DPCCH symbol with the
// sign of the sent bit, and exactly the value of a reference computation of the
// combining, descrambling and despreading. A one-path run with a single finger
// (the other fingers' gains zero) is checked the same way. Each run starts with a new
// frame start while the previous run's tail is still in the delay line, which
// checks re-alignment.
module tb_rake_receiver;
  import sdr_pkg::*;
  import tb_ref_pkg::long_code;
  import tb_ref_pkg::ovsf;

  localparam int NF = 3;
  localparam int DM = 63;

  logic clk = 1'b0, rst_n = 1'b0;
  mod_cfg_t cfg;
  logic [5:0] finger_delay [NF];
  sample_t finger_gain_i [NF], finger_gain_q [NF];
  logic frame_start = 1'b0, in_valid = 1'b0;
  logic signed [OW-1:0] in_i = '0, in_q = '0;
  logic dpdch_valid, dpcch_valid;
  logic signed [31:0] dpdch, dpcch;
  int checks = 0, failures = 0;
  longint exp_d[$], exp_c[$];
  int sgn_d[$], sgn_c[$];

  always #5 clk = ~clk;

  rake_receiver #(.NFING(NF), .DMAX(DM)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && dpdch_valid) begin
      longint e; int sg;
      checks += 2;
      e = (exp_d.size() != 0) ? exp_d.pop_front() : 64'h7fffffff;
      sg = (sgn_d.size() != 0) ? sgn_d.pop_front() : 0;
      if (dpdch != e) begin failures++; if (failures < 10) $display("FAIL dpdch %0d exp %0d t=%0t q=%0d", dpdch, e, $time, exp_d.size()); end
      if ((dpdch > 0) != (sg > 0)) begin failures++; if (failures < 10) $display("FAIL dpdch sign"); end
    end
    if (rst_n && dpcch_valid) begin
      longint e; int sg;
      checks += 2;
      e = (exp_c.size() != 0) ? exp_c.pop_front() : 64'h7fffffff;
      sg = (sgn_c.size() != 0) ? sgn_c.pop_front() : 0;
      if (dpcch != e) begin failures++; if (failures < 10) $display("FAIL dpcch %0d exp %0d", dpcch, e); end
      if ((dpcch > 0) != (sg > 0)) begin failures++; if (failures < 10) $display("FAIL dpcch sign"); end
    end
  end

  // nchips chips of one slot; paths: delays d[], gains gi/gq (Q1.14)
  task automatic run(int nchips, int d[NF], int gi[NF], int gq[NF]);
    bit r1[], r2[];
    int di[$], dq[$], ci[$], cq[$];
    longint xi[$], xq[$];
    int nsmp;
    long_code(int'(cfg.scr_code), nchips, r1, r2);
    for (int s = 0; s < nchips / 8; s++) di.push_back($urandom_range(0, 1) ? 1 : -1);
    for (int s = 0; s < nchips / 256; s++) dq.push_back($urandom_range(0, 1) ? 1 : -1);
    // transmit chips: weights 15/16 and 8/16 of 4096, then scrambling
    for (int k = 0; k < nchips; k++) begin
      int wi, wq, a, b;
      wi = di[k / 8] * ovsf(8, int'(cfg.code_i), k % 8) * 3840;
      wq = dq[k / 256] * ovsf(256, int'(cfg.code_q), k % 256) * 2048;
      a = r1[k] ? -1 : 1;
      b = a * ((k % 2) ? -1 : 1) * (r2[k - k % 2] ? -1 : 1);
      ci.push_back(wi * a - wq * b);
      cq.push_back(wi * b + wq * a);
    end
    // channel: sum of delayed, rotated copies (samples held for OSR)
    nsmp = nchips * OSR + DM + OSR;
    for (int n = 0; n < nsmp; n++) begin
      longint si, sq;
      si = 0; sq = 0;
      for (int f = 0; f < NF; f++) begin
        int m;
        m = n - d[f];
        if (m >= 0 && m / OSR < nchips) begin
          si += (longint'(gi[f]) * ci[m / OSR] - longint'(gq[f]) * cq[m / OSR]);
          sq += (longint'(gi[f]) * cq[m / OSR] + longint'(gq[f]) * ci[m / OSR]);
        end
      end
      xi.push_back(si >>> 14);
      xq.push_back(sq >>> 14);
    end
    // reference receiver arithmetic: combine at sample k*OSR + DM per chip k
    begin
      longint sd, sc;
      sd = 0; sc = 0;
      for (int k = 0; k < nchips; k++) begin
        longint ai, aq, cbi, cbq, ei, eq;
        int a, b;
        ai = 0; aq = 0;
        for (int f = 0; f < NF; f++) begin
          int m;
          m = k * OSR + d[f];  // sample of path f for chip k
          ai += xi[m] * gi[f] + xq[m] * gq[f];
          aq += xq[m] * gi[f] - xi[m] * gq[f];
        end
        cbi = ai >>> 14; cbq = aq >>> 14;
        a = r1[k] ? -1 : 1;
        b = a * ((k % 2) ? -1 : 1) * (r2[k - k % 2] ? -1 : 1);
        ei = cbi * a + cbq * b;
        eq = cbq * a - cbi * b;
        sd += ei * ovsf(8, int'(cfg.code_i), k % 8);
        sc += eq * ovsf(256, int'(cfg.code_q), k % 256);
        if (k % 8 == 7) begin exp_d.push_back(sd); sgn_d.push_back(di[k / 8]); sd = 0; end
        if (k % 256 == 255) begin exp_c.push_back(sc); sgn_c.push_back(dq[k / 256]); sc = 0; end
      end
    end
    for (int f = 0; f < NF; f++) begin
      finger_delay[f] = 6'(d[f]);
      finger_gain_i[f] = 16'(gi[f]);
      finger_gain_q[f] = 16'(gq[f]);
    end
    foreach (xi[n]) begin
      @(negedge clk);
      in_valid = 1'b1;
      frame_start = (n == 0);
      in_i = OW'(xi[n]);
      in_q = OW'(xq[n]);
      if ($urandom_range(0, 5) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        frame_start = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    frame_start = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_d.size() != 0 || exp_c.size() != 0) begin
      failures++;
      $display("FAIL missing symbols: %0d dpdch %0d dpcch", exp_d.size(), exp_c.size());
    end
    exp_d = {}; exp_c = {}; sgn_d = {}; sgn_c = {};
  endtask

  initial begin
    cfg = preset_cfg(STD_UTRA_FDD);
    cfg.scr_code = 24'd77;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(2560, '{0, 5, 13}, '{12000, -5000, 3000}, '{4000, 6000, -2500});
    run(1024, '{2, 40, 63}, '{-9000, 2000, 1500}, '{-9000, -3000, 1000});
    run(768, '{7, 0, 0}, '{16384, 0, 0}, '{0, 0, 0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
