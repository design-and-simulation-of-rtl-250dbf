// tb_sdr_platform: end-to-end test of the platform top at its default parameters.
// The transmit output is looped back into the receive filter (an ideal channel).
// The modulator is taken through the four standard presets (GSM, IS-136, UTRA-FDD
// over more than one 10 ms scrambling frame, EDGE) and two custom settings (QPSK;
// GMSK with NRZ off), with mode switches between them and random transmit
// back-pressure in some runs. Every transmit sample is compared with the reference
// chain model, and every receive-filter output with a convolution of the looped-back
// samples with the RRC taps. Each mechanism of the design is counted and must occur:
// mode switches, burst starts of the precoder, each NRZ setting, each modulation
// number, each filter number, spreading, scrambling, a scrambling-frame restart,
// output stalls and the input hold-off of the dual-QPSK buffer. The decoding end
// In the UTRA-FDD runs the rake receiver (one finger on the direct path) despreads
// the looped-back, matched-filtered samples, and every DPDCH and DPCCH symbol must
// carry the sign of the bit that was sent on it. A last UTRA-FDD run adds a second
// path (an echo two chips later at half amplitude) and a second finger on it. The decoding end
// of the receiver is driven with convolutionally coded speech blocks (data + 12-bit
// CRC, rate 1/3 and 1/2, with channel bit errors): the decoded bits must equal the
// sent ones, and the CRC check must keep good frames and discard a corrupted one.
module tb_sdr_platform;
  import sdr_pkg::*;
  import tb_ref_pkg::chain_model;
  import tb_ref_pkg::rrc_taps;
  import tb_ref_pkg::rnd_sat;
  import tb_ref_pkg::conv_encode;
  import tb_ref_pkg::add_crc12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_preset = 1'b0, load_custom = 1'b0;
  std_t std_sel = STD_GSM;
  mod_cfg_t cfg_in = '0, cfg;
  logic bit_valid = 1'b0, bit_ready, bit_in = 1'b0;
  logic tx_valid, tx_ready;
  logic signed [OW-1:0] tx_i, tx_q;
  logic rx_valid;
  logic signed [OW-1:0] rx_i, rx_q;
  logic rxf_valid;
  logic signed [OW-1:0] rxf_i, rxf_q;
  logic dec_start = 1'b0, dec_rate13 = 1'b0;
  logic [9:0] dec_nbits = '0;
  logic dec_sym_valid = 1'b0, dec_sym_ready;
  logic [2:0] dec_sym = '0;
  logic rake_frame_start;
  logic [5:0] finger_delay [3];
  sample_t finger_gain_i [3], finger_gain_q [3];
  logic dpdch_valid, dpcch_valid;
  logic signed [31:0] dpdch, dpcch;
  bit rk_on = 1'b0, rk_live = 1'b0;
  int rk_cnt = 0;
  bit rk_d[$], rk_c[$];
  logic dec_valid, dec_ready = 1'b1, dec_bit, dec_last, dec_busy;
  logic [9:0] crc_data_len = '0;
  logic crc_done, crc_ok, frame_discard;
  bit last_ok, last_discard;
  int crc_seen = 0;
  always @(posedge clk) if (crc_done) begin
    last_ok <= crc_ok;
    last_discard <= frame_discard;
    crc_seen <= crc_seen + 1;
  end

  int checks = 0, failures = 0;
  longint exp_i[$], exp_q[$];
  longint hist_i[$], hist_q[$], rexp_i[$], rexp_q[$];
  logic [15:0] coef[147];
  int h[49];
  bit bp = 1'b0;

  typedef enum int {
    EV_SWITCH, EV_BURST, EV_NRZ_P, EV_NRZ_M, EV_NRZ_0, EV_GMSK, EV_DQPSK, EV_QPSK,
    EV_8PSK, EV_DUAL, EV_FLT1, EV_FLT2, EV_FLT3, EV_SPREAD, EV_SCRAMBLE, EV_FRAME,
    EV_STALL, EV_HOLDOFF, EV_RAKE_D, EV_RAKE_C, EV_RAKE_MP, EV_VIT_FIX, EV_CRC_OK, EV_DISCARD, EV_N
  } ev_t;
  int ev[EV_N];
  string ev_name[EV_N] = '{"mode switch", "precoder burst start", "NRZ +1", "NRZ -1",
    "NRZ 0", "GMSK", "pi/4-DQPSK", "QPSK", "8PSK", "dual QPSK", "filter 1", "filter 2",
    "filter 3", "spreading", "scrambling", "scrambling frame restart", "output stall",
    "input hold-off", "rake DPDCH symbol", "rake DPCCH symbol", "rake two-path symbol",
    "Viterbi error correction", "CRC frame kept", "CRC frame discarded"};

  always #5 clk = ~clk;

  sdr_platform dut (.*);

  // ideal channel
  assign rx_valid = tx_valid && tx_ready;
  // with mp set, a second path 8 samples (2 chips) later at half amplitude
  bit mp = 1'b0;
  real mag[2] = '{0.0, 0.0};
  int nmag[2] = '{0, 0};
  logic signed [OW-1:0] dly_i [8], dly_q [8];
  always @(posedge clk)
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) begin dly_i[k] <= '0; dly_q[k] <= '0; end
    end else if (rx_valid) begin
      dly_i[0] <= tx_i;
      dly_q[0] <= tx_q;
      for (int k = 1; k < 8; k++) begin dly_i[k] <= dly_i[k-1]; dly_q[k] <= dly_q[k-1]; end
    end
  assign rx_i = mp ? tx_i + (dly_i[7] >>> 1) : tx_i;
  assign rx_q = mp ? tx_q + (dly_q[7] >>> 1) : tx_q;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rake: chip 0 of a UTRA burst peaks at transmit sample 24 (transmit filter
  // centre) and at receive-filter output 48 (plus the receive filter centre).
  assign rake_frame_start = rk_on && (rk_cnt == 48);
  always @(posedge clk) if (rst_n) begin
    // symbols count once the rake has taken this burst's frame start
    if (rxf_valid && rk_on) rk_cnt <= rk_cnt + 1;
    if (rxf_valid && rake_frame_start) rk_live <= 1'b1;
    if (dpdch_valid && rk_live) begin
      checks++;
      if (rk_d.size() == 0 || (dpdch > 0) != rk_d[0]) begin
        failures++;
        if (failures < 10) $display("FAIL rake DPDCH symbol %0d (left %0d)", dpdch, rk_d.size());
      end else begin
        ev[EV_RAKE_D]++;
        if (mp) ev[EV_RAKE_MP]++;
        mag[mp] += real'(dpdch > 0 ? dpdch : -dpdch);
        nmag[mp]++;
      end
      if (rk_d.size() != 0) void'(rk_d.pop_front());
    end
    if (dpcch_valid && rk_live) begin
      checks++;
      if (rk_c.size() == 0 || (dpcch > 0) != rk_c[0]) begin
        failures++;
        if (failures < 10) $display("FAIL rake DPCCH symbol %0d (left %0d)", dpcch, rk_c.size());
      end else begin
        ev[EV_RAKE_C]++;
        if (mp) ev[EV_RAKE_MP]++;
      end
      if (rk_c.size() != 0) void'(rk_c.pop_front());
    end
  end

  always @(negedge clk) tx_ready <= bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (tx_valid && !tx_ready) ev[EV_STALL]++;
    if (bit_valid && !bit_ready && dut.u_tx.u_map.draining) ev[EV_HOLDOFF]++;
    if (dut.u_tx.u_pre.in_valid && dut.u_tx.u_pre.in_ready) begin
      if (dut.u_tx.u_pre.cnt == '0 && cfg.precoder_on) ev[EV_BURST]++;
      case (cfg.nrz)
        NRZ_PLUS: ev[EV_NRZ_P]++;
        NRZ_MINUS: ev[EV_NRZ_M]++;
        default: ev[EV_NRZ_0]++;
      endcase
    end
    if (dut.u_tx.u_scr.in_valid && dut.u_tx.u_scr.in_ready) begin
      if (cfg.scramble_on) ev[EV_SCRAMBLE]++;
      if (cfg.scramble_on && dut.u_tx.u_scr.wrap) ev[EV_FRAME]++;
      if (cfg.sf_i_log2 != 0) ev[EV_SPREAD]++;
    end
    if (tx_valid && tx_ready) begin
      longint ei, eq, si, sq;
      case (cfg.mod_num)
        MOD_GMSK: ev[EV_GMSK]++;
        MOD_PI4DQPSK: ev[EV_DQPSK]++;
        MOD_QPSK: ev[EV_QPSK]++;
        default: if (cfg.i_len != 0) ev[EV_DUAL]++; else ev[EV_8PSK]++;
      endcase
      case (cfg.filter_num)
        FLT_GMSK_C0: ev[EV_FLT1]++;
        FLT_RRC_035: ev[EV_FLT2]++;
        default: ev[EV_FLT3]++;
      endcase
      checks++;
      ei = (exp_i.size() != 0) ? exp_i.pop_front() : 999999;
      eq = (exp_q.size() != 0) ? exp_q.pop_front() : 999999;
      if (tx_i != ei || tx_q != eq) begin
        failures++;
        if (failures < 10) $display("FAIL tx sample: got %0d,%0d exp %0d,%0d", tx_i, tx_q, ei, eq);
      end
      // receive filter reference
      hist_i.push_front(rx_i);
      hist_q.push_front(rx_q);
      if (hist_i.size() > 49) begin void'(hist_i.pop_back()); void'(hist_q.pop_back()); end
      si = 0; sq = 0;
      for (int k = 0; k < hist_i.size(); k++) begin
        si += longint'(h[k]) * hist_i[k];
        sq += longint'(h[k]) * hist_q[k];
      end
      rexp_i.push_back(rnd_sat(si, 16, OW));
      rexp_q.push_back(rnd_sat(sq, 16, OW));
    end
    if (rxf_valid) begin
      longint ei, eq;
      checks++;
      ei = (rexp_i.size() != 0) ? rexp_i.pop_front() : 999999;
      eq = (rexp_q.size() != 0) ? rexp_q.pop_front() : 999999;
      if (rxf_i > ei + 2 || rxf_i < ei - 2 || rxf_q > eq + 2 || rxf_q < eq - 2) begin
        failures++;
        if (failures < 10) $display("FAIL rx sample: got %0d,%0d exp %0d,%0d", rxf_i, rxf_q, ei, eq);
      end
    end
  end

  // One coded speech block through Viterbi decoder and CRC check.
  task automatic decode(bit r13, int ndata, int nerr, bit corrupt);
    bit d[$], got[$];
    logic [2:0] sym[$];
    int n, seen0;
    seen0 = crc_seen;
    for (int k = 0; k < ndata; k++) d.push_back(1'($urandom));
    add_crc12(d);
    if (corrupt) d[3] = !d[3];          // the sent frame no longer matches its CRC
    n = d.size();
    conv_encode(d, r13, sym);
    for (int e = 0; e < nerr; e++) begin
      logic [2:0] t;
      t = sym[12 + 30 * e];
      t[0] = !t[0];
      sym[12 + 30 * e] = t;
    end
    @(negedge clk);
    dec_start = 1'b1; dec_rate13 = r13; dec_nbits = 10'(n); crc_data_len = 10'(ndata);
    @(negedge clk);
    dec_start = 1'b0;
    foreach (sym[k]) begin
      dec_sym_valid = 1'b1;
      dec_sym = sym[k];
      @(posedge clk);
      while (!dec_sym_ready) @(posedge clk);
      #1;
    end
    dec_sym_valid = 1'b0;
    while (crc_seen == seen0) begin
      @(posedge clk);
      if (dec_valid && dec_ready) got.push_back(dec_bit);
    end
    #1;
    checks++;
    if (got != d) begin
      failures++;
      $display("FAIL decoded block differs (rate13=%0b)", r13);
    end else if (nerr > 0) ev[EV_VIT_FIX]++;
    checks++;
    if (last_ok == corrupt || last_discard != corrupt) begin
      failures++;
      $display("FAIL CRC verdict ok=%0b discard=%0b corrupt=%0b", last_ok, last_discard, corrupt);
    end
    if (last_ok) ev[EV_CRC_OK]++;
    if (last_discard) ev[EV_DISCARD]++;
    @(negedge clk);
    while (dec_busy) @(negedge clk);
  endtask

  task automatic run(bit custom, std_t s, mod_cfg_t c, int nbursts, bit with_bp);
    bit bits[$];
    @(negedge clk);
    if (custom) begin
      cfg_in = c; load_custom = 1'b1;
    end else begin
      std_sel = s; load_preset = 1'b1;
    end
    ev[EV_SWITCH]++;
    @(negedge clk);
    load_preset = 1'b0; load_custom = 1'b0;
    for (int k = 0; k < nbursts * int'(cfg.burst_len); k++) bits.push_back(1'($urandom));
    chain_model(cfg, bits, coef, exp_i, exp_q);
    // rake expectations: with NRZ -1 a sent 1 gives a positive symbol
    rk_on = cfg.scramble_on && cfg.mod_num == MOD_DUAL && cfg.i_len != 0;
    rk_cnt = 0;
    rk_live = 1'b0;
    if (rk_on)
      foreach (bits[k]) begin
        int p;
        p = k % int'(cfg.burst_len);
        if (p < int'(cfg.i_len)) rk_d.push_back(bits[k]);
        else if (p < int'(cfg.i_len + cfg.q_len)) rk_c.push_back(bits[k]);
      end
    bp = with_bp;
    foreach (bits[k]) begin
      bit_valid = 1'b1;
      bit_in = bits[k];
      @(posedge clk);
      while (!bit_ready) @(posedge clk);
      #1;
    end
    bit_valid = 1'b0;
    while (exp_i.size() != 0) @(negedge clk);
    bp = 1'b0;
    repeat (60) @(negedge clk);
    // the last chips stay in the rake's delay line (DMAX + 48 samples behind)
    if (rk_on) begin
      checks++;
      if (rk_d.size() > 4 || rk_c.size() > 1) begin
        failures++;
        $display("FAIL rake symbols missing: %0d DPDCH, %0d DPCCH", rk_d.size(), rk_c.size());
      end
    end
    rk_on = 1'b0;
    rk_live = 1'b0;
    rk_d = {};
    rk_c = {};
  endtask

  initial begin
    mod_cfg_t c;
    $readmemh("rtl/pulse_coeffs.hex", coef);
    rrc_taps(0.22, h);
    for (int f = 0; f < 3; f++) begin
      finger_delay[f] = '0;
      finger_gain_i[f] = (f == 0) ? 16'sd16384 : 16'sd0;
      finger_gain_q[f] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1'b0, STD_GSM, '0, 4, 1'b0);
    run(1'b0, STD_IS136, '0, 3, 1'b1);
    run(1'b0, STD_UTRA_FDD, '0, 16, 1'b0);
    run(1'b0, STD_EDGE, '0, 3, 1'b1);
    c = preset_cfg(STD_IS136);
    c.mod_num = MOD_QPSK;
    run(1'b1, STD_GSM, c, 2, 1'b0);
    c = preset_cfg(STD_GSM);
    c.nrz = NRZ_OFF;
    run(1'b1, STD_GSM, c, 1, 1'b1);
    run(1'b0, STD_UTRA_FDD, '0, 1, 1'b1);
    // two-path channel, second finger on the echo
    mp = 1'b1;
    finger_delay[1] = 6'd8;
    finger_gain_i[1] = 16'sd8192;
    run(1'b0, STD_UTRA_FDD, '0, 2, 1'b0);
    mp = 1'b0;
    finger_gain_i[1] = '0;
    // combining the echo (amplitude 1/2, finger weight 1/2) adds a quarter
    checks++;
    if (nmag[0] == 0 || nmag[1] == 0 ||
        mag[1] / nmag[1] < 1.15 * mag[0] / nmag[0] || mag[1] / nmag[1] > 1.35 * mag[0] / nmag[0]) begin
      failures++;
      $display("FAIL two-path combining gain: %f vs %f", mag[1] / nmag[1], mag[0] / nmag[0]);
    end else
      $display("two-path DPDCH magnitude %0.0f, one path %0.0f", mag[1] / nmag[1], mag[0] / nmag[0]);
    decode(1'b1, 81, 4, 1'b0);
    decode(1'b0, 103, 3, 1'b0);
    decode(1'b1, 60, 2, 1'b1);
    for (int e = 0; e < EV_N; e++) begin
      checks++;
      $display("mechanism %-26s : %0d", ev_name[e], ev[e]);
      if (ev[e] == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", ev_name[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
