// sdr_platform: top level of the partial SDR platform.
//
// Holds the parts of the transceiver that are built: the generalized modulator
// (transmitter), the 49-tap RRC receive filter that opens the UTRA-FDD receiver, and
// the channel-decoding end of that receiver: the K = 9 Viterbi decoder followed by
// the CRC check that decides whether a speech frame is kept or discarded.
// Between transmitter and receiver the platform places a channel simulator; it is
// not part of this RTL, so the transmit samples leave on tx_* and the receive filter
// takes its samples from rx_*. Connecting tx_i/tx_q to rx_i/rx_q (with rx_valid =
// tx_valid && tx_ready) gives an ideal channel. The filtered receive samples on
// rxf_* also feed the rake receiver, which despreads them with the current
// configuration (cfg) and gives soft DPDCH/DPCCH symbols on dpdch_*/dpcch_*; its
// frame timing, path delays and channel gains come in on rake_frame_start and
// finger_*. The stages between the rake and the decoder (control-bit removal,
// deinterleaving) are not built, so the code symbols enter the decoder on
// dec_sym_*. The decoded bits leave on dec_* and are also checked by the CRC
// checker, started with dec_start and told how many of the block's bits are data
// (crc_data_len).
// Timing: see gen_modulator (one sample per cycle at most), rx_rrc_filter (one
// cycle latency, one sample per cycle), rake_receiver, viterbi_decoder and
// crc_checker.
module sdr_platform
  import sdr_pkg::*;
#(
  parameter int unsigned BUF_DEPTH   = 640,
  parameter int unsigned FRAME_CHIPS = 38400,
  parameter int unsigned DEC_MAX_BITS = 512,
  parameter int unsigned RAKE_FINGERS = 3,
  parameter int unsigned RAKE_DMAX   = 63
) (
  input  logic     clk,
  input  logic     rst_n,
  // configuration
  input  logic     load_preset,
  input  std_t     std_sel,
  input  logic     load_custom,
  input  mod_cfg_t cfg_in,
  output mod_cfg_t cfg,
  // transmit bits
  input  logic     bit_valid,
  output logic     bit_ready,
  input  logic     bit_in,
  // transmit baseband samples (to the channel)
  output logic     tx_valid,
  input  logic     tx_ready,
  output logic signed [OW-1:0] tx_i,
  output logic signed [OW-1:0] tx_q,
  // receive baseband samples (from the channel)
  input  logic     rx_valid,
  input  logic signed [OW-1:0] rx_i,
  input  logic signed [OW-1:0] rx_q,
  // matched-filtered receive samples (to the rake receiver)
  output logic     rxf_valid,
  output logic signed [OW-1:0] rxf_i,
  output logic signed [OW-1:0] rxf_q,
  // rake receiver
  input  logic     rake_frame_start,
  input  logic [$clog2(RAKE_DMAX+1)-1:0] finger_delay [RAKE_FINGERS],
  input  sample_t  finger_gain_i [RAKE_FINGERS],
  input  sample_t  finger_gain_q [RAKE_FINGERS],
  output logic     dpdch_valid,
  output logic signed [31:0] dpdch,
  output logic     dpcch_valid,
  output logic signed [31:0] dpcch,
  // channel decoding (from the deinterleaver side)
  input  logic     dec_start,
  input  logic     dec_rate13,
  input  logic [$clog2(DEC_MAX_BITS+1)-1:0] dec_nbits,
  input  logic     dec_sym_valid,
  output logic     dec_sym_ready,
  input  logic [2:0] dec_sym,
  output logic     dec_valid,
  input  logic     dec_ready,
  output logic     dec_bit,
  output logic     dec_last,
  output logic     dec_busy,
  input  logic [9:0] crc_data_len,
  output logic     crc_done,
  output logic     crc_ok,
  output logic     frame_discard
);

  gen_modulator #(.BUF_DEPTH(BUF_DEPTH), .FRAME_CHIPS(FRAME_CHIPS)) u_tx (
    .clk, .rst_n, .load_preset, .std_sel, .load_custom, .cfg_in, .cfg,
    .bit_valid, .bit_ready, .bit_in,
    .smp_valid(tx_valid), .smp_ready(tx_ready), .smp_i(tx_i), .smp_q(tx_q)
  );

  rx_rrc_filter u_rx (
    .clk, .rst_n,
    .in_valid (rx_valid),  .in_i (rx_i),  .in_q (rx_q),
    .out_valid(rxf_valid), .out_i(rxf_i), .out_q(rxf_q)
  );

  rake_receiver #(.NFING(RAKE_FINGERS), .DMAX(RAKE_DMAX), .FRAME_CHIPS(FRAME_CHIPS)) u_rake (
    .clk, .rst_n, .cfg,
    .finger_delay, .finger_gain_i, .finger_gain_q,
    .frame_start(rake_frame_start),
    .in_valid   (rxf_valid), .in_i(rxf_i), .in_q(rxf_q),
    .dpdch_valid, .dpdch, .dpcch_valid, .dpcch
  );

  viterbi_decoder #(.MAX_BITS(DEC_MAX_BITS)) u_vit (
    .clk, .rst_n,
    .start    (dec_start),     .rate13  (dec_rate13), .n_bits(dec_nbits),
    .in_valid (dec_sym_valid), .in_ready(dec_sym_ready), .in_sym(dec_sym),
    .out_valid(dec_valid),     .out_ready(dec_ready),
    .out_bit  (dec_bit),       .out_last(dec_last),   .busy(dec_busy)
  );

  crc_checker u_crc (
    .clk, .rst_n,
    .start   (dec_start),
    .data_len(crc_data_len),
    .in_valid(dec_valid && dec_ready),
    .in_bit  (dec_bit),
    .done    (crc_done),
    .crc_ok  (crc_ok),
    .discard (frame_discard)
  );

endmodule
