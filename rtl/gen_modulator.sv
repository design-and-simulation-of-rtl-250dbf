// gen_modulator: the generalized (reconfigurable) modulator of the SDR platform.
//
// One linear I/Q transmit chain serves GSM, IS-136, EDGE and the UTRA-FDD uplink:
//   bits -> differential precoder -> NRZ coder -> bit-to-symbol mapper
//        -> OVSF spreader -> weighting + complex scrambling -> pulse-shaping FIR
// GMSK is produced in its linearised form (precoding, j^k rotation, C0 pulse), so it
// shares the chain with the PSK modes. Every stage is steered by the parameter record
// of mod_config: load_preset with std_sel selects one of the four standards' preset
// parameter sets, load_custom loads any other set from cfg_in. A load restarts all
// stages (burst counters, modulation memory, delay lines) one cycle later.
// Interface: bit input and sample output are valid/ready streams; the output gives
// OSR samples per symbol (per chip for UTRA-FDD). cfg shows the active parameters.
// Throughput is set by the pulse shaper, one sample per cycle, i.e. one chip every
// OSR cycles; in the dual-QPSK mode the input is held off while a burst is spread.
module gen_modulator
  import sdr_pkg::*;
#(
  parameter int unsigned BUF_DEPTH   = 640,
  parameter int unsigned FRAME_CHIPS = 38400
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load_preset,
  input  std_t     std_sel,
  input  logic     load_custom,
  input  mod_cfg_t cfg_in,
  output mod_cfg_t cfg,
  input  logic     bit_valid,
  output logic     bit_ready,
  input  logic     bit_in,
  output logic     smp_valid,
  input  logic     smp_ready,
  output logic signed [OW-1:0] smp_i,
  output logic signed [OW-1:0] smp_q
);

  logic restart;

  logic pc_valid, pc_ready, pc_bit;
  logic nz_valid, nz_ready;
  logic signed [1:0] nz_level;
  logic mi_valid, mi_ready, mq_valid, mq_ready;
  sample_t mi_data, mq_data;
  logic sp_valid, sp_ready;
  cplx_t sp_chip;
  logic ws_valid, ws_ready;
  cplx_t ws_chip;

  mod_config u_cfg (
    .clk, .rst_n, .load_preset, .std_sel, .load_custom, .cfg_in,
    .cfg, .restart
  );

  diff_precoder u_pre (
    .clk, .rst_n, .cfg, .restart,
    .in_valid (bit_valid), .in_ready (bit_ready), .in_bit (bit_in),
    .out_valid(pc_valid),  .out_ready(pc_ready),  .out_bit(pc_bit)
  );

  nrz_coder u_nrz (
    .clk, .rst_n, .cfg, .restart,
    .in_valid (pc_valid), .in_ready (pc_ready), .in_bit   (pc_bit),
    .out_valid(nz_valid), .out_ready(nz_ready), .out_level(nz_level)
  );

  symbol_mapper #(.BUF_DEPTH(BUF_DEPTH)) u_map (
    .clk, .rst_n, .cfg, .restart,
    .in_valid(nz_valid), .in_ready(nz_ready), .in_level(nz_level),
    .i_valid (mi_valid), .i_ready (mi_ready), .i_data  (mi_data),
    .q_valid (mq_valid), .q_ready (mq_ready), .q_data  (mq_data)
  );

  ovsf_spreader u_spr (
    .clk, .rst_n, .cfg, .restart,
    .i_valid  (mi_valid), .i_ready  (mi_ready), .i_data  (mi_data),
    .q_valid  (mq_valid), .q_ready  (mq_ready), .q_data  (mq_data),
    .out_valid(sp_valid), .out_ready(sp_ready), .out_chip(sp_chip)
  );

  weight_scrambler #(.FRAME_CHIPS(FRAME_CHIPS)) u_scr (
    .clk, .rst_n, .cfg, .restart,
    .in_valid (sp_valid), .in_ready (sp_ready), .in_chip (sp_chip),
    .out_valid(ws_valid), .out_ready(ws_ready), .out_chip(ws_chip)
  );

  pulse_shaper u_fir (
    .clk, .rst_n, .cfg, .restart,
    .in_valid (ws_valid),  .in_ready (ws_ready), .in_chip(ws_chip),
    .out_valid(smp_valid), .out_ready(smp_ready),
    .out_i    (smp_i),     .out_q    (smp_q)
  );

endmodule
