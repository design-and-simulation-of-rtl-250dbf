// mod_config: parameter register of the generalized modulator.
//
// Holds the mod_cfg_t record that steers every stage of the modulator. A one-cycle
// pulse on load_preset loads the preset of the standard on std_sel (GSM, IS-136,
// UTRA-FDD or EDGE, taken from the published parameterisation table); a pulse on
// load_custom loads cfg_in as given, for settings outside the table. Either load
// raises `restart` for exactly one cycle in the following cycle, which the stages use
// to clear their burst counters, modulation memory and delay lines, so a mode switch
// always starts on a clean burst. After reset the GSM preset is active.
// Timing: cfg changes one cycle after the load pulse, restart is high in that same
// cycle. load_preset wins if both loads are given together (own choice).
module mod_config
  import sdr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load_preset,
  input  std_t     std_sel,
  input  logic     load_custom,
  input  mod_cfg_t cfg_in,
  output mod_cfg_t cfg,
  output logic     restart
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg     <= preset_cfg(STD_GSM);
      restart <= 1'b1;
    end else begin
      restart <= load_preset | load_custom;
      if (load_preset)      cfg <= preset_cfg(std_sel);
      else if (load_custom) cfg <= cfg_in;
    end
  end

endmodule
