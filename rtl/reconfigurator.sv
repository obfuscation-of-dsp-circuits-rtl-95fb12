// reconfigurator: holds the operating mode and drives the switch settings.
//
// Configure data arriving from the obfuscating FSM is mapped to a mode by the
// combinational table obf_pkg::cfg_to_mode (several codes may share a mode) and
// stored. The stored mode is turned into the filter-order switch control and the
// reset states of the two ring counters (obf_pkg::mode_to_cfg). After reset the
// mode is obf_pkg::RESET_MODE, a non-meaningful mode, so the circuit is useless
// until the key and valid configure data have been applied. The tables are this
// design's.
//
// Timing: mode and reconfig update one cycle after cfg_valid; reconfig is a
// one-cycle pulse. cfg follows mode combinationally and shows the reset mode's
// settings while rst is high, so ring counters reset in the same cycle.
module reconfigurator
  import obf_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             cfg_valid,
  input  logic [CFG_W-1:0] cfg_data,
  output mode_t            mode,
  output recfg_t           cfg,
  output logic             reconfig
);

  always_ff @(posedge clk) begin
    if (rst) begin
      mode     <= RESET_MODE;
      reconfig <= 1'b0;
    end else begin
      reconfig <= cfg_valid;
      if (cfg_valid) mode <= cfg_to_mode(cfg_data);
    end
  end

  assign cfg = mode_to_cfg(rst ? RESET_MODE : mode);

endmodule
