// main_control_block: two-level control FSM of the obfuscated image scaler.
//
// Level one is the obfuscating FSM, which checks the key and passes configure
// data on. Level two is the reconfigurator, which holds the mode and sets the
// reset states of two ring counters: one of length DEC_M that tells the
// decimator which samples to keep, and one of length ILV_L that drives the
// interleave switch of the interpolator. The filter-order control goes to the
// combined filter directly. On every reconfiguration the ring counters reload
// their reset states and sync_clr restarts the datapath, so data and switch
// schedules start aligned, exactly as after reset (this restart is this
// design's choice).
//
// Timing: the decimation ring steps on pix_adv, the interleave ring on out_adv;
// dec_strobe and ilv_sel are combinational from the ring states. sync_clr comes
// two cycles after the configure word.
module main_control_block
  import obf_pkg::*;
#(
  parameter int                       KEY_W   = 4,
  parameter int                       KEY_LEN = 4,
  parameter logic [KEY_W*KEY_LEN-1:0] KEY     = 16'hB29E
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             key_valid,
  input  logic [KEY_W-1:0] key_in,
  input  logic             pix_adv,
  input  logic             out_adv,
  output fir_sel_t         fir_sel,
  output logic             dec_strobe,
  output logic             ilv_sel,
  output logic             sync_clr
);

  logic             cfg_valid;
  logic [KEY_W-1:0] cfg_word;
  recfg_t           cfg;
  logic [$clog2(DEC_M)-1:0] dec_ctrl;
  logic [$clog2(ILV_L)-1:0] ilv_ctrl;

  obfuscating_fsm #(.KEY_W(KEY_W), .KEY_LEN(KEY_LEN), .KEY(KEY)) u_obf (
    .clk, .rst, .key_valid, .key_in,
    .cfg_valid, .cfg_data(cfg_word), .unlocked()
  );

  reconfigurator u_recfg (
    .clk, .rst, .cfg_valid, .cfg_data(CFG_W'(cfg_word)),
    .mode(), .cfg, .reconfig(sync_clr)
  );

  ring_counter #(.N(DEC_M)) u_dec_ring (
    .clk, .rst, .load(sync_clr), .rst_state(cfg.dec_state), .adv(pix_adv),
    .state(), .ctrl(dec_ctrl)
  );

  ring_counter #(.N(ILV_L)) u_ilv_ring (
    .clk, .rst, .load(sync_clr), .rst_state(cfg.ilv_state), .adv(out_adv),
    .state(), .ctrl(ilv_ctrl)
  );

  assign fir_sel    = cfg.fir_sel;
  assign dec_strobe = (dec_ctrl == '0);
  assign ilv_sel    = ilv_ctrl[0];

endmodule
