// obf_pkg: types, constants and mode tables shared by the obfuscated image scaler.
//
// The scaler has one functional mode and several obfuscated modes. A mode is a
// setting of three switches: the filter-order switch in the combined filter, and
// the reset states of two ring counters that drive the periodic decimation and
// interleave switches. Configure data (a CFG_W-bit word accepted only after the
// key) is mapped to a mode by a small combinational table in which several codes
// may give the same mode. The split into meaningful-but-wrong modes (other filter
// orders, other switch schedules) and a non-meaningful mode follows the obfuscation
// scheme; the concrete table, coefficients and widths are this design's choices.
package obf_pkg;

  localparam int PIX_W     = 8;                  // bits per pixel
  localparam int LINE_BITS = 256;                // one image line word
  localparam int LINE_PIX  = LINE_BITS / PIX_W;  // pixels per line word
  localparam int NTAPS     = 10;                 // register-bank stages
  localparam int DEC_M     = 2;                  // decimation factor (ring length)
  localparam int ILV_L     = 2;                  // interpolation factor (ring length)
  localparam int CFG_W     = 4;                  // configure-data width
  localparam int COEF_W    = 6;                  // signed coefficient width
  localparam int COEF_SH   = 5;                  // coefficients sum to 2**COEF_SH
  localparam int NFIR      = 5;                  // connections of the filter-order switch

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Operating modes.
  typedef enum logic [2:0] {
    MODE_FUNC     = 3'd0,  // correct: 10-tap low-pass, decimate by 2, interleave
    MODE_ORD6     = 3'd1,  // meaningful, 6-tap filter
    MODE_ORD4     = 3'd2,  // meaningful, 4-tap filter
    MODE_ORD2     = 3'd3,  // meaningful, 2-tap filter
    MODE_NEAREST  = 3'd4,  // meaningful, interleave switch stuck on the original pixel
    MODE_SWAP     = 3'd5,  // meaningful, odd decimation phase and swapped interleave
    MODE_SCRAMBLE = 3'd6   // non-meaningful: high-pass taps, no decimation
  } mode_t;

  localparam mode_t RESET_MODE = MODE_SCRAMBLE;

  // Connections of the filter-order switch.
  typedef enum logic [2:0] {
    FIR10  = 3'd0,
    FIR6   = 3'd1,
    FIR4   = 3'd2,
    FIR2   = 3'd3,
    FIRSCR = 3'd4
  } fir_sel_t;

  // What the reconfigurator drives.
  typedef struct packed {
    fir_sel_t         fir_sel;    // static filter-order switch control
    logic [DEC_M-1:0] dec_state;  // reset state of the decimation ring counter
    logic [ILV_L-1:0] ilv_state;  // reset state of the interleave ring counter
  } recfg_t;

  // Configure data -> mode. Two codes (5 and A) reach the functional mode.
  function automatic mode_t cfg_to_mode(input logic [CFG_W-1:0] cfg);
    unique case (cfg)
      4'h5, 4'hA:        return MODE_FUNC;
      4'h4, 4'hC:        return MODE_ORD6;
      4'h2, 4'h7:        return MODE_ORD4;
      4'h1, 4'h9, 4'hE:  return MODE_ORD2;
      4'h3, 4'h8:        return MODE_NEAREST;
      4'hD:              return MODE_SWAP;
      default:           return MODE_SCRAMBLE;  // 0, 6, B, F
    endcase
  endfunction

  // Mode -> switch settings.
  function automatic recfg_t mode_to_cfg(input mode_t m);
    recfg_t r;
    r.fir_sel   = FIR10;
    r.dec_state = 2'b01;
    r.ilv_state = 2'b01;
    unique case (m)
      MODE_FUNC:     ;
      MODE_ORD6:     r.fir_sel = FIR6;
      MODE_ORD4:     r.fir_sel = FIR4;
      MODE_ORD2:     r.fir_sel = FIR2;
      MODE_NEAREST:  r.ilv_state = 2'b11;
      MODE_SWAP:     begin r.dec_state = 2'b10; r.ilv_state = 2'b10; end
      default:       begin r.fir_sel = FIRSCR; r.dec_state = 2'b11; r.ilv_state = 2'b10; end
    endcase
    return r;
  endfunction

  // Coefficient k of filter connection s (zero beyond the filter's order).
  // Low-pass sets are symmetric and sum to 32; FIRSCR alternates sign (high-pass).
  function automatic coef_t fir_coef(input fir_sel_t s, input int k);
    coef_t c;
    c = '0;
    unique case (s)
      FIR10: case (k) 0,9: c = 6'sd1; 1,8: c = 6'sd2; 2,7: c = 6'sd3;
                      3,6: c = 6'sd4; 4,5: c = 6'sd6; default: c = '0; endcase
      FIR6:  case (k) 0,5: c = 6'sd2; 1,4: c = 6'sd4; 2,3: c = 6'sd10; default: c = '0; endcase
      FIR4:  case (k) 0,3: c = 6'sd4; 1,2: c = 6'sd12; default: c = '0; endcase
      FIR2:  case (k) 0,1: c = 6'sd16; default: c = '0; endcase
      default: case (k) 0: c = 6'sd1;  1: c = -6'sd2; 2: c = 6'sd3;  3: c = -6'sd4;
                        4: c = 6'sd6;  5: c = -6'sd6; 6: c = 6'sd4;  7: c = -6'sd3;
                        8: c = 6'sd2;  9: c = -6'sd1; default: c = '0; endcase
    endcase
    return c;
  endfunction

endpackage
