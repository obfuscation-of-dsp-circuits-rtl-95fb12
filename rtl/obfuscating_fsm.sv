// obfuscating_fsm: key checker in front of the reconfigurator.
//
// The configuration key is applied on key_in as a sequence of KEY_LEN words of
// KEY_W bits, one word per cycle with key_valid high, first word in the most
// significant position of KEY. Each matching word advances the FSM; a wrong word
// sends it back to the start, or to the second word when the wrong word equals
// the first key word, so that a new attempt may begin at any time. After the whole key matched (unlocked high)
// the next valid word is forwarded as configure data with a one-cycle cfg_valid
// pulse, and the FSM locks again. A wrong key therefore never reaches the
// reconfigurator, as the obfuscation scheme requires. Sequence length, word
// width and the key value are parameters; their defaults are this design's.
//
// Timing: cfg_valid/cfg_data are registered, one cycle after the configure word.
module obfuscating_fsm #(
  parameter int                      KEY_W   = 4,
  parameter int                      KEY_LEN = 4,
  parameter logic [KEY_W*KEY_LEN-1:0] KEY    = 16'hB29E
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             key_valid,
  input  logic [KEY_W-1:0] key_in,
  output logic             cfg_valid,
  output logic [KEY_W-1:0] cfg_data,
  output logic             unlocked
);

  localparam int IDX_W = (KEY_LEN > 1) ? $clog2(KEY_LEN) : 1;

  typedef enum logic {S_KEY, S_CFG} state_t;

  state_t           state;
  logic [IDX_W-1:0] idx;       // key word expected next
  logic [KEY_W-1:0] expected;
  logic [KEY_W-1:0] first;

  // word idx of the key, counted from the most significant end
  assign expected = KEY[(KEY_LEN - 1 - int'(idx)) * KEY_W +: KEY_W];
  assign first    = KEY[(KEY_LEN - 1) * KEY_W +: KEY_W];
  assign unlocked = (state == S_CFG);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_KEY;
      idx       <= '0;
      cfg_valid <= 1'b0;
      cfg_data  <= '0;
    end else begin
      cfg_valid <= 1'b0;
      if (key_valid) begin
        unique case (state)
          S_KEY: begin
            if (key_in == expected) begin
              if (int'(idx) == KEY_LEN - 1) begin
                state <= S_CFG;
                idx   <= '0;
              end else begin
                idx <= idx + 1'b1;
              end
            end else begin
              // a wrong word may itself be the first word of a new attempt
              idx <= (key_in == first) ? IDX_W'(1) : '0;
            end
          end
          S_CFG: begin
            cfg_valid <= 1'b1;
            cfg_data  <= key_in;
            state     <= S_KEY;
          end
        endcase
      end
    end
  end

endmodule
