// PSU state machine: interlocking and on/off control of the power converter.
//
// Three states: TRIPPED ("PC Tripped", the converter is shut down), OFF
// (ready, converter off) and ON (converter on, loop regulating). Out of reset
// the machine is TRIPPED. Any enabled interlock input, or a cleared Setting
// Up bit (parameters being changed or not yet loaded), sends every state to
// TRIPPED at once. A reset command leaves TRIPPED for OFF only when no
// enabled interlock is active and Setting Up is set; on and off commands move
// between OFF and ON.
//
// The 16 isolated interlock inputs are asynchronous to the clock and pass a
// two-flop synchroniser first; an input is active high and counts only where
// its mask bit is 1. The inputs that were active while tripping are latched
// in trip_cause until the next reset command is accepted.
//
// Digital outputs: [0] converter enable (ON), [1] tripped indication,
// [2] ready (OFF), [7:3] follow user_out from a communication register while
// the converter is not tripped.
//
// From the published description: interlocks from 16 isolated inputs, 8
// isolated outputs, the PC Tripped state and the Setting Up bit forcing it.
// The state set, the commands, the input polarity, the masking and the output
// assignment are this design's own choices (the original state machine was
// built in a model-based tool and is not published). Commands are one-clock
// pulses; the state changes on the clock after a command or one clock after
// a synchronised interlock edge.
module psu_state_machine
  import dpsc_pkg::*;
#(
  parameter int unsigned N_ILK  = ILK_N,
  parameter int unsigned N_DOUT = DOUT_N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_ILK-1:0]  ilk_in,       // isolated interlock inputs, asynchronous
  input  logic [N_ILK-1:0]  ilk_mask,     // 1 = input enabled as interlock
  input  logic              setting_up,   // parameters valid
  input  logic              cmd_on,
  input  logic              cmd_off,
  input  logic              cmd_reset,
  input  logic [N_DOUT-4:0] user_out,
  output psu_state_e        state,
  output logic              regulate,     // converter on, regulation enabled
  output logic [N_ILK-1:0]  ilk_sync,     // synchronised interlock inputs
  output logic [N_ILK-1:0]  trip_cause,
  output logic [N_DOUT-1:0] dig_out
);

  logic [N_ILK-1:0] ilk_meta;
  logic [N_ILK-1:0] ilk_active;
  logic             trip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ilk_meta <= '0;
      ilk_sync <= '0;
    end else begin
      ilk_meta <= ilk_in;
      ilk_sync <= ilk_meta;
    end
  end

  assign ilk_active = ilk_sync & ilk_mask;
  assign trip       = (|ilk_active) || !setting_up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_TRIPPED;
      trip_cause <= '0;
    end else begin
      if (trip) begin
        state      <= ST_TRIPPED;
        trip_cause <= trip_cause | ilk_active;
      end else begin
        unique case (state)
          ST_TRIPPED: if (cmd_reset) begin
            state      <= ST_OFF;
            trip_cause <= '0;
          end
          ST_OFF: if (cmd_on && !cmd_off) state <= ST_ON;
          ST_ON:  if (cmd_off)            state <= ST_OFF;
          default:                        state <= ST_TRIPPED;
        endcase
      end
    end
  end

  assign regulate = (state == ST_ON);

  always_comb begin
    dig_out      = '0;
    dig_out[0]   = (state == ST_ON);
    dig_out[1]   = (state == ST_TRIPPED);
    dig_out[2]   = (state == ST_OFF);
    if (state != ST_TRIPPED) dig_out[N_DOUT-1:3] = user_out;
  end

endmodule
