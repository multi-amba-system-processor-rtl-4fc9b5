// bridge_fsm: state machine of the multiprocessor interface.
//
// It decides in which cycles the APB-side and AHB-side outputs of the
// interface are active. Current and next state are 3-bit values; the next
// state is formed from the current state, `accept` (a valid AHB address phase
// addressed to this interface), HWRITE of that address phase and reg_write,
// the HWRITE registered when the transfer was accepted. That much follows the
// design description; the state set and the transitions are this design's own.
//
// Every transfer has a three-cycle AHB data phase (two wait states):
//   write: ST_WWAIT (HWDATA captured) -> ST_SETUP -> ST_ENABLE (HREADYOUT high)
//   read : ST_SETUP -> ST_ENABLE (PRDATA captured) -> ST_RDONE (HREADYOUT high)
// In the cycle where HREADYOUT is high the next transfer may already be
// accepted, so back-to-back transfers run without an idle cycle.
module bridge_fsm
  import amba_pkg::*;
(
  input  logic    HCLK,
  input  logic    HRESETn,     // asynchronous, active low
  input  logic    accept,      // HSEL & HREADYIN & HTRANS is NONSEQ or SEQ
  input  logic    HWRITE,      // direction of the address phase being accepted
  input  logic    reg_write,   // direction of the transfer now in progress
  output bstate_e state,       // current state
  output bstate_e next_state
);

  // Where an accepted transfer starts: writes wait one cycle for HWDATA.
  bstate_e start_state;
  assign start_state = HWRITE ? ST_WWAIT : ST_SETUP;

  always_comb begin
    next_state = state;
    unique case (state)
      ST_IDLE:   next_state = accept ? start_state : ST_IDLE;
      ST_WWAIT:  next_state = ST_SETUP;
      ST_SETUP:  next_state = ST_ENABLE;
      ST_ENABLE: begin
        if (!reg_write)  next_state = ST_RDONE;
        else if (accept) next_state = start_state;
        else             next_state = ST_IDLE;
      end
      ST_RDONE:  next_state = accept ? start_state : ST_IDLE;
      default:   next_state = ST_IDLE;
    endcase
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) state <= ST_IDLE;
    else          state <= next_state;
  end

endmodule
