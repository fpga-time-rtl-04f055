// display_fsm: the call state machine (IDLE, CALLING, INCOMING, CONNECTED).
//
// Runs at 50 MHz, the clock of the received action header. The received
// action is decoded as in the described design:
//   accepted = CALL_DATA or ACCEPT_CALL, denied = DENY_CALL,
//   incoming = START_CALL, ended = IDLE_ACT,
// but only on the clock on which a packet arrives (action_valid_in), so an
// action held over from an older packet cannot act twice.
// Transitions:
//   IDLE      -> INCOMING  on incoming (takes priority over the button)
//   IDLE      -> CALLING   on initiates_in
//   CALLING   -> CONNECTED on accepted;  CALLING  -> IDLE on denied
//   INCOMING  -> CONNECTED on accept_in; INCOMING -> IDLE on deny_in
//   INCOMING  -> IDLE      on ended (the caller is idle again)
//   CONNECTED -> IDLE      on ends_in or ended
// Buttons are active-high, already debounced levels. Reset gives IDLE.
// The state names, the decoding and all transitions but one are the
// described design's. This design adds INCOMING -> IDLE on ended: a caller
// that was denied, or gave up, would otherwise leave the callee ringing for
// good, because START_CALL packets still in flight after a deny put the
// callee back into INCOMING. The packet gating, the priority order and the
// state encoding are also this design's.
module display_fsm
  import fpga_time_pkg::*;
(
  input  logic        clk_50mhz,
  input  logic        reset_in,
  input  logic [3:0]  action_in,
  input  logic        action_valid_in,
  input  logic        deny_in,
  input  logic        accept_in,
  input  logic        initiates_in,
  input  logic        ends_in,
  output call_state_t fsm_state
);

  logic accepted, denied, incoming, ended;
  call_state_t next_state;

  assign accepted = action_valid_in && ((action_in == CALL_DATA) || (action_in == ACCEPT_CALL));
  assign denied   = action_valid_in && (action_in == DENY_CALL);
  assign incoming = action_valid_in && (action_in == START_CALL);
  assign ended    = action_valid_in && (action_in == IDLE_ACT);

  always_comb begin
    next_state = fsm_state;
    unique case (fsm_state)
      IDLE:      if (incoming) next_state = INCOMING;
                 else if (initiates_in) next_state = CALLING;
      CALLING:   if (accepted) next_state = CONNECTED;
                 else if (denied) next_state = IDLE;
      INCOMING:  if (accept_in) next_state = CONNECTED;
                 else if (deny_in || ended) next_state = IDLE;
      CONNECTED: if (ends_in || ended) next_state = IDLE;
      default:   next_state = IDLE;
    endcase
  end

  always_ff @(posedge clk_50mhz) begin
    if (reset_in) fsm_state <= IDLE;
    else          fsm_state <= next_state;
  end

endmodule
