// action_encoder: the action header this FPGA sends to the other one.
//
// The steady action follows the local call state: START_CALL while
// CALLING, CALL_DATA while CONNECTED, IDLE_ACT otherwise. A local button
// press that the other side must learn about is latched as a pending action
// and sent instead of the steady one until a packet has gone out (sent_in):
//   accept_in while INCOMING  : ACCEPT_CALL (accept wins over deny)
//   deny_in   while INCOMING  : DENY_CALL
//   ends_in   while CONNECTED : END_CALL
// These are the same conditions under which display_fsm leaves those
// states because of the buttons; state changes caused by the other side are
// not announced back. The action codes come from the described design;
// which code is sent when, and the latching, are this design's choices, made
// so that the other side's call state machine sees accepted, denied,
// incoming and ended as the described design decodes them.
module action_encoder
  import fpga_time_pkg::*;
(
  input  logic        clk,
  input  logic        reset_in,
  input  call_state_t fsm_state_in,
  input  logic        accept_in,
  input  logic        deny_in,
  input  logic        ends_in,
  input  logic        sent_in,
  output action_t     action_out
);

  action_t pending_q;
  logic    pending_valid_q;
  action_t steady;

  always_comb begin
    unique case (fsm_state_in)
      CALLING:   steady = START_CALL;
      CONNECTED: steady = CALL_DATA;
      default:   steady = IDLE_ACT;
    endcase
    action_out = pending_valid_q ? pending_q : steady;
  end

  always_ff @(posedge clk) begin
    if (reset_in) begin
      pending_q       <= IDLE_ACT;
      pending_valid_q <= 1'b0;
    end else begin
      if (fsm_state_in == INCOMING && accept_in) begin
        pending_q <= ACCEPT_CALL; pending_valid_q <= 1'b1;
      end else if (fsm_state_in == INCOMING && deny_in) begin
        pending_q <= DENY_CALL;   pending_valid_q <= 1'b1;
      end else if (fsm_state_in == CONNECTED && ends_in) begin
        pending_q <= END_CALL;    pending_valid_q <= 1'b1;
      end else if (sent_in) begin
        pending_valid_q <= 1'b0;
      end
    end
  end

endmodule
