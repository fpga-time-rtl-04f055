// tb_action_encoder: walks the local call state and buttons through calls and
// checks the action header: START_CALL while calling, CALL_DATA while
// connected, IDLE_ACT otherwise, and ACCEPT_CALL / DENY_CALL / END_CALL held
// after the matching button press until one packet has been sent.
module tb_action_encoder;
  import fpga_time_pkg::*;
  logic clk = 0, reset_in = 1, sent_in = 0, accept_in = 0, deny_in = 0, ends_in = 0;
  call_state_t fsm_state_in = IDLE;
  action_t action_out;
  int checks = 0, failures = 0;

  action_encoder dut (.*);
  always #10 clk = ~clk;

  initial begin
    #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic go(call_state_t s, int cycles, action_t expv);
    @(negedge clk); fsm_state_in = s;
    repeat (cycles) begin
      @(negedge clk); checks++;
      if (action_out !== expv) begin failures++; $display("FAIL state %s action %0d exp %0d", s.name(), action_out, expv); end
    end
  endtask

  // button pressed in the current state; the state machine then moves to s
  task automatic press(int which, call_state_t s);
    @(negedge clk);
    case (which) 0: accept_in = 1; 1: deny_in = 1; default: ends_in = 1; endcase
    @(negedge clk);
    accept_in = 0; deny_in = 0; ends_in = 0; fsm_state_in = s;
  endtask

  task automatic send_and_expect(action_t after);
    sent_in = 1; @(negedge clk); sent_in = 0;
    checks++;
    if (action_out !== after) begin failures++; $display("FAIL after send %0d exp %0d", action_out, after); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset_in = 0;
    go(IDLE, 5, IDLE_ACT);
    press(0, IDLE); go(IDLE, 3, IDLE_ACT);        // buttons ignored when idle
    go(CALLING, 5, START_CALL);
    go(CONNECTED, 5, CALL_DATA);
    press(2, IDLE);  go(IDLE, 5, END_CALL);       // held until a packet goes out
    send_and_expect(IDLE_ACT);
    go(INCOMING, 5, IDLE_ACT);
    press(0, CONNECTED); go(CONNECTED, 5, ACCEPT_CALL);
    send_and_expect(CALL_DATA);
    go(INCOMING, 3, IDLE_ACT);
    press(1, IDLE); go(IDLE, 5, DENY_CALL);
    send_and_expect(IDLE_ACT);
    go(INCOMING, 3, IDLE_ACT);
    go(IDLE, 3, IDLE_ACT);                         // ringing stopped by the caller
    go(CALLING, 3, START_CALL);
    go(IDLE, 3, IDLE_ACT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
