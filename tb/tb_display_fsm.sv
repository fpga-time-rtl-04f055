// tb_display_fsm: exercises every transition of the call state machine and
// checks that other inputs leave each state alone.
module tb_display_fsm;
  import fpga_time_pkg::*;
  logic clk_50mhz = 0, reset_in = 1;
  logic [3:0] action_in = IDLE_ACT;
  logic action_valid_in = 0;
  logic deny_in = 0, accept_in = 0, initiates_in = 0, ends_in = 0;
  call_state_t fsm_state;
  int checks = 0, failures = 0;

  display_fsm dut (.*);
  always #10 clk_50mhz = ~clk_50mhz;

  initial begin
    #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // apply inputs for one clock, then check the state
  // a packet carrying act arrives together with the buttons
  task automatic apply(action_t act, logic [3:0] btn, call_state_t expv, logic pkt = 1'b1);
    @(negedge clk_50mhz);
    action_in = act; action_valid_in = pkt; {deny_in, accept_in, initiates_in, ends_in} = btn;
    @(negedge clk_50mhz);
    {deny_in, accept_in, initiates_in, ends_in} = '0; action_valid_in = 0;
    checks++;
    if (fsm_state !== expv) begin failures++; $display("FAIL act=%0d btn=%b state=%s exp=%s", act, btn, fsm_state.name(), expv.name()); end
  endtask

  localparam logic [3:0] DENY = 4'b1000, ACC = 4'b0100, INIT = 4'b0010, END_B = 4'b0001, NONE = 4'b0000;

  initial begin
    repeat (3) @(negedge clk_50mhz);
    reset_in = 0;
    apply(IDLE_ACT, NONE, IDLE);
    apply(IDLE_ACT, ACC, IDLE);
    apply(CALL_DATA, NONE, IDLE);
    apply(IDLE_ACT, INIT, CALLING);         // Initiate
    apply(IDLE_ACT, NONE, CALLING);
    apply(START_CALL, END_B, CALLING);
    apply(DENY_CALL, NONE, IDLE);           // Denied
    apply(IDLE_ACT, INIT, CALLING);
    apply(ACCEPT_CALL, NONE, CONNECTED);    // Accepted
    apply(CALL_DATA, NONE, CONNECTED);
    apply(START_CALL, NONE, CONNECTED);
    apply(CALL_DATA, END_B, IDLE);          // End (button)
    apply(IDLE_ACT, INIT, CALLING);
    apply(CALL_DATA, NONE, CONNECTED);      // Accepted by call data
    apply(IDLE_ACT, NONE, IDLE);            // End (other side idle)
    apply(START_CALL, NONE, INCOMING);      // Incoming
    apply(START_CALL, INIT, INCOMING);
    apply(START_CALL, DENY, IDLE);          // Deny
    apply(START_CALL, NONE, INCOMING);
    apply(IDLE_ACT, NONE, INCOMING, 1'b0);     // no packet: held action ignored
    apply(IDLE_ACT, NONE, IDLE);            // caller idle: stop ringing
    apply(START_CALL, NONE, IDLE, 1'b0);
    apply(CALL_DATA, NONE, IDLE, 1'b0);
    apply(START_CALL, INIT, INCOMING);      // incoming has priority
    apply(START_CALL, ACC, CONNECTED);      // Accept
    apply(END_CALL, NONE, CONNECTED);
    apply(START_CALL, END_B, IDLE);
    @(negedge clk_50mhz); action_in = START_CALL; reset_in = 1;
    @(negedge clk_50mhz); reset_in = 0; action_in = IDLE_ACT;
    checks++; if (fsm_state !== IDLE) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
