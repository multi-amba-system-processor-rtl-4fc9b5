// tb_bridge_fsm: checks every transition of the multiprocessor interface
// state machine. Each case resets, walks the machine into a start state with
// known inputs, applies one input combination and compares the state reached
// with the expected one from the transition list.
module tb_bridge_fsm;
  import amba_pkg::*;

  logic    HCLK = 1'b0, HRESETn = 1'b0;
  logic    accept = 1'b0, HWRITE = 1'b0, reg_write = 1'b0;
  bstate_e state, next_state;
  int      checks = 0, failures = 0;

  bridge_fsm dut (.*);

  always #5 HCLK = ~HCLK;

  initial begin
    repeat (2000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic a, input logic w, input logic rw);
    accept = a; HWRITE = w; reg_write = rw;
    @(posedge HCLK); #1;
  endtask

  task automatic expect_state(input bstate_e exp, input string what);
    checks++;
    if (state !== exp) begin
      failures++;
      $display("FAIL %s: state %s expected %s", what, state.name(), exp.name());
    end
  endtask

  task automatic do_reset();
    accept = 0; HWRITE = 0; reg_write = 0;
    HRESETn = 0; @(posedge HCLK); #1; HRESETn = 1;
    expect_state(ST_IDLE, "reset");
  endtask

  initial begin
    do_reset();
    step(0, 0, 0); expect_state(ST_IDLE,   "idle stays idle");
    step(0, 1, 0); expect_state(ST_IDLE,   "idle ignores HWRITE without accept");
    step(1, 1, 0); expect_state(ST_WWAIT,  "idle write -> wwait");
    step(0, 0, 1); expect_state(ST_SETUP,  "wwait -> setup");
    step(1, 1, 1); expect_state(ST_ENABLE, "setup -> enable");
    step(0, 0, 1); expect_state(ST_IDLE,   "write enable, no accept -> idle");
    step(1, 0, 0); expect_state(ST_SETUP,  "idle read -> setup");
    step(0, 0, 0); expect_state(ST_ENABLE, "setup -> enable (read)");
    step(1, 1, 0); expect_state(ST_RDONE,  "read enable -> rdone even with accept");
    step(1, 1, 0); expect_state(ST_WWAIT,  "rdone write -> wwait");
    step(0, 0, 1); expect_state(ST_SETUP,  "wwait -> setup");
    step(0, 0, 1); expect_state(ST_ENABLE, "setup -> enable");
    step(1, 0, 1); expect_state(ST_SETUP,  "write enable, accept read -> setup");
    step(0, 0, 0); expect_state(ST_ENABLE, "setup -> enable");
    step(0, 0, 0); expect_state(ST_RDONE,  "read enable -> rdone");
    step(1, 0, 0); expect_state(ST_SETUP,  "rdone read -> setup");
    step(0, 0, 0); expect_state(ST_ENABLE, "setup -> enable");
    step(0, 0, 0); expect_state(ST_RDONE,  "read enable -> rdone");
    step(0, 0, 0); expect_state(ST_IDLE,   "rdone no accept -> idle");
    step(1, 1, 0); expect_state(ST_WWAIT,  "idle write -> wwait");
    step(0, 0, 1); expect_state(ST_SETUP,  "wwait -> setup");
    step(0, 0, 1); expect_state(ST_ENABLE, "setup -> enable");
    step(1, 1, 1); expect_state(ST_WWAIT,  "write enable, accept write -> wwait");
    // asynchronous reset mid-transfer
    #2 HRESETn = 0; #1;
    expect_state(ST_IDLE, "asynchronous reset");
    HRESETn = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
