// tb_apb_addr_ctrl_gen: checks that HADDR and HWRITE are registered onto
// PADDR and PWRITE only on accept, that they hold otherwise, that PENABLE
// follows the access state, and that reset clears the registers.
module tb_apb_addr_ctrl_gen;
  import amba_pkg::*;

  logic              HCLK = 1'b0, HRESETn = 1'b0;
  logic              accept = 1'b0;
  logic [ADDR_W-1:0] HADDR = '0;
  logic              HWRITE = 1'b0;
  bstate_e           state = ST_IDLE;
  logic [ADDR_W-1:0] PADDR;
  logic              PWRITE, PENABLE;
  int                checks = 0, failures = 0;

  apb_addr_ctrl_gen dut (.*);

  always #5 HCLK = ~HCLK;

  initial begin
    repeat (5000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (PADDR=%h PWRITE=%b PENABLE=%b)", what, PADDR, PWRITE, PENABLE);
    end
  endtask

  initial begin
    logic [ADDR_W-1:0] exp_addr;
    logic              exp_wr;
    bstate_e list [5] = '{ST_IDLE, ST_WWAIT, ST_SETUP, ST_ENABLE, ST_RDONE};
    @(posedge HCLK); #1;
    check(PADDR == '0 && PWRITE == 1'b0, "reset values");
    HRESETn = 1;
    exp_addr = '0; exp_wr = 1'b0;
    for (int n = 0; n < 300; n++) begin
      accept = ($urandom % 3) == 0;
      HADDR  = $urandom;
      HWRITE = $urandom;
      state  = list[$urandom % 5];
      #1;
      check(PENABLE == (state == ST_ENABLE), "PENABLE follows access state");
      @(posedge HCLK); #1;
      if (accept) begin exp_addr = HADDR; exp_wr = HWRITE; end
      check(PADDR == exp_addr && PWRITE == exp_wr, "registered address/direction");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
