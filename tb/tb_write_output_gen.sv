// tb_write_output_gen: checks that PWDATA takes HWDATA at the clock edge
// ending the write data cycle (ST_WWAIT), holds in every other state, and is
// cleared by the asynchronous reset.
module tb_write_output_gen;
  import amba_pkg::*;

  logic              HCLK = 1'b0, HRESETn = 1'b0;
  bstate_e           state = ST_IDLE;
  logic [DATA_W-1:0] HWDATA = '0;
  logic [DATA_W-1:0] PWDATA;
  int                checks = 0, failures = 0;

  write_output_gen dut (.*);

  always #5 HCLK = ~HCLK;

  initial begin
    repeat (5000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] exp;
    bstate_e list [5] = '{ST_IDLE, ST_WWAIT, ST_SETUP, ST_ENABLE, ST_RDONE};
    @(posedge HCLK); #1;
    HRESETn = 1;
    exp = '0;
    for (int n = 0; n < 300; n++) begin
      state  = list[$urandom % 5];
      HWDATA = $urandom;
      @(posedge HCLK); #1;
      if (state == ST_WWAIT) exp = HWDATA;
      checks++;
      if (PWDATA !== exp) begin
        failures++;
        $display("FAIL PWDATA=%h expected %h", PWDATA, exp);
      end
    end
    #2 HRESETn = 0; #1;
    checks++;
    if (PWDATA !== '0) begin failures++; $display("FAIL asynchronous reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
