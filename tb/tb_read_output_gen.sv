// tb_read_output_gen: checks that HRDATA takes PRDATA at the end of the
// access cycle of a read (ST_ENABLE, reg_write low) and holds otherwise,
// including the access cycle of a write, and that reset clears it.
module tb_read_output_gen;
  import amba_pkg::*;

  logic              HCLK = 1'b0, HRESETn = 1'b0;
  bstate_e           state = ST_IDLE;
  logic              reg_write = 1'b0;
  logic [DATA_W-1:0] PRDATA = '0;
  logic [DATA_W-1:0] HRDATA;
  int                checks = 0, failures = 0;

  read_output_gen dut (.*);

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
    for (int n = 0; n < 400; n++) begin
      state     = list[$urandom % 5];
      reg_write = $urandom;
      PRDATA    = $urandom;
      @(posedge HCLK); #1;
      if (state == ST_ENABLE && !reg_write) exp = PRDATA;
      checks++;
      if (HRDATA !== exp) begin
        failures++;
        $display("FAIL HRDATA=%h expected %h (state %s rw %b)", HRDATA, exp, state.name(), reg_write);
      end
    end
    #2 HRESETn = 0; #1;
    checks++;
    if (HRDATA !== '0) begin failures++; $display("FAIL asynchronous reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
