// tb_apb_csr: writes random values to the control registers through APB
// setup/access cycles and reads them back; checks ctrl_o, the read-only
// status words, that status writes and out-of-range words are ignored, and
// reset values.
module tb_apb_csr;
  import amba_pkg::*;

  logic                    PCLK = 1'b0, PRESETn = 1'b0;
  logic                    PSEL = 1'b0, PENABLE = 1'b0, PWRITE = 1'b0;
  logic [ADDR_W-1:0]       PADDR = '0;
  logic [DATA_W-1:0]       PWDATA = '0;
  logic [DATA_W-1:0]       PRDATA;
  logic [3:0][DATA_W-1:0]  ctrl_o;
  logic [3:0][DATA_W-1:0]  status_i;
  int                      checks = 0, failures = 0;

  apb_csr dut (.*);

  always #5 PCLK = ~PCLK;

  initial begin
    repeat (20000) @(posedge PCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apb_write(input int word, input logic [DATA_W-1:0] d);
    PADDR = 32'(word) << 2; PWDATA = d; PWRITE = 1; PSEL = 1; PENABLE = 0;
    @(posedge PCLK); #1 PENABLE = 1;
    @(posedge PCLK); #1 PSEL = 0; PENABLE = 0; PWRITE = 0;
  endtask

  task automatic apb_read(input int word, output logic [DATA_W-1:0] d);
    PADDR = 32'(word) << 2; PWRITE = 0; PSEL = 1; PENABLE = 0;
    @(posedge PCLK); #1 PENABLE = 1;
    #1 d = PRDATA;
    @(posedge PCLK); #1 PSEL = 0; PENABLE = 0;
  endtask

  initial begin
    logic [DATA_W-1:0] model [4];
    logic [DATA_W-1:0] d;
    for (int i = 0; i < 4; i++) status_i[i] = $urandom;
    @(posedge PCLK); #1;
    check(ctrl_o == '0, "control registers reset to zero");
    PRESETn = 1;
    for (int i = 0; i < 4; i++) model[i] = '0;
    for (int n = 0; n < 200; n++) begin
      int w;
      w = $urandom % 10;
      if ($urandom % 2) begin
        d = $urandom;
        apb_write(w, d);
        if (w < 4) model[w] = d;
      end else begin
        apb_read(w, d);
        if (w < 4)      check(d == model[w], $sformatf("read control word %0d", w));
        else if (w < 8) check(d == status_i[w-4], $sformatf("read status word %0d", w));
        else            check(d == '0, "out-of-range word reads zero");
      end
      for (int i = 0; i < 4; i++) check(ctrl_o[i] == model[i], $sformatf("ctrl_o[%0d]", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
