// tb_ahb_decoder: checks the address decoder with three slave windows (the
// second lies inside the first, so the lower number must win) and random
// addresses inside and outside the windows, then the default single-slave
// map at MP_BASE.
module tb_ahb_decoder;
  import amba_pkg::*;

  localparam int NS = 3;
  localparam logic [NS-1:0][ADDR_W-1:0] BASE = {32'h4000_0000, 32'h0000_0000, 32'h0000_0000};
  localparam logic [NS-1:0][ADDR_W-1:0] MASK = {32'hF000_0000, 32'hFFFF_0000, 32'hF000_0000};

  logic [ADDR_W-1:0] HADDR;
  logic [NS-1:0]     HSEL;
  logic              HSEL_DEFAULT;
  logic [0:0]        HSEL1;
  logic              HSEL1_DEFAULT;
  int                checks = 0, failures = 0;

  ahb_decoder #(.NUM_SLAVES(NS), .BASE(BASE), .MASK(MASK)) dut (.HADDR, .HSEL, .HSEL_DEFAULT);
  ahb_decoder dut1 (.HADDR, .HSEL(HSEL1), .HSEL_DEFAULT(HSEL1_DEFAULT));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NS-1:0] exp;
    for (int n = 0; n < 2000; n++) begin
      case (n % 4)
        0: HADDR = {4'h0, 28'($urandom)};
        1: HADDR = {16'h0000, 16'($urandom)};
        2: HADDR = {4'h4, 28'($urandom)};
        default: HADDR = $urandom;
      endcase
      #1;
      exp = '0;
      if (HADDR[31:28] == 4'h0)        exp[0] = 1'b1;
      else if (HADDR[31:28] == 4'h4)   exp[2] = 1'b1;
      checks++;
      if (HSEL !== exp || HSEL_DEFAULT !== (exp == '0)) begin
        failures++;
        $display("FAIL HADDR=%h HSEL=%b default=%b expected %b", HADDR, HSEL, HSEL_DEFAULT, exp);
      end
      checks++;
      if (HSEL1[0] !== (HADDR[31:20] == 12'h400) || HSEL1_DEFAULT !== !HSEL1[0]) begin
        failures++;
        $display("FAIL default map HADDR=%h HSEL=%b", HADDR, HSEL1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
