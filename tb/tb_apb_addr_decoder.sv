// tb_apb_addr_decoder: sweeps the target field of PADDR and every state and
// checks that exactly the expected PSEL line is high, and only in the APB
// setup and access states.
module tb_apb_addr_decoder;
  import amba_pkg::*;

  logic [ADDR_W-1:0]      PADDR;
  bstate_e                state;
  logic [NUM_TARGETS-1:0] PSEL;
  int                     checks = 0, failures = 0;

  apb_addr_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bstate_e list [5] = '{ST_IDLE, ST_WWAIT, ST_SETUP, ST_ENABLE, ST_RDONE};
    logic [NUM_TARGETS-1:0] exp;
    foreach (list[i]) begin
      for (int t = 0; t < 8; t++) begin
        for (int r = 0; r < 4; r++) begin
          PADDR = MP_BASE | (32'(t) << TGT_LSB) | ($urandom & 32'h0000_FFFC);
          state = list[i];
          #1;
          exp = '0;
          if ((list[i] == ST_SETUP || list[i] == ST_ENABLE) && t < NUM_TARGETS) exp[t] = 1'b1;
          checks++;
          if (PSEL !== exp) begin
            failures++;
            $display("FAIL PADDR=%h state=%s PSEL=%b expected %b", PADDR, list[i].name(), PSEL, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
