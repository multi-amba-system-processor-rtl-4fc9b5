// tb_ahb_xfer_out_gen: checks HREADYOUT for every state and both transfer
// directions against the expected table, and that HRESP is always OKAY.
module tb_ahb_xfer_out_gen;
  import amba_pkg::*;

  bstate_e state;
  logic    reg_write;
  logic    HREADYOUT;
  hresp_e  HRESP;
  int      checks = 0, failures = 0;

  ahb_xfer_out_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expected_ready(bstate_e s, logic rw);
    if (s == ST_IDLE || s == ST_RDONE) return 1'b1;
    if (s == ST_ENABLE) return rw;
    return 1'b0;
  endfunction

  initial begin
    bstate_e list [5] = '{ST_IDLE, ST_WWAIT, ST_SETUP, ST_ENABLE, ST_RDONE};
    foreach (list[i]) begin
      for (int rw = 0; rw < 2; rw++) begin
        state = list[i]; reg_write = rw[0]; #1;
        checks++;
        if (HREADYOUT !== expected_ready(list[i], rw[0])) begin
          failures++;
          $display("FAIL HREADYOUT=%b in %s rw=%0d", HREADYOUT, list[i].name(), rw);
        end
        checks++;
        if (HRESP !== HRESP_OKAY) begin
          failures++;
          $display("FAIL HRESP=%b in %s", HRESP, list[i].name());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
