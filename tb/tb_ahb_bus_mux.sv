// tb_ahb_bus_mux: checks the three bus multiplexers with three masters and
// two slaves. Random HMASTER, master outputs, slave selects and slave
// responses are applied every cycle; the address mux must follow HMASTER at
// once, while the write data and read data muxes must follow the master and
// slave registered at the last cycle with HREADY high. A data phase with no
// slave selected must be answered by the default slave (ready, OKAY, zero
// data), and an HMASTER with no master behind it must give an IDLE transfer.
module tb_ahb_bus_mux;
  import amba_pkg::*;

  localparam int NM = 3, NS = 2;

  logic                      HCLK = 1'b0, HRESETn = 1'b0;
  logic [3:0]                HMASTER = '0;
  ahb_ctrl_t [NM-1:0]        m_ctrl;
  logic [NM-1:0][DATA_W-1:0] m_hwdata;
  ahb_ctrl_t                 bus_ctrl;
  logic [DATA_W-1:0]         HWDATA;
  logic [NS-1:0]             HSEL = '0;
  logic                      HSEL_DEFAULT = 1'b1;
  logic [NS-1:0][DATA_W-1:0] s_hrdata;
  logic [NS-1:0]             s_hreadyout;
  hresp_e [NS-1:0]           s_hresp;
  logic [DATA_W-1:0]         HRDATA;
  logic                      HREADY;
  hresp_e                    HRESP;
  int                        checks = 0, failures = 0;

  ahb_bus_mux #(.NM(NM), .NS(NS)) dut (.*);

  always #5 HCLK = ~HCLK;

  initial begin
    repeat (10000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int   dp_m, dp_s;   // model of the data-phase owners (-1: default slave)
    logic hready_now;
    m_ctrl = '0; m_hwdata = '0; s_hrdata = '0; s_hreadyout = '1;
    s_hresp = '{HRESP_OKAY, HRESP_OKAY};
    @(posedge HCLK); #1;
    HRESETn = 1'b1;
    dp_m = 0; dp_s = -1;
    // an HMASTER value with no master behind it gives an IDLE transfer
    HMASTER = 4'd9; m_ctrl[0].htrans = HTRANS_NONSEQ; #1;
    check(bus_ctrl.htrans == HTRANS_IDLE, "unknown master drives IDLE");
    HMASTER = 4'd0; #1;
    check(bus_ctrl.htrans == HTRANS_NONSEQ, "master 0 drives the bus");
    for (int n = 0; n < 2000; n++) begin
      HMASTER = 4'($urandom_range(0, NM - 1));
      for (int m = 0; m < NM; m++) begin
        m_ctrl[m].haddr  = $urandom;
        m_ctrl[m].htrans = htrans_e'($urandom);
        m_ctrl[m].hwrite = $urandom;
        m_hwdata[m]      = $urandom;
      end
      case ($urandom % 3)
        0:       begin HSEL = 2'b01; HSEL_DEFAULT = 1'b0; end
        1:       begin HSEL = 2'b10; HSEL_DEFAULT = 1'b0; end
        default: begin HSEL = 2'b00; HSEL_DEFAULT = 1'b1; end
      endcase
      for (int s = 0; s < NS; s++) begin
        s_hrdata[s]    = $urandom;
        s_hreadyout[s] = ($urandom % 4) != 0;
        s_hresp[s]     = hresp_e'($urandom % 2);
      end
      #1;
      check(bus_ctrl == m_ctrl[HMASTER], "address/control mux follows HMASTER");
      check(HWDATA == m_hwdata[dp_m], $sformatf("write data from data-phase master %0d", dp_m));
      if (dp_s < 0)
        check(HRDATA == '0 && HREADY && HRESP == HRESP_OKAY, "default slave response");
      else
        check(HRDATA == s_hrdata[dp_s] && HREADY == s_hreadyout[dp_s] && HRESP == s_hresp[dp_s],
              $sformatf("read data from data-phase slave %0d", dp_s));
      hready_now = HREADY;
      @(posedge HCLK); #1;
      if (hready_now) begin
        dp_m = int'(HMASTER);
        dp_s = HSEL_DEFAULT ? -1 : (HSEL[1] ? 1 : 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
