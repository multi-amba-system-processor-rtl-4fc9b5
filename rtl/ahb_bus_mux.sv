// ahb_bus_mux: the three multiplexers of a shared AHB.
//
//   address and control mux  - puts the address, HTRANS and HWRITE of the
//                              master named by HMASTER on the shared bus
//   write data mux           - puts HWDATA of the master that owns the data
//                              phase on the shared bus
//   read data mux            - returns HRDATA, HREADY and HRESP of the slave
//                              that owns the data phase to all masters
//
// Because AHB address and data phases are pipelined, the write and read data
// muxes use the master number and slave select registered at the end of the
// address phase (when HREADY is high). A built-in default slave answers
// transfers that hit no slave window with a zero-wait OKAY and zero read
// data. An HMASTER value with no master behind it drives IDLE transfers.
module ahb_bus_mux
  import amba_pkg::*;
#(
  parameter int unsigned NM = 3,   // masters
  parameter int unsigned NS = 1    // slaves
) (
  input  logic                   HCLK,
  input  logic                   HRESETn,
  input  logic [3:0]             HMASTER,
  // from the masters
  input  ahb_ctrl_t [NM-1:0]     m_ctrl,
  input  logic [NM-1:0][DATA_W-1:0] m_hwdata,
  // shared bus towards the slaves
  output ahb_ctrl_t              bus_ctrl,
  output logic [DATA_W-1:0]      HWDATA,
  // from the decoder and the slaves
  input  logic [NS-1:0]          HSEL,
  input  logic                   HSEL_DEFAULT,
  input  logic [NS-1:0][DATA_W-1:0] s_hrdata,
  input  logic [NS-1:0]          s_hreadyout,
  input  hresp_e [NS-1:0]        s_hresp,
  // shared response towards the masters (HREADY also goes to the slaves)
  output logic [DATA_W-1:0]      HRDATA,
  output logic                   HREADY,
  output hresp_e                 HRESP
);

  logic [3:0]    dp_master;
  logic [NS-1:0] dp_sel;

  // Address and control mux.
  always_comb begin
    bus_ctrl        = '0;
    bus_ctrl.htrans = HTRANS_IDLE;
    for (int m = 0; m < NM; m++)
      if (HMASTER == 4'(m)) bus_ctrl = m_ctrl[m];
  end

  // Data-phase owners, registered when the address phase completes.
  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_master <= '0;
      dp_sel    <= '0;
    end else if (HREADY) begin
      dp_master <= HMASTER;
      dp_sel    <= HSEL_DEFAULT ? '0 : HSEL;
    end
  end

  // Write data mux.
  always_comb begin
    HWDATA = '0;
    for (int m = 0; m < NM; m++)
      if (dp_master == 4'(m)) HWDATA = m_hwdata[m];
  end

  // Read data mux, with the default slave when no slave owns the data phase.
  always_comb begin
    HRDATA = '0;
    HREADY = 1'b1;
    HRESP  = HRESP_OKAY;
    for (int s = 0; s < NS; s++) begin
      if (dp_sel[s]) begin
        HRDATA = s_hrdata[s];
        HREADY = s_hreadyout[s];
        HRESP  = s_hresp[s];
      end
    end
  end

endmodule
