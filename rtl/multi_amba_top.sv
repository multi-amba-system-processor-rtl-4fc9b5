// multi_amba_top: multi-master AHB system with a multiprocessor interface to
// shared target areas.
//
// NUM_MASTERS AHB masters (processors outside this design) reach six target
// areas - control/status registers, memory, FIFO, UART, PCI interface and
// network link - through one shared AHB:
//
//   masters --HBUSREQ/HGRANT--> ahb_arbiter --HMASTER--> ahb_bus_mux
//   ahb_bus_mux (address/control, write data, read data muxes)
//       --> ahb_decoder --HSEL--> mp_interface (AHB slave)
//   mp_interface --PSEL[5:0], PENABLE, PWRITE, PADDR, PWDATA--> targets
//   targets --PRDATA (selected by PSEL)--> mp_interface --> read data mux
//
// The CSR, memory, FIFO and UART targets are built in; the PCI interface and
// network link are outside this design and get their own PSEL line, the
// shared APB signals and their own PRDATA input as top-level ports. The
// arbitration algorithm is chosen at run time by ARBITRATION[1:0]. The
// memory map (amba_pkg): the interface answers to 0x4000_0000-0x400F_FFFF,
// and address bits [18:16] select the target (0 CSR, 1 memory, 2 FIFO,
// 3 UART, 4 PCI, 5 network link). Other addresses reach the default slave
// (OKAY, zero read data). Every transfer to a target has two wait states.
//
// Master ports are arrays indexed by master number. A master requests with
// m_hbusreq, waits for m_hgrant, then drives its address phases; it keeps
// m_hbusreq high until its last address phase has been taken (HREADY high).
// CSR status word 0 reads the FIFO flags {full, empty}; words 1..3 read
// csr_status_i.
module multi_amba_top
  import amba_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 3,
  parameter int unsigned MEM_DEPTH   = 1024,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned UART_DIV    = 16
) (
  input  logic                               HCLK,
  input  logic                               HRESETn,
  input  arb_mode_e                          ARBITRATION,
  // AHB masters
  input  logic [NUM_MASTERS-1:0]             m_hbusreq,
  output logic [NUM_MASTERS-1:0]             m_hgrant,
  input  logic [NUM_MASTERS-1:0][ADDR_W-1:0] m_haddr,
  input  htrans_e [NUM_MASTERS-1:0]          m_htrans,
  input  logic [NUM_MASTERS-1:0]             m_hwrite,
  input  logic [NUM_MASTERS-1:0][DATA_W-1:0] m_hwdata,
  output logic [DATA_W-1:0]                  HRDATA,
  output logic                               HREADY,
  output hresp_e                             HRESP,
  output logic [3:0]                         HMASTER,
  output logic                               DEFAULT,
  // control and status registers
  output logic [3:0][DATA_W-1:0]             csr_ctrl_o,
  input  logic [2:0][DATA_W-1:0]             csr_status_i,
  // UART serial lines
  output logic                               uart_tx,
  input  logic                               uart_rx,
  // PCI interface and network link target ports
  output logic                               pci_psel,
  output logic                               net_psel,
  output logic                               p_enable,
  output logic                               p_write,
  output logic [ADDR_W-1:0]                  p_addr,
  output logic [DATA_W-1:0]                  p_wdata,
  input  logic [DATA_W-1:0]                  pci_prdata,
  input  logic [DATA_W-1:0]                  net_prdata
);

  // ---------------- AHB fabric ----------------
  ahb_ctrl_t [NUM_MASTERS-1:0] m_ctrl;
  ahb_ctrl_t                   bus_ctrl;
  logic [DATA_W-1:0]           bus_hwdata;
  logic [0:0]                  hsel;
  logic                        hsel_default;
  logic [0:0][DATA_W-1:0]      s_hrdata;
  logic [0:0]                  s_hreadyout;
  hresp_e [0:0]                s_hresp;

  always_comb begin
    for (int m = 0; m < NUM_MASTERS; m++) begin
      m_ctrl[m].haddr  = m_haddr[m];
      m_ctrl[m].htrans = m_htrans[m];
      m_ctrl[m].hwrite = m_hwrite[m];
    end
  end

  // No slave in this system answers SPLIT (the interface always answers
  // OKAY), so no master is ever released by HSPLIT.
  logic [NUM_MASTERS-1:0] no_split;
  assign no_split = '0;

  ahb_arbiter #(.NUM_REQ(NUM_MASTERS)) u_arbiter (
    .HCLK, .HRESETn, .HBUSREQ(m_hbusreq), .HREADY, .HRESP, .HSPLIT(no_split),
    .ARBITRATION,
    .HGRANT(m_hgrant), .HMASTER, .DEFAULT
  );

  ahb_bus_mux #(.NM(NUM_MASTERS), .NS(1)) u_mux (
    .HCLK, .HRESETn, .HMASTER, .m_ctrl, .m_hwdata,
    .bus_ctrl, .HWDATA(bus_hwdata),
    .HSEL(hsel), .HSEL_DEFAULT(hsel_default),
    .s_hrdata, .s_hreadyout, .s_hresp,
    .HRDATA, .HREADY, .HRESP
  );

  ahb_decoder #(.NUM_SLAVES(1)) u_decoder (
    .HADDR(bus_ctrl.haddr), .HSEL(hsel), .HSEL_DEFAULT(hsel_default)
  );

  // ---------------- multiprocessor interface ----------------
  logic [NUM_TARGETS-1:0] psel;
  logic                   penable, pwrite;
  logic [ADDR_W-1:0]      paddr;
  logic [DATA_W-1:0]      pwdata, prdata;
  logic [NUM_TARGETS-1:0][DATA_W-1:0] t_prdata;

  mp_interface u_mpi (
    .HCLK, .HRESETn,
    .HSEL(hsel[0]), .HADDR(bus_ctrl.haddr), .HWRITE(bus_ctrl.hwrite),
    .HTRANS(bus_ctrl.htrans), .HREADYIN(HREADY), .HWDATA(bus_hwdata),
    .HRDATA(s_hrdata[0]), .HREADYOUT(s_hreadyout[0]), .HRESP(s_hresp[0]),
    .PSEL(psel), .PENABLE(penable), .PWRITE(pwrite), .PADDR(paddr),
    .PWDATA(pwdata), .PRDATA(prdata)
  );

  // Target read data, chosen by the PSEL line that is high.
  always_comb begin
    prdata = '0;
    for (int t = 0; t < NUM_TARGETS; t++)
      if (psel[t]) prdata = t_prdata[t];
  end

  // ---------------- target areas ----------------
  logic fifo_full, fifo_empty;
  logic [3:0][DATA_W-1:0] csr_status;
  assign csr_status = {csr_status_i, {30'd0, fifo_full, fifo_empty}};

  apb_csr u_csr (
    .PCLK(HCLK), .PRESETn(HRESETn), .PSEL(psel[TGT_CSR]), .PENABLE(penable),
    .PWRITE(pwrite), .PADDR(paddr), .PWDATA(pwdata), .PRDATA(t_prdata[TGT_CSR]),
    .ctrl_o(csr_ctrl_o), .status_i(csr_status)
  );

  apb_memory #(.DEPTH(MEM_DEPTH)) u_mem (
    .PCLK(HCLK), .PRESETn(HRESETn), .PSEL(psel[TGT_MEM]), .PENABLE(penable),
    .PWRITE(pwrite), .PADDR(paddr), .PWDATA(pwdata), .PRDATA(t_prdata[TGT_MEM])
  );

  apb_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .PCLK(HCLK), .PRESETn(HRESETn), .PSEL(psel[TGT_FIFO]), .PENABLE(penable),
    .PWRITE(pwrite), .PADDR(paddr), .PWDATA(pwdata), .PRDATA(t_prdata[TGT_FIFO]),
    .full(fifo_full), .empty(fifo_empty)
  );

  apb_uart #(.DIV_RESET(UART_DIV)) u_uart (
    .PCLK(HCLK), .PRESETn(HRESETn), .PSEL(psel[TGT_UART]), .PENABLE(penable),
    .PWRITE(pwrite), .PADDR(paddr), .PWDATA(pwdata), .PRDATA(t_prdata[TGT_UART]),
    .tx(uart_tx), .rx(uart_rx)
  );

  // PCI interface and network link live outside this design.
  assign pci_psel = psel[TGT_PCI];
  assign net_psel = psel[TGT_NET];
  assign p_enable = penable;
  assign p_write  = pwrite;
  assign p_addr   = paddr;
  assign p_wdata  = pwdata;
  assign t_prdata[TGT_PCI] = pci_prdata;
  assign t_prdata[TGT_NET] = net_prdata;

endmodule
