// mp_interface: the multiprocessor interface, an AHB slave that carries each
// accepted AHB transfer onto a simple APB-style target bus.
//
// Sub-blocks, as in the interface block diagram: the state machine
// (bridge_fsm), the APB address and control generator (apb_addr_ctrl_gen),
// the address decoder (apb_addr_decoder, one PSEL per target area), the write
// output generator (HWDATA -> PWDATA flip-flop), the read output generator
// (PRDATA -> HRDATA flip-flop) and the AHB transfer output generator
// (HREADYOUT, HRESP = OKAY).
//
// A transfer is accepted when HSEL and HREADYIN are high and HTRANS is NONSEQ
// or SEQ. Timing (this design's choice): the AHB data phase of every transfer
// lasts three cycles. A write runs HWDATA capture, APB setup, APB access; a
// read runs APB setup, APB access (PRDATA registered), then returns HRDATA.
// Targets have no wait states (no PREADY), as in the block diagram.
module mp_interface
  import amba_pkg::*;
#(
  parameter int unsigned NT = NUM_TARGETS
) (
  input  logic              HCLK,
  input  logic              HRESETn,
  // AHB slave side
  input  logic              HSEL,
  input  logic [ADDR_W-1:0] HADDR,
  input  logic              HWRITE,
  input  htrans_e           HTRANS,
  input  logic              HREADYIN,
  input  logic [DATA_W-1:0] HWDATA,
  output logic [DATA_W-1:0] HRDATA,
  output logic              HREADYOUT,
  output hresp_e            HRESP,
  // target (APB) side
  output logic [NT-1:0]     PSEL,
  output logic              PENABLE,
  output logic              PWRITE,
  output logic [ADDR_W-1:0] PADDR,
  output logic [DATA_W-1:0] PWDATA,
  input  logic [DATA_W-1:0] PRDATA
);

  logic    accept;
  logic    reg_write;
  bstate_e state, next_state;

  assign accept = HSEL && HREADYIN && HTRANS[1];

  bridge_fsm u_fsm (
    .HCLK, .HRESETn, .accept, .HWRITE, .reg_write, .state, .next_state
  );

  apb_addr_ctrl_gen u_ctrl (
    .HCLK, .HRESETn, .accept, .HADDR, .HWRITE, .state,
    .PADDR, .PWRITE, .PENABLE
  );
  assign reg_write = PWRITE;

  apb_addr_decoder #(.NT(NT)) u_dec (.PADDR, .state, .PSEL);

  write_output_gen u_wr (.HCLK, .HRESETn, .state, .HWDATA, .PWDATA);

  read_output_gen u_rd (.HCLK, .HRESETn, .state, .reg_write, .PRDATA, .HRDATA);

  ahb_xfer_out_gen u_xfer (.state, .reg_write, .HREADYOUT, .HRESP);

  // APB rule: an access cycle (PENABLE high) always follows a setup cycle.
  property p_enable_after_setup;
    @(posedge HCLK) disable iff (!HRESETn) PENABLE |-> $past(state) == ST_SETUP;
  endproperty
  a_enable_after_setup: assert property (p_enable_after_setup);

endmodule
