// apb_addr_ctrl_gen: APB address and control generator of the multiprocessor
// interface.
//
// When the state machine accepts an AHB transfer, HADDR and HWRITE are
// registered. The registered address drives PADDR and the registered HWRITE
// drives PWRITE (and is handed back to the state machine as reg_write).
// PENABLE is high in the APB access cycle (state ST_ENABLE). PADDR and PWRITE
// therefore stay stable through the setup and access cycles of a transfer,
// because a new transfer can only be accepted in the last access cycle or
// later. Registering on accept is this design's choice; the description only
// names the block and its outputs.
module apb_addr_ctrl_gen
  import amba_pkg::*;
(
  input  logic              HCLK,
  input  logic              HRESETn,
  input  logic              accept,
  input  logic [ADDR_W-1:0] HADDR,
  input  logic              HWRITE,
  input  bstate_e           state,
  output logic [ADDR_W-1:0] PADDR,
  output logic              PWRITE,
  output logic              PENABLE
);

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      PADDR  <= '0;
      PWRITE <= 1'b0;
    end else if (accept) begin
      PADDR  <= HADDR;
      PWRITE <= HWRITE;
    end
  end

  assign PENABLE = (state == ST_ENABLE);

endmodule
