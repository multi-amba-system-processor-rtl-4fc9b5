// read_output_gen: read output generator of the multiprocessor interface.
//
// A D flip-flop with asynchronous reset that copies PRDATA onto HRDATA. It
// loads at the end of the APB access cycle of a read (state ST_ENABLE with
// reg_write low), so the target's read data is on HRDATA in the following
// cycle (ST_RDONE), when HREADYOUT is high. The load enable is this design's
// choice; the description gives only the registered PRDATA-to-HRDATA path.
module read_output_gen
  import amba_pkg::*;
(
  input  logic              HCLK,
  input  logic              HRESETn,
  input  bstate_e           state,
  input  logic              reg_write,
  input  logic [DATA_W-1:0] PRDATA,
  output logic [DATA_W-1:0] HRDATA
);

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn)                              HRDATA <= '0;
    else if (state == ST_ENABLE && !reg_write) HRDATA <= PRDATA;
  end

endmodule
