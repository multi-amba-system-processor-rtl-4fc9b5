// write_output_gen: write output generator of the multiprocessor interface.
//
// A D flip-flop with asynchronous reset that copies HWDATA onto PWDATA. As
// described for this block, PWDATA is a clocked copy of HWDATA. The load
// enable is this design's addition: the register loads only in the write data
// cycle (state ST_WWAIT), so PWDATA stays stable through the following APB
// setup and access cycles even when the AHB write data bus moves on.
module write_output_gen
  import amba_pkg::*;
(
  input  logic              HCLK,
  input  logic              HRESETn,
  input  bstate_e           state,
  input  logic [DATA_W-1:0] HWDATA,
  output logic [DATA_W-1:0] PWDATA
);

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn)               PWDATA <= '0;
    else if (state == ST_WWAIT) PWDATA <= HWDATA;
  end

endmodule
