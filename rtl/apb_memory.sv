// apb_memory: general-purpose memory target area shared by all masters.
//
// A DEPTH x 32-bit single-port RAM addressed by word (PADDR[AW+1:2]). Writes
// land in the APB access cycle. Reads are synchronous: the word is read at
// the end of the setup cycle (PSEL high, PENABLE low) and held on PRDATA
// through the access cycle, which suits an SRAM macro. The depth is this
// design's choice; the description gives no size.
module apb_memory
  import amba_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic              PCLK,
  input  logic              PRESETn,
  input  logic              PSEL,
  input  logic              PENABLE,
  input  logic              PWRITE,
  input  logic [ADDR_W-1:0] PADDR,
  input  logic [DATA_W-1:0] PWDATA,
  output logic [DATA_W-1:0] PRDATA
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     waddr;
  assign waddr = PADDR[AW+1:2];

  always_ff @(posedge PCLK) begin
    if (PSEL && PENABLE && PWRITE) mem[waddr] <= PWDATA;
  end

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn)                        PRDATA <= '0;
    else if (PSEL && !PENABLE && !PWRITE) PRDATA <= mem[waddr];
  end

endmodule
