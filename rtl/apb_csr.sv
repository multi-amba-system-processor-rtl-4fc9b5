// apb_csr: control and status registers target area.
//
// NUM_CTRL read/write control registers at word offsets 0..NUM_CTRL-1 drive
// the ctrl_o outputs to the rest of the system; NUM_STAT read-only status
// words at the following offsets sample the status_i inputs. A write lands
// in the APB access cycle (PSEL, PENABLE and PWRITE high); reads return the
// addressed word combinationally, so it is valid in the access cycle. Writes
// to status words and accesses beyond the last word are ignored and read as
// zero. The register count and layout are this design's choice; the design
// description gives only the purpose of the block.
module apb_csr
  import amba_pkg::*;
#(
  parameter int unsigned NUM_CTRL = 4,
  parameter int unsigned NUM_STAT = 4
) (
  input  logic                             PCLK,
  input  logic                             PRESETn,
  input  logic                             PSEL,
  input  logic                             PENABLE,
  input  logic                             PWRITE,
  input  logic [ADDR_W-1:0]                PADDR,
  input  logic [DATA_W-1:0]                PWDATA,
  output logic [DATA_W-1:0]                PRDATA,
  output logic [NUM_CTRL-1:0][DATA_W-1:0]  ctrl_o,
  input  logic [NUM_STAT-1:0][DATA_W-1:0]  status_i
);

  localparam int unsigned NW = NUM_CTRL + NUM_STAT;
  logic [7:0] word;
  assign word = PADDR[9:2];

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      ctrl_o <= '0;
    end else if (PSEL && PENABLE && PWRITE) begin
      for (int i = 0; i < NUM_CTRL; i++)
        if (word == 8'(i)) ctrl_o[i] <= PWDATA;
    end
  end

  always_comb begin
    PRDATA = '0;
    for (int i = 0; i < NW; i++) begin
      if (word == 8'(i)) PRDATA = (i < NUM_CTRL) ? ctrl_o[i] : status_i[i - NUM_CTRL];
    end
  end

endmodule
