// ahb_decoder: AHB address decoder.
//
// Compares the address of each transfer with the base/mask pair of every
// slave and raises that slave's HSEL line (combinational, address phase).
// When no slave window matches, HSEL_DEFAULT is raised so that the default
// slave in ahb_bus_mux answers. With overlapping windows the lower-numbered
// slave wins. The default map has one slave, the multiprocessor interface, at
// MP_BASE/MP_MASK; the window layout is this design's choice.
module ahb_decoder
  import amba_pkg::*;
#(
  parameter int unsigned                  NUM_SLAVES = 1,
  parameter logic [NUM_SLAVES-1:0][ADDR_W-1:0] BASE = {NUM_SLAVES{MP_BASE}},
  parameter logic [NUM_SLAVES-1:0][ADDR_W-1:0] MASK = {NUM_SLAVES{MP_MASK}}
) (
  input  logic [ADDR_W-1:0]     HADDR,
  output logic [NUM_SLAVES-1:0] HSEL,
  output logic                  HSEL_DEFAULT
);

  always_comb begin
    logic hit;
    hit  = 1'b0;
    HSEL = '0;
    for (int s = 0; s < NUM_SLAVES; s++) begin
      if (!hit && ((HADDR & MASK[s]) == (BASE[s] & MASK[s]))) begin
        HSEL[s] = 1'b1;
        hit     = 1'b1;
      end
    end
    HSEL_DEFAULT = !hit;
  end

endmodule
