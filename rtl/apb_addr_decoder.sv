// apb_addr_decoder: address decoder of the multiprocessor interface.
//
// Drives one PSEL line per target area. A line is high during the APB setup
// and access cycles (states ST_SETUP and ST_ENABLE) when PADDR bits
// [TGT_LSB+2:TGT_LSB] hold that target's number. Target numbers above
// NUM_TARGETS-1 select nothing; such reads return zero. The field position
// and numbering are this design's memory map (see amba_pkg).
module apb_addr_decoder
  import amba_pkg::*;
#(
  parameter int unsigned NT = NUM_TARGETS
) (
  input  logic [ADDR_W-1:0] PADDR,
  input  bstate_e           state,
  output logic [NT-1:0]     PSEL
);

  logic [2:0] field;
  logic       active;
  assign field  = PADDR[TGT_LSB +: 3];
  assign active = (state == ST_SETUP) || (state == ST_ENABLE);

  always_comb begin
    for (int i = 0; i < NT; i++)
      PSEL[i] = active && (field == 3'(i));
  end

endmodule
