// ahb_xfer_out_gen: AHB transfer output generator of the multiprocessor
// interface.
//
// Produces the AHB slave response from the state machine. HRESP is always
// OKAY (2'b00), as the design description states. HREADYOUT is high when the
// interface can end a data phase or take a new transfer: in ST_IDLE, in the
// access cycle of a write (ST_ENABLE with reg_write high) and in ST_RDONE.
// It is low in ST_WWAIT, ST_SETUP and in the access cycle of a read, which
// gives every transfer two wait states (this design's timing).
module ahb_xfer_out_gen
  import amba_pkg::*;
(
  input  bstate_e state,
  input  logic    reg_write,
  output logic    HREADYOUT,
  output hresp_e  HRESP
);

  always_comb begin
    unique case (state)
      ST_IDLE, ST_RDONE: HREADYOUT = 1'b1;
      ST_ENABLE:         HREADYOUT = reg_write;
      default:           HREADYOUT = 1'b0;
    endcase
  end

  assign HRESP = HRESP_OKAY;

endmodule
