// apb_fifo: FIFO target area, a first-in first-out buffer of DEPTH 32-bit
// words shared by the masters.
//
// Register map (word offsets):
//   0  DATA    write pushes PWDATA, read pops and returns the oldest word
//   1  STATUS  read only: [15:8] count, [3] underflow, [2] overflow,
//              [1] full, [0] empty
//   2  CLEAR   any write empties the FIFO and clears both sticky flags
// A push to a full FIFO is dropped and sets the sticky overflow flag; a pop
// from an empty FIFO returns zero and sets the sticky underflow flag. Pushes
// and pops happen in the APB access cycle; DATA reads show the head word
// combinationally. Storage is a circular buffer with read and write pointers
// and a count. Depth, register map and flags are this design's choices; the
// description gives only the FIFO's function.
module apb_fifo
  import amba_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              PCLK,
  input  logic              PRESETn,
  input  logic              PSEL,
  input  logic              PENABLE,
  input  logic              PWRITE,
  input  logic [ADDR_W-1:0] PADDR,
  input  logic [DATA_W-1:0] PWDATA,
  output logic [DATA_W-1:0] PRDATA,
  output logic              full,
  output logic              empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wr_ptr, rd_ptr;
  logic [AW:0]       count;
  logic              overflow, underflow;
  logic [1:0]        reg_sel;
  logic              access, push, pop, clear;

  assign reg_sel = PADDR[3:2];
  assign access  = PSEL && PENABLE;
  assign push    = access &&  PWRITE && reg_sel == 2'd0;
  assign pop     = access && !PWRITE && reg_sel == 2'd0;
  assign clear   = access &&  PWRITE && reg_sel == 2'd2;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge PCLK) begin
    if (push && !full) mem[wr_ptr] <= PWDATA;
  end

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else if (clear) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (push) begin
        if (full) overflow <= 1'b1;
        else      wr_ptr   <= inc(wr_ptr);
      end
      if (pop) begin
        if (empty) underflow <= 1'b1;
        else       rd_ptr    <= inc(rd_ptr);
      end
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop && !empty);
    end
  end

  always_comb begin
    unique case (reg_sel)
      2'd0:    PRDATA = empty ? '0 : mem[rd_ptr];
      2'd1:    PRDATA = {16'd0, 8'(count), 4'd0, underflow, overflow, full, empty};
      default: PRDATA = '0;
    endcase
  end

endmodule
