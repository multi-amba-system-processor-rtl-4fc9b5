// ahb_master_model: behavioural AHB bus master standing in for one of the
// processors that use the system (testbench only, not synthesizable).
//
// Transfers are queued with push(addr, write, data). The model raises
// hbusreq while it has work, waits for hgrant, then issues single NONSEQ
// word transfers back to back, one address phase per cycle in which HREADY
// is high, with the write data driven in the following data phase. After a
// random quota of 1..MAX_QUOTA transfers it lowers hbusreq and waits until
// the grant is taken away before it asks again, so the arbiter gets to hand
// the bus over. Inputs are sampled at the falling clock edge and outputs
// change 1 time unit after the rising edge.
module ahb_master_model
  import amba_pkg::*;
#(
  parameter int unsigned MAX_QUOTA = 4
) (
  input  logic              HCLK,
  input  logic              HRESETn,
  input  logic              hgrant,
  input  logic              HREADY,
  output logic              hbusreq,
  output logic [ADDR_W-1:0] haddr,
  output htrans_e           htrans,
  output logic              hwrite,
  output logic [DATA_W-1:0] hwdata
);

  typedef struct { logic [ADDR_W-1:0] a; logic w; logic [DATA_W-1:0] d; } req_t;

  req_t q [$];
  req_t ap, dp;
  logic ap_valid = 1'b0, dp_valid = 1'b0;
  logic cooldown = 1'b0;
  int   quota = 1;
  int   done = 0;

  task automatic push(input logic [ADDR_W-1:0] a, input logic w, input logic [DATA_W-1:0] d);
    q.push_back('{a: a, w: w, d: d});
  endtask

  function automatic logic busy();
    return (q.size() > 0) || ap_valid || dp_valid;
  endfunction

  initial begin
    logic g, r;
    hbusreq = 1'b0; haddr = '0; htrans = HTRANS_IDLE; hwrite = 1'b0; hwdata = '0;
    forever begin
      @(negedge HCLK);
      g = hgrant; r = HREADY;
      @(posedge HCLK); #1;
      if (!HRESETn) begin
        ap_valid = 1'b0; dp_valid = 1'b0; cooldown = 1'b0;
      end else begin
        if (r) begin
          if (dp_valid) done++;
          dp = ap; dp_valid = ap_valid;
          ap_valid = 1'b0;
          if (g && !cooldown && q.size() > 0) begin
            ap = q.pop_front();
            ap_valid = 1'b1;
            quota--;
            if (quota == 0 || q.size() == 0) cooldown = 1'b1;
          end
        end
        if (cooldown && !g) begin
          cooldown = 1'b0;
          quota = int'($urandom_range(1, MAX_QUOTA));
        end
      end
      hbusreq = !cooldown && q.size() > 0;
      haddr   = ap_valid ? ap.a : '0;
      hwrite  = ap_valid ? ap.w : 1'b0;
      htrans  = ap_valid ? HTRANS_NONSEQ : HTRANS_IDLE;
      hwdata  = (dp_valid && dp.w) ? dp.d : '0;
    end
  end

endmodule
