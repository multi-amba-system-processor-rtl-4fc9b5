// ahb_arbiter: multi-mode AHB bus arbiter.
//
// Up to NUM_REQ masters request the bus on HBUSREQ; one at a time is granted
// (HGRANT one-hot) and its number is put on HMASTER[3:0]. When no master is
// granted, DEFAULT is high. ARBITRATION[1:0] selects the algorithm used each
// time the bus is handed over (codes in amba_pkg::arb_mode_e):
//   00 fixed priority  - the lowest-numbered requester wins
//   01 round robin     - search starts one past the last granted master
//   10 fair chance     - the requester granted least often so far wins
//                        (per-master grant counters; ties go to the lower
//                        number; all counters restart when one saturates)
//   11 random access   - search starts at a position given by a 16-bit LFSR
// The state machine follows the arbiter state diagram: IDLE, then on a
// request ARBITRATE (the selected algorithm picks a winner and HMASTER is
// loaded), then OPERATE (master operation, HGRANT high). The grant is held
// while the owner keeps HBUSREQ high; it is released when HBUSREQ drops and
// HREADY is high, and the arbiter goes back to ARBITRATE or IDLE.
//
// SPLIT transfers: when the slave answers the data-phase master with the
// first cycle of a SPLIT response (HRESP = SPLIT, HREADY low), that master's
// request is masked and its grant is taken away at the end of the response.
// It stays masked, whatever HBUSREQ says, until a slave raises its HSPLIT
// bit. Holding the grant without pre-emption, the priority order, the fair
// and random schemes, the code values 10/11 and the SPLIT mask mechanism
// (modelled on the AMBA 2 AHB arbiter) are this design's choices.
module ahb_arbiter
  import amba_pkg::*;
#(
  parameter int unsigned NUM_REQ = 4,
  parameter int unsigned CNT_W   = 4
) (
  input  logic               HCLK,
  input  logic               HRESETn,
  input  logic [NUM_REQ-1:0] HBUSREQ,
  input  logic               HREADY,
  input  hresp_e             HRESP,      // response of the current data phase
  input  logic [NUM_REQ-1:0] HSPLIT,     // slave releases a split master
  input  arb_mode_e          ARBITRATION,
  output logic [NUM_REQ-1:0] HGRANT,
  output logic [3:0]         HMASTER,
  output logic               DEFAULT
);

  typedef enum logic [1:0] {A_IDLE, A_ARBITRATE, A_OPERATE} astate_e;
  localparam int unsigned IDX_W = (NUM_REQ > 1) ? $clog2(NUM_REQ) : 1;

  astate_e              state;
  logic [IDX_W-1:0]     owner, last, winner;
  logic [IDX_W-1:0]     start;
  logic                 any_req;
  logic [15:0]          lfsr;
  logic [CNT_W-1:0]     cnt [NUM_REQ];
  logic [NUM_REQ-1:0]   split_mask;   // masters waiting for HSPLIT
  logic [NUM_REQ-1:0]   req;          // requests that may be granted
  logic [IDX_W-1:0]     dp_owner;     // master of the current data phase

  assign req     = HBUSREQ & ~split_mask;
  assign any_req = |req;

  // Data-phase owner and SPLIT mask.
  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_owner   <= '0;
      split_mask <= '0;
    end else begin
      if (HREADY) dp_owner <= owner;
      for (int i = 0; i < NUM_REQ; i++) begin
        if (HSPLIT[i])
          split_mask[i] <= 1'b0;
        else if (HRESP == HRESP_SPLIT && !HREADY && dp_owner == IDX_W'(i))
          split_mask[i] <= 1'b1;
      end
    end
  end

  // Start position of a rotating search, by mode.
  always_comb begin
    unique case (ARBITRATION)
      ARB_ROUND_ROBIN: start = (last == IDX_W'(NUM_REQ - 1)) ? '0 : last + 1'b1;
      ARB_RANDOM:      start = IDX_W'(lfsr[IDX_W-1:0] % NUM_REQ);
      default:         start = '0;
    endcase
  end

  // Winner selection.
  logic [CNT_W-1:0] best;
  logic             found;
  int unsigned      k;
  always_comb begin
    winner = '0;
    best   = '1;
    found  = 1'b0;
    k      = 0;
    if (ARBITRATION == ARB_FAIR) begin
      for (int i = 0; i < NUM_REQ; i++) begin
        if (req[i] && (!found || cnt[i] < best)) begin
          best   = cnt[i];
          winner = IDX_W'(i);
          found  = 1'b1;
        end
      end
    end else begin
      for (int j = 0; j < NUM_REQ; j++) begin
        k = 32'(start) + 32'(j);
        if (k >= NUM_REQ) k = k - NUM_REQ;
        if (!found && req[k]) begin
          winner = IDX_W'(k);
          found  = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      state <= A_IDLE;
      owner <= '0;
      last  <= IDX_W'(NUM_REQ - 1);
      lfsr  <= 16'hACE1;
      for (int i = 0; i < NUM_REQ; i++) cnt[i] <= '0;
    end else begin
      // x^16 + x^14 + x^13 + x^11 + 1, advanced every cycle
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      unique case (state)
        A_IDLE:
          if (any_req) state <= A_ARBITRATE;
        A_ARBITRATE:
          if (any_req) begin
            owner <= winner;
            last  <= winner;
            state <= A_OPERATE;
            if (cnt[winner] == '1) begin
              for (int i = 0; i < NUM_REQ; i++) cnt[i] <= '0;
            end else begin
              cnt[winner] <= cnt[winner] + 1'b1;
            end
          end else begin
            state <= A_IDLE;
          end
        A_OPERATE:
          if (!req[owner] && HREADY)
            state <= any_req ? A_ARBITRATE : A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  always_comb begin
    HGRANT = '0;
    if (state == A_OPERATE) HGRANT[owner] = 1'b1;
  end
  assign HMASTER = 4'(owner);
  assign DEFAULT = (state != A_OPERATE);

  // Only one master may ever be granted.
  a_onehot_grant: assert property (@(posedge HCLK) disable iff (!HRESETn) $onehot0(HGRANT));

endmodule
