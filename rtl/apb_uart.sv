// apb_uart: UART target area, an asynchronous serial transmitter and
// receiver with an APB register interface.
//
// Frame format: 1 start bit (0), 8 data bits LSB first, 1 stop bit (1), no
// parity. Every bit lasts DIVISOR clock cycles. Register map (word offsets):
//   0  TXDATA   write starts sending the low byte (ignored while busy)
//   1  RXDATA   read returns the last received byte and clears rx_valid
//   2  STATUS   read only: [2] rx_overrun, [1] rx_valid, [0] tx_busy
//   3  DIVISOR  clock cycles per bit, read/write, reset value DIV_RESET;
//               values below 2 are stored as 2
// The receiver synchronises rx with two flip-flops, waits for a falling edge,
// checks the start bit half a bit later and then samples every data bit in
// its middle. A byte that arrives while rx_valid is still set is kept and
// rx_overrun is set (cleared by reading RXDATA). A frame whose stop bit is 0
// is dropped. The description names the UART and its purpose only; frame
// format, registers and sampling are this design's choices.
module apb_uart
  import amba_pkg::*;
#(
  parameter int unsigned DIV_RESET = 16
) (
  input  logic              PCLK,
  input  logic              PRESETn,
  input  logic              PSEL,
  input  logic              PENABLE,
  input  logic              PWRITE,
  input  logic [ADDR_W-1:0] PADDR,
  input  logic [DATA_W-1:0] PWDATA,
  output logic [DATA_W-1:0] PRDATA,
  output logic              tx,
  input  logic              rx
);

  logic [1:0]  reg_sel;
  logic        wr, rd;
  logic [15:0] divisor;

  assign reg_sel = PADDR[3:2];
  assign wr = PSEL && PENABLE &&  PWRITE;
  assign rd = PSEL && PENABLE && !PWRITE;

  // ---------------- transmitter ----------------
  logic        tx_busy;
  logic [9:0]  tx_shift;   // stop, data[7:0], start; bit 0 is on the line
  logic [3:0]  tx_bits;    // bits still to send
  logic [15:0] tx_cnt;

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      tx_busy  <= 1'b0;
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
    end else if (!tx_busy) begin
      if (wr && reg_sel == 2'd0) begin
        tx_busy  <= 1'b1;
        tx_shift <= {1'b1, PWDATA[7:0], 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= divisor - 1'b1;
      end
    end else if (tx_cnt != '0) begin
      tx_cnt <= tx_cnt - 1'b1;
    end else begin
      tx_shift <= {1'b1, tx_shift[9:1]};
      tx_bits  <= tx_bits - 1'b1;
      tx_cnt   <= divisor - 1'b1;
      if (tx_bits == 4'd1) tx_busy <= 1'b0;
    end
  end
  assign tx = tx_busy ? tx_shift[0] : 1'b1;

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rxst_e;
  rxst_e       rx_state;
  logic [1:0]  rx_sync;
  logic        rx_prev;
  logic [15:0] rx_cnt;
  logic [2:0]  rx_idx;
  logic [7:0]  rx_shift, rx_data;
  logic        rx_valid, rx_overrun;
  logic        rx_in;
  assign rx_in = rx_sync[1];

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      rx_sync    <= 2'b11;
      rx_prev    <= 1'b1;
      rx_state   <= RX_IDLE;
      rx_cnt     <= '0;
      rx_idx     <= '0;
      rx_shift   <= '0;
      rx_data    <= '0;
      rx_valid   <= 1'b0;
      rx_overrun <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[0], rx};
      rx_prev <= rx_in;
      if (rd && reg_sel == 2'd1) begin
        rx_valid   <= 1'b0;
        rx_overrun <= 1'b0;
      end
      unique case (rx_state)
        RX_IDLE:
          if (rx_prev && !rx_in) begin
            rx_state <= RX_START;
            rx_cnt   <= {1'b0, divisor[15:1]} - 1'b1;   // to middle of start bit
          end
        RX_START:
          if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else if (rx_in)   rx_state <= RX_IDLE;        // glitch, not a start bit
          else begin
            rx_state <= RX_DATA;
            rx_cnt   <= divisor - 1'b1;
            rx_idx   <= '0;
          end
        RX_DATA:
          if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_shift <= {rx_in, rx_shift[7:1]};
            rx_cnt   <= divisor - 1'b1;
            rx_idx   <= rx_idx + 1'b1;
            if (rx_idx == 3'd7) rx_state <= RX_STOP;
          end
        RX_STOP:
          if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_state <= RX_IDLE;
            if (rx_in) begin
              rx_data  <= rx_shift;
              rx_valid <= 1'b1;
              if (rx_valid && !(rd && reg_sel == 2'd1)) rx_overrun <= 1'b1;
            end
          end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  // ---------------- registers ----------------
  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn)                     divisor <= 16'(DIV_RESET);
    else if (wr && reg_sel == 2'd3)   divisor <= (PWDATA[15:0] < 16'd2) ? 16'd2 : PWDATA[15:0];
  end

  always_comb begin
    unique case (reg_sel)
      2'd0:    PRDATA = '0;
      2'd1:    PRDATA = {24'd0, rx_data};
      2'd2:    PRDATA = {29'd0, rx_overrun, rx_valid, tx_busy};
      default: PRDATA = {16'd0, divisor};
    endcase
  end

endmodule
