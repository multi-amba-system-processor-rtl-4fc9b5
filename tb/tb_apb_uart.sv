// tb_apb_uart: checks the UART transmitter by decoding the tx line in the
// testbench (start bit, 8 data bits LSB first, stop bit, each DIV cycles),
// including the frame length, and the receiver by serialising random bytes
// onto rx and reading RXDATA/STATUS. Also checks the overrun flag, a framing
// error (stop bit 0) being dropped, and the DIVISOR register.
module tb_apb_uart;
  import amba_pkg::*;

  localparam int DIV = 8;

  logic              PCLK = 1'b0, PRESETn = 1'b0;
  logic              PSEL = 1'b0, PENABLE = 1'b0, PWRITE = 1'b0;
  logic [ADDR_W-1:0] PADDR = '0;
  logic [DATA_W-1:0] PWDATA = '0;
  logic [DATA_W-1:0] PRDATA;
  logic              tx;
  logic              rx = 1'b1;
  int                checks = 0, failures = 0;

  apb_uart #(.DIV_RESET(16)) dut (.*);

  always #5 PCLK = ~PCLK;

  initial begin
    repeat (200000) @(posedge PCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apb_write(input int word, input logic [DATA_W-1:0] d);
    PADDR = 32'(word) << 2; PWDATA = d; PWRITE = 1; PSEL = 1; PENABLE = 0;
    @(posedge PCLK); #1 PENABLE = 1;
    @(posedge PCLK); #1 PSEL = 0; PENABLE = 0; PWRITE = 0;
  endtask

  task automatic apb_read(input int word, output logic [DATA_W-1:0] d);
    PADDR = 32'(word) << 2; PWRITE = 0; PSEL = 1; PENABLE = 0;
    @(posedge PCLK); #1 PENABLE = 1;
    #1 d = PRDATA;
    @(posedge PCLK); #1 PSEL = 0; PENABLE = 0;
  endtask

  // Decode one frame from tx, starting at the falling edge of the start bit.
  task automatic tx_frame(output logic [7:0] b, output logic stop_ok, output int len);
    int t0;
    t0 = 0;
    while (tx) begin @(posedge PCLK); t0++; if (t0 > 1000) break; end
    repeat (DIV / 2) @(posedge PCLK);
    check(tx == 1'b0, "start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (DIV) @(posedge PCLK);
      b[i] = tx;
    end
    repeat (DIV) @(posedge PCLK);
    stop_ok = tx;
    len = 0;
    while (!tx) begin @(posedge PCLK); len++; if (len > 1000) break; end
  endtask

  task automatic rx_frame(input logic [7:0] b, input logic stop);
    rx = 1'b0; repeat (DIV) @(posedge PCLK);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (DIV) @(posedge PCLK); end
    rx = stop; repeat (DIV) @(posedge PCLK);
    rx = 1'b1; repeat (DIV) @(posedge PCLK);
  endtask

  initial begin
    logic [DATA_W-1:0] d;
    logic [7:0] b;
    logic stop_ok;
    int len, busy_cycles;
    @(posedge PCLK); #1 PRESETn = 1;
    check(tx == 1'b1, "tx idles high");
    apb_read(3, d);
    check(d == 16, "divisor reset value");
    apb_write(3, DIV);
    apb_read(3, d);
    check(d == DIV, "divisor written");
    // transmitter
    for (int n = 0; n < 12; n++) begin
      logic [7:0] v;
      v = $urandom;
      fork
        apb_write(0, {24'hABCDEF, v});
        tx_frame(b, stop_ok, len);
      join
      check(b == v, $sformatf("tx byte %h expected %h", b, v));
      check(stop_ok, "tx stop bit");
      // wait for busy to clear, then measure nothing is pending
      busy_cycles = 0;
      do begin apb_read(2, d); busy_cycles++; end while (d[0] && busy_cycles < 100);
      check(!d[0], "tx_busy clears");
    end
    // frame length: busy lasts 10 bit times
    apb_write(0, 8'h55);
    busy_cycles = 1;   // access cycle of the write
    while (dut.tx_busy) begin @(posedge PCLK); busy_cycles++; end
    check(busy_cycles >= 10 * DIV && busy_cycles <= 10 * DIV + 2,
          $sformatf("frame takes %0d cycles, expected %0d", busy_cycles, 10 * DIV));
    // receiver
    for (int n = 0; n < 12; n++) begin
      logic [7:0] v;
      v = $urandom;
      rx_frame(v, 1'b1);
      apb_read(2, d);
      check(d[1] == 1'b1 && d[2] == 1'b0, "rx_valid set, no overrun");
      apb_read(1, d);
      check(d[7:0] == v, $sformatf("rx byte %h expected %h", d[7:0], v));
      apb_read(2, d);
      check(d[1] == 1'b0, "rx_valid cleared by read");
    end
    // overrun
    rx_frame(8'h11, 1'b1);
    rx_frame(8'h22, 1'b1);
    apb_read(2, d);
    check(d[2:1] == 2'b11, "overrun flagged");
    apb_read(1, d);
    check(d[7:0] == 8'h22, "newest byte kept on overrun");
    // framing error: stop bit low, byte dropped
    rx_frame(8'h33, 1'b0);
    apb_read(2, d);
    check(d[1] == 1'b0, "frame with bad stop bit dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
