// tb_apb_fifo: random pushes and pops through APB checked against a queue
// model, including pushes to a full FIFO (overflow) and pops from an empty
// one (underflow). After every access the STATUS word (count, flags) and the
// full/empty outputs are compared with the model; CLEAR is exercised too.
module tb_apb_fifo;
  import amba_pkg::*;

  localparam int DEPTH = 16;

  logic              PCLK = 1'b0, PRESETn = 1'b0;
  logic              PSEL = 1'b0, PENABLE = 1'b0, PWRITE = 1'b0;
  logic [ADDR_W-1:0] PADDR = '0;
  logic [DATA_W-1:0] PWDATA = '0;
  logic [DATA_W-1:0] PRDATA;
  logic              full, empty;
  int                checks = 0, failures = 0;
  int                n_overflow = 0, n_underflow = 0, n_full = 0;

  apb_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 PCLK = ~PCLK;

  initial begin
    repeat (100000) @(posedge PCLK);
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

  initial begin
    logic [DATA_W-1:0] q [$];
    logic [DATA_W-1:0] d, exp;
    logic ovf, unf;
    ovf = 0; unf = 0;
    @(posedge PCLK); #1 PRESETn = 1;
    check(empty && !full, "empty after reset");
    for (int n = 0; n < 3000; n++) begin
      int op;
      // phases: mostly pushes, then mostly pops, so both ends are reached
      op = $urandom % 100;
      if (((n / 200) % 2 == 0) ? op < 70 : op < 30) begin
        d = $urandom;
        apb_write(0, d);
        if (q.size() < DEPTH) q.push_back(d);
        else begin ovf = 1; n_overflow++; end
      end else if (op < 97) begin
        apb_read(0, d);
        if (q.size() > 0) begin
          exp = q.pop_front();
          check(d == exp, $sformatf("pop %h expected %h", d, exp));
        end else begin
          unf = 1; n_underflow++;
          check(d == '0, "pop from empty reads zero");
        end
      end else begin
        apb_write(2, '0);
        q.delete(); ovf = 0; unf = 0;
      end
      if (q.size() == DEPTH) n_full++;
      apb_read(1, d);
      check(d == {16'd0, 8'(q.size()), 4'd0, unf, ovf, q.size() == DEPTH, q.size() == 0},
            $sformatf("status %h count %0d ovf %b unf %b", d, q.size(), ovf, unf));
      check(full == (q.size() == DEPTH) && empty == (q.size() == 0), "full/empty outputs");
    end
    check(n_overflow > 0 && n_underflow > 0 && n_full > 0, "overflow, underflow and full all happened");
    $display("overflows=%0d underflows=%0d full=%0d", n_overflow, n_underflow, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
