// tb_apb_memory: random APB writes and reads over the whole memory, checked
// against a model array; also checks that a write needs the access cycle
// (a setup cycle alone must not write).
module tb_apb_memory;
  import amba_pkg::*;

  localparam int DEPTH = 1024;

  logic              PCLK = 1'b0, PRESETn = 1'b0;
  logic              PSEL = 1'b0, PENABLE = 1'b0, PWRITE = 1'b0;
  logic [ADDR_W-1:0] PADDR = '0;
  logic [DATA_W-1:0] PWDATA = '0;
  logic [DATA_W-1:0] PRDATA;
  int                checks = 0, failures = 0;

  apb_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 PCLK = ~PCLK;

  initial begin
    repeat (200000) @(posedge PCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb_write(input int word, input logic [DATA_W-1:0] d);
    PADDR = MP_BASE | (32'(TGT_MEM) << TGT_LSB) | (32'(word) << 2);
    PWDATA = d; PWRITE = 1; PSEL = 1; PENABLE = 0;
    @(posedge PCLK); #1 PENABLE = 1;
    @(posedge PCLK); #1 PSEL = 0; PENABLE = 0; PWRITE = 0;
  endtask

  task automatic apb_read(input int word, output logic [DATA_W-1:0] d);
    PADDR = MP_BASE | (32'(TGT_MEM) << TGT_LSB) | (32'(word) << 2);
    PWRITE = 0; PSEL = 1; PENABLE = 0;
    @(posedge PCLK); #1 PENABLE = 1;
    #1 d = PRDATA;
    @(posedge PCLK); #1 PSEL = 0; PENABLE = 0;
  endtask

  initial begin
    logic [DATA_W-1:0] model [DEPTH];
    logic [DATA_W-1:0] d;
    @(posedge PCLK); #1 PRESETn = 1;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      apb_write(i, model[i]);
    end
    for (int n = 0; n < 3000; n++) begin
      int w;
      w = $urandom % DEPTH;
      if ($urandom % 3 == 0) begin
        model[w] = $urandom;
        apb_write(w, model[w]);
      end else begin
        apb_read(w, d);
        checks++;
        if (d !== model[w]) begin
          failures++;
          $display("FAIL word %0d read %h expected %h", w, d, model[w]);
        end
      end
    end
    // setup cycle only: no write
    PADDR = 32'd4 << 2; PWDATA = ~model[4]; PWRITE = 1; PSEL = 1; PENABLE = 0;
    @(posedge PCLK); #1 PSEL = 0; PWRITE = 0;
    apb_read(4, d);
    checks++;
    if (d !== model[4]) begin failures++; $display("FAIL write without access cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
