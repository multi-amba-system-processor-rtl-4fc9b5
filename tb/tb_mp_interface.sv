// tb_mp_interface: drives the multiprocessor interface as a single AHB
// master (HREADYIN tied to HREADYOUT) with random reads and writes, back to
// back and with idle gaps, to mapped and unmapped target numbers. A target
// model behind the APB side stores writes in an array and returns reads.
// Checks: read data against a model memory, the order and contents of every
// APB transfer against the AHB transfers, the APB setup/access sequence,
// PSEL decoding, the three-cycle data phase (two wait states) of every
// transfer, and HRESP always OKAY.
module tb_mp_interface;
  import amba_pkg::*;

  logic                   HCLK = 1'b0, HRESETn = 1'b0;
  logic                   HSEL = 1'b0;
  logic [ADDR_W-1:0]      HADDR = '0;
  logic                   HWRITE = 1'b0;
  htrans_e                HTRANS = HTRANS_IDLE;
  logic                   HREADYIN;
  logic [DATA_W-1:0]      HWDATA = '0;
  logic [DATA_W-1:0]      HRDATA;
  logic                   HREADYOUT;
  hresp_e                 HRESP;
  logic [NUM_TARGETS-1:0] PSEL;
  logic                   PENABLE, PWRITE;
  logic [ADDR_W-1:0]      PADDR;
  logic [DATA_W-1:0]      PWDATA, PRDATA;
  int                     checks = 0, failures = 0;

  mp_interface dut (.*);
  assign HREADYIN = HREADYOUT;

  always #5 HCLK = ~HCLK;

  initial begin
    repeat (50000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  function automatic int key(input logic [ADDR_W-1:0] a);
    return int'({a[TGT_LSB+2:TGT_LSB], a[5:2]});
  endfunction

  // ---------------- target model (APB side) ----------------
  logic [DATA_W-1:0] tmem [128];
  initial for (int i = 0; i < 128; i++) tmem[i] = 32'(i) * 32'h0101_0101;

  always_comb begin
    PRDATA = '0;
    if (PSEL != '0) PRDATA = tmem[key(PADDR)];
  end

  typedef struct { logic [ADDR_W-1:0] a; logic w; logic [DATA_W-1:0] d; } xfer_t;
  xfer_t apb_exp [$];
  int    n_apb = 0;
  logic  prev_setup = 1'b0;
  logic [NUM_TARGETS-1:0] prev_psel;
  logic [ADDR_W-1:0]      prev_addr;

  always @(posedge HCLK) if (HRESETn) begin
    if (PSEL != '0) begin
      check($onehot(PSEL), "one PSEL at a time");
      check(PSEL[PADDR[TGT_LSB +: 3]], "PSEL matches PADDR target field");
    end
    if (PENABLE && PSEL != '0) begin
      xfer_t e;
      check(prev_setup && prev_psel == PSEL && prev_addr == PADDR, "access cycle follows setup");
      check(apb_exp.size() > 0, "APB transfer was expected");
      if (apb_exp.size() > 0) begin
        e = apb_exp.pop_front();
        check(PADDR == e.a && PWRITE == e.w, $sformatf("APB address %h/%b expected %h/%b", PADDR, PWRITE, e.a, e.w));
        if (e.w) check(PWDATA == e.d, $sformatf("PWDATA %h expected %h", PWDATA, e.d));
      end
      if (PWRITE) tmem[key(PADDR)] <= PWDATA;
      n_apb++;
    end
    prev_setup <= (PSEL != '0) && !PENABLE;
    prev_psel  <= PSEL;
    prev_addr  <= PADDR;
  end

  // ---------------- AHB master ----------------
  initial begin
    logic [DATA_W-1:0] model [128];
    logic              ap_valid, dp_valid, dp_write;
    logic [ADDR_W-1:0] ap_addr, dp_addr;
    logic              ap_write;
    logic [DATA_W-1:0] ap_data, dp_data;
    int                dp_cycles, n_done, n_mapped_expected;
    for (int i = 0; i < 128; i++) model[i] = 32'(i) * 32'h0101_0101;
    dp_valid = 0; dp_cycles = 0; n_done = 0; n_mapped_expected = 0;
    @(posedge HCLK); #1 HRESETn = 1;
    while (n_done < 600) begin
      // choose this cycle's address phase
      ap_valid = ($urandom % 4) != 0;
      ap_addr  = MP_BASE | (32'($urandom % 8) << TGT_LSB) | (32'($urandom % 16) << 2);
      ap_write = $urandom;
      ap_data  = $urandom;
      HSEL   = ap_valid;
      HTRANS = ap_valid ? HTRANS_NONSEQ : HTRANS_IDLE;
      HADDR  = ap_addr;
      HWRITE = ap_write;
      HWDATA = dp_valid && dp_write ? dp_data : 32'hDEAD_BEEF;
      // hold until the slave is ready
      forever begin
        @(negedge HCLK);
        check(HRESP == HRESP_OKAY, "HRESP OKAY");
        if (dp_valid) dp_cycles++;
        if (HREADYOUT) break;
        @(posedge HCLK); #1;
      end
      // data phase ends
      if (dp_valid) begin
        check(dp_cycles == 3, $sformatf("data phase took %0d cycles, expected 3", dp_cycles));
        if (!dp_write) begin
          logic [DATA_W-1:0] exp;
          exp = (dp_addr[TGT_LSB +: 3] < NUM_TARGETS) ? model[key(dp_addr)] : '0;
          check(HRDATA == exp, $sformatf("HRDATA %h expected %h (addr %h)", HRDATA, exp, dp_addr));
        end else if (dp_addr[TGT_LSB +: 3] < NUM_TARGETS) begin
          model[key(dp_addr)] = dp_data;
        end
        n_done++;
      end
      // address phase taken
      dp_valid = ap_valid; dp_addr = ap_addr; dp_write = ap_write; dp_data = ap_data;
      dp_cycles = 0;
      if (ap_valid && ap_addr[TGT_LSB +: 3] < NUM_TARGETS) begin
        apb_exp.push_back('{a: ap_addr, w: ap_write, d: ap_data});
        n_mapped_expected++;
      end
      @(posedge HCLK); #1;
    end
    HSEL = 0; HTRANS = HTRANS_IDLE;
    repeat (5) @(posedge HCLK);
    check(apb_exp.size() <= 1, "all APB transfers seen");
    $display("AHB transfers=%0d APB transfers=%0d", n_done, n_apb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
