// tb_multi_amba_top: end-to-end test of the whole system at its default
// parameters (three masters, 1024-word memory, 16-word FIFO).
//
// Three behavioural AHB masters issue random single transfers to every
// target area (CSR, memory, FIFO, UART, PCI and network link ports), to
// unmapped target numbers inside the interface window and to addresses
// outside it (default slave), while the arbitration mode is switched
// between fixed priority, round robin, fair chance and random. A reference
// model of the whole system, driven only by the top-level ports, follows
// every transfer that completes on the shared bus and checks HRDATA, HRESP,
// the data-phase length (three cycles through the interface, one at the
// default slave), PCI/network write traffic, the CSR outputs and that only
// the granted master drives the bus. A directed phase then sends a byte
// over the UART and receives one. Every mechanism of the design is counted
// and must happen at least once.
module tb_multi_amba_top;
  import amba_pkg::*;

  localparam int NM = 3;
  localparam int N_RANDOM = 1500;   // random transfers per master

  logic                      HCLK = 1'b0, HRESETn = 1'b0;
  arb_mode_e                 ARBITRATION = ARB_FIXED;
  logic [NM-1:0]             m_hbusreq, m_hgrant;
  logic [NM-1:0][ADDR_W-1:0] m_haddr;
  htrans_e [NM-1:0]          m_htrans;
  logic [NM-1:0]             m_hwrite;
  logic [NM-1:0][DATA_W-1:0] m_hwdata;
  logic [DATA_W-1:0]         HRDATA;
  logic                      HREADY;
  hresp_e                    HRESP;
  logic [3:0]                HMASTER;
  logic                      DEFAULT;
  logic [3:0][DATA_W-1:0]    csr_ctrl_o;
  logic [2:0][DATA_W-1:0]    csr_status_i;
  logic                      uart_tx, uart_rx = 1'b1;
  logic                      pci_psel, net_psel, p_enable, p_write;
  logic [ADDR_W-1:0]         p_addr;
  logic [DATA_W-1:0]         p_wdata, pci_prdata, net_prdata;

  int checks = 0, failures = 0;

  multi_amba_top dut (.*);

  // PCI interface and network link stand-ins: read data is a fixed function
  // of the address.
  function automatic logic [DATA_W-1:0] pci_value(input logic [ADDR_W-1:0] a);
    return {a[15:0], 16'hC1C1};
  endfunction
  function automatic logic [DATA_W-1:0] net_value(input logic [ADDR_W-1:0] a);
    return {16'hBEEF, ~a[15:0]};
  endfunction
  assign pci_prdata = pci_value(p_addr);
  assign net_prdata = net_value(p_addr);

  ahb_master_model m0 (.HCLK, .HRESETn, .hgrant(m_hgrant[0]), .HREADY, .hbusreq(m_hbusreq[0]),
                       .haddr(m_haddr[0]), .htrans(m_htrans[0]), .hwrite(m_hwrite[0]), .hwdata(m_hwdata[0]));
  ahb_master_model m1 (.HCLK, .HRESETn, .hgrant(m_hgrant[1]), .HREADY, .hbusreq(m_hbusreq[1]),
                       .haddr(m_haddr[1]), .htrans(m_htrans[1]), .hwrite(m_hwrite[1]), .hwdata(m_hwdata[1]));
  ahb_master_model m2 (.HCLK, .HRESETn, .hgrant(m_hgrant[2]), .HREADY, .hbusreq(m_hbusreq[2]),
                       .haddr(m_haddr[2]), .htrans(m_htrans[2]), .hwrite(m_hwrite[2]), .hwdata(m_hwdata[2]));

  always #5 HCLK = ~HCLK;

  initial begin
    repeat (400000) @(posedge HCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s", $time, what);
    end
  endtask

  task automatic push(input int m, input logic [ADDR_W-1:0] a, input logic w, input logic [DATA_W-1:0] d);
    case (m)
      0: m0.push(a, w, d);
      1: m1.push(a, w, d);
      default: m2.push(a, w, d);
    endcase
  endtask

  function automatic logic [ADDR_W-1:0] taddr(input int t, input int word);
    return MP_BASE | (32'(t) << TGT_LSB) | (32'(word) << 2);
  endfunction

  // ---------------- reference model ----------------
  logic [DATA_W-1:0] ref_mem [1024];
  logic [DATA_W-1:0] ref_ctrl [4];
  logic [DATA_W-1:0] ref_fifo [$];
  logic              ref_ovf = 0, ref_unf = 0;
  logic [15:0]       ref_div = 16;
  logic [7:0]        ref_rxdata = 0;
  logic              ref_rxvalid = 0, ref_txbusy = 0;
  logic [ADDR_W-1:0] pci_exp [$], pci_seen [$];
  logic [DATA_W-1:0] pcid_exp [$], pcid_seen [$];
  logic [ADDR_W-1:0] net_exp [$], net_seen [$];

  // mechanism counters
  int n_mode [4];
  int n_handover = 0, n_contention = 0, n_wait = 0, n_default_slave = 0;
  int n_backtoback = 0, n_unmapped = 0, n_overflow = 0, n_underflow = 0;
  int n_fifo_full = 0, n_tgt [NUM_TARGETS], n_reads = 0, n_writes = 0;
  int n_uart_tx = 0, n_uart_rx = 0, n_default_out = 0;

  function automatic logic [DATA_W-1:0] fifo_status();
    return {16'd0, 8'(ref_fifo.size()), 4'd0, ref_unf, ref_ovf,
            ref_fifo.size() == 16, ref_fifo.size() == 0};
  endfunction

  // Applies one completed transfer to the model; returns expected read data.
  function automatic logic [DATA_W-1:0] apply(input logic [ADDR_W-1:0] a, input logic w,
                                              input logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] r;
    int t;
    r = '0;
    if ((a & MP_MASK) != (MP_BASE & MP_MASK)) begin
      n_default_slave++;
      return '0;
    end
    t = int'(a[TGT_LSB +: 3]);
    if (t >= NUM_TARGETS) begin
      n_unmapped++;
      return '0;
    end
    n_tgt[t]++;
    case (t)
      TGT_CSR: begin
        int word;
        word = int'(a[9:2]);
        if (w) begin if (word < 4) ref_ctrl[word] = d; end
        else if (word < 4) r = ref_ctrl[word];
        else if (word == 4) r = {30'd0, ref_fifo.size() == 16, ref_fifo.size() == 0};
        else if (word < 8) r = csr_status_i[word - 5];
      end
      TGT_MEM: begin
        if (w) ref_mem[a[11:2]] = d;
        else   r = ref_mem[a[11:2]];
      end
      TGT_FIFO: begin
        case (a[3:2])
          2'd0: if (w) begin
                  if (ref_fifo.size() < 16) ref_fifo.push_back(d);
                  else begin ref_ovf = 1; n_overflow++; end
                  if (ref_fifo.size() == 16) n_fifo_full++;
                end else begin
                  if (ref_fifo.size() > 0) r = ref_fifo.pop_front();
                  else begin ref_unf = 1; n_underflow++; end
                end
          2'd1: if (!w) r = fifo_status();
          2'd2: if (w) begin ref_fifo.delete(); ref_ovf = 0; ref_unf = 0; end
          default: ;
        endcase
      end
      TGT_UART: begin
        case (a[3:2])
          2'd0: if (w) ref_txbusy = 1;
          2'd1: if (!w) begin r = {24'd0, ref_rxdata}; ref_rxvalid = 0; end
          2'd2: if (!w) r = {29'd0, 1'b0, ref_rxvalid, ref_txbusy};
          default: if (w) ref_div = (d[15:0] < 2) ? 16'd2 : d[15:0];
                   else r = {16'd0, ref_div};
        endcase
      end
      TGT_PCI: if (w) begin pci_exp.push_back(a); pcid_exp.push_back(d); end else r = pci_value(a);
      default: if (w) net_exp.push_back(a); else r = net_value(a);
    endcase
    return r;
  endfunction

  // Bus monitor: follows address and data phases from the top-level ports.
  logic              dp_valid = 0, dp_w = 0;
  logic [ADDR_W-1:0] dp_a;
  int                dp_m = 0, dp_cycles = 0;
  int                last_owner = -1;
  logic              prev_default = 1;

  always @(negedge HCLK) if (HRESETn) begin
    logic [DATA_W-1:0] exp;
    logic completing;
    // protocol: only the owner of the address bus drives transfers
    for (int m = 0; m < NM; m++)
      if (m_htrans[m] != HTRANS_IDLE) check(int'(HMASTER) == m && m_hgrant[m], "only the granted master drives");
    check($onehot0(m_hgrant), "at most one grant");
    check(HRESP == HRESP_OKAY, "HRESP OKAY");
    // arbitration events
    if (prev_default && !DEFAULT) begin
      n_mode[ARBITRATION]++;
      if (last_owner >= 0 && last_owner != int'(HMASTER)) n_handover++;
      last_owner = int'(HMASTER);
      if ($countones(m_hbusreq) > 1) n_contention++;
    end
    prev_default = DEFAULT;
    if (DEFAULT) n_default_out++;
    if (!HREADY) n_wait++;
    // APB traffic to the external targets
    if (pci_psel && p_enable && p_write) begin pci_seen.push_back(p_addr); pcid_seen.push_back(p_wdata); end
    if (net_psel && p_enable && p_write) net_seen.push_back(p_addr);
    // data phase
    if (dp_valid) dp_cycles++;
    completing = dp_valid && HREADY;
    if (completing) begin
      exp = apply(dp_a, dp_w, m_hwdata[dp_m]);
      if (!dp_w) begin
        n_reads++;
        check(HRDATA == exp, $sformatf("read %h from master %0d: got %h expected %h", dp_a, dp_m, HRDATA, exp));
      end else n_writes++;
      if ((dp_a & MP_MASK) == (MP_BASE & MP_MASK))
        check(dp_cycles == 3, $sformatf("interface data phase %0d cycles, expected 3", dp_cycles));
      else
        check(dp_cycles == 1, $sformatf("default slave data phase %0d cycles, expected 1", dp_cycles));
      dp_valid = 0;
    end
    if (HREADY) begin
      int hm;
      hm = int'(HMASTER);
      if (hm < NM && m_htrans[hm] == HTRANS_NONSEQ) begin
        if (completing) n_backtoback++;
        dp_valid = 1; dp_a = m_haddr[hm]; dp_w = m_hwrite[hm]; dp_m = hm; dp_cycles = 0;
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic gen_random(input int m, input int phase);
    int k, t;
    logic [ADDR_W-1:0] a;
    logic w;
    k = $urandom % 100;
    w = $urandom;
    if (k < 35) a = taddr(TGT_MEM, (($urandom % 4) == 0) ? $urandom % 1024 : $urandom % 32);
    else if (k < 60) begin
      // FIFO: phase 0 pushes more, phase 1 pops more
      t = $urandom % 100;
      if (t < 85) begin
        a = taddr(TGT_FIFO, 0);
        w = (phase == 0) ? (($urandom % 100) < 75) : (($urandom % 100) < 25);
      end else if (t < 97) begin a = taddr(TGT_FIFO, 1); w = 0; end
      else begin a = taddr(TGT_FIFO, 2); w = 1; end
    end
    else if (k < 75) a = taddr(TGT_CSR, $urandom % 9);
    else if (k < 80) begin a = taddr(TGT_UART, 2 + ($urandom % 2)); w = 0; end
    else if (k < 87) a = taddr(TGT_PCI, $urandom % 64);
    else if (k < 94) a = taddr(TGT_NET, $urandom % 64);
    else if (k < 97) a = taddr(6 + ($urandom % 2), $urandom % 16);
    else a = 32'h1000_0000 | 32'($urandom % 1024) << 2;
    push(m, a, w, $urandom);
  endtask

  function automatic logic all_idle();
    return !m0.busy() && !m1.busy() && !m2.busy();
  endfunction

  initial begin
    logic [7:0] txb;
    int len;
    for (int i = 0; i < 3; i++) csr_status_i[i] = $urandom;
    for (int i = 0; i < 1024; i++) ref_mem[i] = 'x;
    for (int i = 0; i < 4; i++) ref_ctrl[i] = '0;
    repeat (3) @(posedge HCLK);
    #1 HRESETn = 1;
    // memory contents start unknown: initialise all words through master 0
    for (int i = 0; i < 1024; i++) push(0, taddr(TGT_MEM, i), 1'b1, $urandom);
    while (!all_idle()) @(posedge HCLK);
    // random traffic, in pieces, switching the arbitration mode
    for (int piece = 0; piece < 12; piece++) begin
      ARBITRATION = arb_mode_e'(piece % 4);
      for (int n = 0; n < N_RANDOM / 12; n++)
        for (int m = 0; m < NM; m++) gen_random(m, (piece / 2) % 2);
      while (!all_idle()) @(posedge HCLK);
    end
    // directed: UART transmit through master 1
    push(1, taddr(TGT_UART, 3), 1'b1, 32'd4);
    push(1, taddr(TGT_UART, 0), 1'b1, 32'h0000_00A5);
    while (!all_idle()) @(posedge HCLK);
    // decode the frame on uart_tx (started in the access cycle of the write)
    txb = '0;
    while (uart_tx) @(posedge HCLK);
    repeat (2) @(posedge HCLK);
    for (int i = 0; i < 8; i++) begin repeat (4) @(posedge HCLK); txb[i] = uart_tx; end
    repeat (4) @(posedge HCLK);
    check(uart_tx == 1'b1, "UART stop bit");
    check(txb == 8'hA5, $sformatf("UART sent %h expected a5", txb));
    n_uart_tx++;
    repeat (8) @(posedge HCLK);
    ref_txbusy = 0;
    // directed: UART receive, read by master 2
    uart_rx = 1'b0; repeat (4) @(posedge HCLK);
    for (int i = 0; i < 8; i++) begin uart_rx = 8'h3C >> i; repeat (4) @(posedge HCLK); end
    uart_rx = 1'b1; repeat (8) @(posedge HCLK);
    ref_rxdata = 8'h3C; ref_rxvalid = 1;
    push(2, taddr(TGT_UART, 2), 1'b0, '0);
    push(2, taddr(TGT_UART, 1), 1'b0, '0);
    push(2, taddr(TGT_UART, 2), 1'b0, '0);
    while (!all_idle()) @(posedge HCLK);
    n_uart_rx++;
    repeat (4) @(posedge HCLK);
    // final state
    for (int i = 0; i < 4; i++) check(csr_ctrl_o[i] == ref_ctrl[i], $sformatf("csr_ctrl_o[%0d]", i));
    check(pci_seen.size() == pci_exp.size() && net_seen.size() == net_exp.size(), "PCI/network write counts");
    for (int i = 0; i < pci_exp.size() && i < pci_seen.size(); i++)
      check(pci_seen[i] == pci_exp[i] && pcid_seen[i] == pcid_exp[i], "PCI write address/data");
    for (int i = 0; i < net_exp.size() && i < net_seen.size(); i++)
      check(net_seen[i] == net_exp[i], "network write address");
    // mechanisms
    begin
      string names [4] = '{"fixed priority", "round robin", "fair chance", "random"};
      for (int i = 0; i < 4; i++) begin
        $display("arbitration %-15s : %0d grants", names[i], n_mode[i]);
        check(n_mode[i] > 0, {"arbitration mode used: ", names[i]});
      end
      for (int t = 0; t < NUM_TARGETS; t++) begin
        $display("target %0d accesses      : %0d", t, n_tgt[t]);
        check(n_tgt[t] > 0, $sformatf("target %0d accessed", t));
      end
    end
    $display("reads %0d writes %0d", n_reads, n_writes);
    $display("handovers %0d contended arbitrations %0d wait cycles %0d back-to-back %0d",
             n_handover, n_contention, n_wait, n_backtoback);
    $display("default slave %0d unmapped %0d fifo full %0d overflow %0d underflow %0d no-grant cycles %0d",
             n_default_slave, n_unmapped, n_fifo_full, n_overflow, n_underflow, n_default_out);
    check(m0.done > 0, "master 0 was served");
    check(m1.done > 0, "master 1 was served");
    check(m2.done > 0, "master 2 was served");
    check(n_handover > 0, "bus handover happened");
    check(n_contention > 0, "contended arbitration happened");
    check(n_wait > 0, "wait states happened");
    check(n_backtoback > 0, "back-to-back transfers happened");
    check(n_default_slave > 0, "default slave answered");
    check(n_unmapped > 0, "unmapped target number accessed");
    check(n_fifo_full > 0 && n_overflow > 0 && n_underflow > 0, "FIFO full, overflow and underflow happened");
    check(n_uart_tx > 0 && n_uart_rx > 0, "UART transmit and receive happened");
    check(n_default_out > 0, "DEFAULT (no master granted) happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
