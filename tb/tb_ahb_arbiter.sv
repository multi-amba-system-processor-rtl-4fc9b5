// tb_ahb_arbiter: checks the multi-mode arbiter against a reference model.
//
// Each round applies a random non-empty request mask, waits for the grant
// and compares the granted master (HGRANT, HMASTER) with the model for the
// selected mode: fixed priority, round robin (pointer past the last winner)
// and fair chance (fewest grants so far). Random mode is checked for a legal
// winner and for spreading its grants over all masters. Each round also
// checks the request-to-grant latency (two cycles from idle), DEFAULT, that
// the grant is held while HREADY is low, and release back to idle. A final
// SPLIT scenario checks that a split master loses the bus, is not granted
// while masked even though it still requests, and is granted again once its
// HSPLIT bit is raised.
module tb_ahb_arbiter;
  import amba_pkg::*;

  localparam int N = 4;
  localparam int CNT_W = 4;

  logic         HCLK = 1'b0, HRESETn = 1'b0;
  logic [N-1:0] HBUSREQ = '0;
  logic         HREADY = 1'b1;
  hresp_e       HRESP = HRESP_OKAY;
  logic [N-1:0] HSPLIT = '0;
  arb_mode_e    ARBITRATION = ARB_FIXED;
  logic [N-1:0] HGRANT;
  logic [3:0]   HMASTER;
  logic         DEFAULT;
  int           checks = 0, failures = 0;

  ahb_arbiter #(.NUM_REQ(N), .CNT_W(CNT_W)) dut (.*);

  always #5 HCLK = ~HCLK;

  initial begin
    repeat (20000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: mode=%s req=%b HGRANT=%b HMASTER=%0d DEFAULT=%b",
               what, ARBITRATION.name(), HBUSREQ, HGRANT, HMASTER, DEFAULT);
    end
  endtask

  // reference model state
  int last = N - 1;
  int cnt [N];
  int rand_hits [N];

  function automatic int model_winner(input logic [N-1:0] req);
    int w;
    w = -1;
    case (ARBITRATION)
      ARB_FIXED: begin
        for (int i = N - 1; i >= 0; i--) if (req[i]) w = i;
      end
      ARB_ROUND_ROBIN: begin
        for (int j = N; j >= 1; j--) if (req[(last + j) % N]) w = (last + j) % N;
      end
      ARB_FAIR: begin
        int best;
        best = 1 << 30;
        for (int i = 0; i < N; i++) if (req[i] && cnt[i] < best) begin best = cnt[i]; w = i; end
      end
      default: w = -1;
    endcase
    return w;
  endfunction

  task automatic round(input logic [N-1:0] req);
    int exp, got, wait_cycles;
    exp = model_winner(req);
    HBUSREQ = req;
    wait_cycles = 0;
    @(posedge HCLK); #1;
    while (HGRANT == '0 && wait_cycles < 10) begin
      wait_cycles++;
      @(posedge HCLK); #1;
    end
    check(wait_cycles == 1, "grant two cycles after request from idle");
    check($onehot(HGRANT), "exactly one grant");
    got = 0;
    for (int i = 0; i < N; i++) if (HGRANT[i]) got = i;
    check(int'(HMASTER) == got, "HMASTER matches HGRANT");
    check(DEFAULT == 1'b0, "DEFAULT low while granted");
    check(req[got], "winner is a requester");
    if (ARBITRATION == ARB_RANDOM) rand_hits[got]++;
    else check(got == exp, $sformatf("winner %0d expected %0d", got, exp));
    // model update
    last = got;
    if (cnt[got] == (1 << CNT_W) - 1) begin
      for (int i = 0; i < N; i++) cnt[i] = 0;
    end else cnt[got]++;
    // hold: owner keeps requesting for a few cycles
    repeat (2) @(posedge HCLK);
    #1 check(HGRANT[got], "grant held while owner requests");
    // owner releases while HREADY is low: grant must stay
    HBUSREQ = '0;
    HREADY  = 1'b0;
    @(posedge HCLK); #1;
    check(HGRANT[got], "grant held while HREADY low");
    HREADY = 1'b1;
    @(posedge HCLK); #1;
    check(HGRANT == '0 && DEFAULT == 1'b1, "released to idle");
    @(posedge HCLK); #1;
  endtask

  initial begin
    arb_mode_e modes [4] = '{ARB_FIXED, ARB_ROUND_ROBIN, ARB_FAIR, ARB_RANDOM};
    repeat (2) @(posedge HCLK);
    #1 check(DEFAULT == 1'b1 && HGRANT == '0, "idle after reset");
    HRESETn = 1'b1;
    foreach (modes[m]) begin
      ARBITRATION = modes[m];
      for (int r = 0; r < 60; r++) begin
        logic [N-1:0] req;
        req = (modes[m] == ARB_RANDOM) ? '1 : N'($urandom_range(1, (1 << N) - 1));
        round(req);
      end
    end
    // round robin with all masters requesting must visit them in order
    ARBITRATION = ARB_ROUND_ROBIN;
    for (int r = 0; r < 8; r++) round('1);
    for (int i = 0; i < N; i++) check(rand_hits[i] > 3, $sformatf("random mode granted master %0d", i));
    // SPLIT: master 0 (highest priority) is split and must be passed over
    ARBITRATION = ARB_FIXED;
    HBUSREQ = 4'b0011;
    repeat (3) @(posedge HCLK);
    #1 check(HGRANT == 4'b0001, "master 0 granted before SPLIT");
    HRESP = HRESP_SPLIT; HREADY = 1'b0;
    @(posedge HCLK); #1 HREADY = 1'b1;
    @(posedge HCLK); #1 HRESP = HRESP_OKAY;
    for (int c = 0; c < 6; c++) begin
      check(!HGRANT[0], "split master not granted");
      @(posedge HCLK); #1;
    end
    check(HGRANT == 4'b0010, "master 1 granted while master 0 is split");
    HBUSREQ = 4'b0001;
    repeat (3) @(posedge HCLK);
    #1 check(HGRANT == '0 && DEFAULT, "no grant while only the split master requests");
    HSPLIT = 4'b0001;
    @(posedge HCLK); #1 HSPLIT = '0;
    repeat (2) @(posedge HCLK);
    #1 check(HGRANT == 4'b0001, "master 0 granted again after HSPLIT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
