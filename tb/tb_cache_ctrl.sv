// Testbench of one cache controller, wired straight to a small ways block
// (4 ways x 8 sets x 16-byte lines) and a behavioural memory. Random
// byte-masked reads and writes over an address range four times the cache
// size are checked against a reference copy of memory. Also checked: the
// read hit acknowledged one cycle after the request, write-through (one memory write per core write),
// hit and miss counters, that victims are chosen only among the ways in the
// mask (lines in the other ways survive heavy traffic and hit afterwards),
// uncached service with an empty mask, and that `hold` keeps a request waiting.
module tb_cache_ctrl;
  localparam int AW = 32, DW = 32, W = 4, SETS = 8, LB = 16, LW = LB * 8;
  localparam int SW = 3, OFF = 4, TW = AW - SW - OFF;
  logic clk = 0, rst_n = 0;
  logic core_req, core_we, core_ack;
  logic [AW-1:0] core_addr;
  logic [DW-1:0] core_wdata, core_rdata;
  logic [3:0] core_be;
  logic [W-1:0] mask;
  logic hold, idle;
  logic way_en, way_tag_we, way_data_we;
  logic [SW-1:0] way_set;
  logic [W-1:0] way_wsel, way_rvalid;
  logic [TW-1:0] way_wtag;
  logic [LW-1:0] way_wdata;
  logic [LB-1:0] way_wstrb;
  logic [W-1:0][TW-1:0] way_rtag;
  logic [W-1:0][LW-1:0] way_rdata;
  logic mem_req, mem_we, mem_ack;
  logic [AW-1:0] mem_addr;
  logic [LW-1:0] mem_wdata, mem_rdata;
  logic [LB-1:0] mem_wstrb;
  logic [31:0] stat_hits, stat_misses;
  int reads, writes;
  int checks = 0, failures = 0;
  int n_acc = 0, n_wr = 0;

  cache_ctrl #(.ADDR_W(AW), .DATA_W(DW), .NUM_WAYS(W), .SETS(SETS), .LINE_BYTES(LB)) dut (.*);

  // single controller: every way takes its accesses
  logic [W-1:0] w_en, w_tag_we, w_data_we;
  logic [W-1:0][SW-1:0] w_set;
  logic [W-1:0][TW-1:0] w_wtag;
  logic [W-1:0][LW-1:0] w_wdata;
  logic [W-1:0][LB-1:0] w_wstrb;
  always_comb for (int w = 0; w < W; w++) begin
    w_en[w] = way_en; w_set[w] = way_set; w_wtag[w] = way_wtag;
    w_wdata[w] = way_wdata; w_wstrb[w] = way_wstrb;
    w_tag_we[w] = way_tag_we && way_wsel[w];
    w_data_we[w] = way_data_we && way_wsel[w];
  end
  cwb #(.NUM_WAYS(W), .SETS(SETS), .TAG_W(TW), .LINE_BYTES(LB)) u_cwb (
    .clk, .rst_n, .way_en(w_en), .way_set(w_set), .way_tag_we(w_tag_we),
    .way_data_we(w_data_we), .way_wtag(w_wtag), .way_wdata(w_wdata),
    .way_wstrb(w_wstrb), .way_inval('0), .way_rvalid, .way_rtag, .way_rdata);

  mem_model #(.ADDR_W(AW), .LINE_BYTES(LB), .LATENCY(5)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .wstrb(mem_wstrb), .ack(mem_ack), .rdata(mem_rdata), .reads, .writes);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  logic [7:0] ref_mem [logic [31:0]];
  function automatic logic [31:0] ref_word(logic [31:0] a);
    logic [31:0] w, r;
    w = ({a[31:2], 2'b00} * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
    for (int b = 0; b < 4; b++) begin
      logic [31:0] ab;
      ab = {a[31:2], 2'b00} + 32'(b);
      r[b*8 +: 8] = ref_mem.exists(ab) ? ref_mem[ab] : w[b*8 +: 8];
    end
    return r;
  endfunction

  // one access; returns the cycles from request to acknowledge
  task automatic access(logic we, logic [31:0] a, logic [31:0] d, logic [3:0] be, output int cyc);
    @(negedge clk);
    core_req = 1; core_we = we; core_addr = {a[31:2], 2'b00}; core_wdata = d; core_be = be;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!core_ack);
    if (!we) check(core_rdata == ref_word(a), $sformatf("read %h got %h exp %h", a, core_rdata, ref_word(a)));
    else begin
      for (int b = 0; b < 4; b++) if (be[b]) ref_mem[{a[31:2], 2'b00} + 32'(b)] = d[b*8 +: 8];
      n_wr++;
    end
    n_acc++;
    @(negedge clk);
    core_req = 0;
  endtask

  // the mask changes only between accesses, as the ways management unit does
  task automatic set_mask(logic [W-1:0] m);
    @(negedge clk);
    mask = m;
  endtask

  initial begin
    int cyc, h0, m0;
    core_req = 0; core_we = 0; core_addr = '0; core_wdata = '0; core_be = '0;
    mask = '1; hold = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // read miss then read hit: the hit is acknowledged one cycle later
    access(0, 32'h100, 0, 0, cyc);
    check(cyc > 2, "miss waits for memory");
    access(0, 32'h104, 0, 0, cyc);
    check(cyc == 1, $sformatf("read hit took %0d cycles", cyc));

    // random traffic over four times the cache size
    for (int i = 0; i < 3000; i++)
      access($urandom % 3 == 0, 32'($urandom % (4 * W * SETS * LB)), $urandom, 4'($urandom | 1), cyc);
    repeat (2) @(negedge clk);
    check(stat_hits + stat_misses == n_acc, "every lookup counted");
    check(writes == n_wr, $sformatf("write-through: %0d memory writes for %0d core writes", writes, n_wr));
    check(stat_hits > 0 && stat_misses > 0, "coverage: hits and misses");

    // isolation: fill ways 2,3 with lines, run traffic in ways 0,1, re-read
    set_mask(4'b1100);
    for (int s = 0; s < 2 * SETS; s++) access(0, 32'h8000 + 32'(s * LB), 0, 0, cyc);
    set_mask(4'b0011);
    for (int i = 0; i < 1000; i++)
      access($urandom % 2 == 0, 32'h10000 + 32'($urandom % (8 * W * SETS * LB)), $urandom, 4'hf, cyc);
    set_mask(4'b1100);
    h0 = stat_hits; m0 = stat_misses;
    for (int s = 0; s < 2 * SETS; s++) access(0, 32'h8000 + 32'(s * LB), 0, 0, cyc);
    repeat (2) @(negedge clk);
    check(stat_hits - h0 == 2 * SETS && stat_misses == m0, $sformatf("lines in ways outside the mask were evicted: %0d hits %0d misses", stat_hits - h0, stat_misses - m0));

    // empty mask: served uncached, nothing allocated
    set_mask('0);
    h0 = stat_hits;
    for (int i = 0; i < 4; i++) access(0, 32'h200, 0, 0, cyc);
    repeat (2) @(negedge clk);
    check(stat_hits == h0, "hit with an empty mask");

    // hold keeps a request waiting
    set_mask('1);
    access(0, 32'h300, 0, 0, cyc);
    @(negedge clk);
    hold = 1; core_req = 1; core_we = 0; core_addr = 32'h300;
    repeat (10) begin @(posedge clk); #1; check(!core_ack && idle, "access started under hold"); end
    @(negedge clk); hold = 0;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!core_ack);
    check(cyc == 1 && core_rdata == ref_word(32'h300), "access after hold");
    @(negedge clk); core_req = 0;

    $display("accesses %0d hits %0d misses %0d mem reads %0d writes %0d", n_acc, stat_hits, stat_misses, reads, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
