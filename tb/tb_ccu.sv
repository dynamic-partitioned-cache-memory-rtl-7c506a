// Testbench of the cache control unit: two cache controllers, joined through
// the core-to-cache switch to a ways block (16 KB, 8 ways, 32-byte lines)
// and through the unit's round-robin path to a behavioural SDRAM. The ways
// are split by fixed masks (ways 0-3 core 0, ways 4-7 core 1). Both cores run
// random reads and writes at once over separate regions; every read is
// checked against a reference copy of memory. Also checked: both controllers
// compete for SDRAM, the hit counters match, core 1's lines survive core 0's
// traffic (second pass all hits), and `hold` stops both controllers.
module tb_ccu;
  localparam int C = 2, W = 8, SETS = 64, LB = 32, LW = LB * 8, SW = 6, TW = 21;
  logic clk = 0, rst_n = 0;
  logic [C-1:0] core_req, core_we, core_ack;
  logic [C-1:0][31:0] core_addr, core_wdata, core_rdata;
  logic [C-1:0][3:0] core_be;
  logic [C-1:0][W-1:0] mask;
  logic hold;
  logic [C-1:0] ctrl_idle;
  logic [C-1:0] c_en, c_tag_we, c_data_we;
  logic [C-1:0][SW-1:0] c_set;
  logic [C-1:0][W-1:0] c_wsel, c_rvalid;
  logic [C-1:0][TW-1:0] c_wtag;
  logic [C-1:0][LW-1:0] c_wdata;
  logic [C-1:0][LB-1:0] c_wstrb;
  logic [C-1:0][W-1:0][TW-1:0] c_rtag;
  logic [C-1:0][W-1:0][LW-1:0] c_rdata;
  logic [W-1:0] way_en, way_tag_we, way_data_we, way_rvalid;
  logic [W-1:0][SW-1:0] way_set;
  logic [W-1:0][TW-1:0] way_wtag, way_rtag;
  logic [W-1:0][LW-1:0] way_wdata, way_rdata;
  logic [W-1:0][LB-1:0] way_wstrb;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr;
  logic [LW-1:0] mem_wdata, mem_rdata;
  logic [LB-1:0] mem_wstrb;
  logic [C-1:0][31:0] stat_hits, stat_misses;
  int reads, writes;
  int checks = 0, failures = 0;

  ccu dut (.*);
  ccs #(.NUM_CORES(C), .NUM_WAYS(W), .SET_W(SW), .TAG_W(TW), .LINE_BYTES(LB)) u_ccs (.*);
  cwb #(.NUM_WAYS(W), .SETS(SETS), .TAG_W(TW), .LINE_BYTES(LB)) u_cwb (.*, .way_inval('0));
  mem_model #(.LINE_BYTES(LB), .LATENCY(6)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .wstrb(mem_wstrb), .ack(mem_ack), .rdata(mem_rdata), .reads, .writes);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
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

  int n_arb = 0;
  always @(posedge clk) if (rst_n && &dut.m_req) n_arb++;

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

  int n_acc [C];
  task automatic access(int c, logic we, logic [31:0] a, logic [31:0] d, logic [3:0] be);
    @(negedge clk);
    core_req[c] = 1; core_we[c] = we; core_addr[c] = {a[31:2], 2'b00};
    core_wdata[c] = d; core_be[c] = be;
    do begin @(posedge clk); #1; end while (!core_ack[c]);
    if (!we) check(core_rdata[c] == ref_word(a), $sformatf("core %0d read %h", c, a));
    else for (int b = 0; b < 4; b++) if (be[b]) ref_mem[{a[31:2], 2'b00} + 32'(b)] = d[b*8 +: 8];
    n_acc[c]++;
    @(negedge clk);
    core_req[c] = 0;
  endtask

  task automatic traffic(int c, int n, int range);
    for (int i = 0; i < n; i++)
      access(c, $urandom % 3 == 0, 32'h0100_0000 * (c + 1) + 32'($urandom % range), $urandom, 4'($urandom | 1));
  endtask

  initial begin
    int h0, m0;
    core_req = '0; core_we = '0; core_addr = '0; core_wdata = '0; core_be = '0;
    mask[0] = 8'h0f; mask[1] = 8'hf0; hold = 0; n_acc = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // core 1 fills its 8 KB, then both run random traffic
    for (int a = 0; a < 8192; a += LB) access(1, 0, 32'h0200_0000 + 32'(a), 0, 0);
    fork
      traffic(0, 3000, 32768);
      traffic(1, 1500, 8192);
    join
    repeat (2) @(negedge clk);
    check(stat_hits[0] + stat_misses[0] == n_acc[0] && stat_hits[1] + stat_misses[1] == n_acc[1], "lookups counted");
    // core 0 thrashes its ways; core 1's lines are untouched
    h0 = stat_hits[1]; m0 = stat_misses[1];
    fork
      traffic(0, 2000, 65536);
      for (int a = 0; a < 8192; a += LB) access(1, 0, 32'h0200_0000 + 32'(a), 0, 0);
    join
    repeat (2) @(negedge clk);
    check(stat_hits[1] - h0 == 256 && stat_misses[1] == m0, "core 1 lost lines to core 0");
    check(n_arb > 0, "coverage: SDRAM contention");
    // hold
    @(negedge clk);
    hold = 1; core_req = '1; core_we = '0; core_addr[0] = 32'h0100_0000; core_addr[1] = 32'h0200_0000;
    repeat (8) begin @(posedge clk); #1; check(core_ack == '0 && ctrl_idle == '1, "started under hold"); end
    @(negedge clk); hold = 0;
    @(posedge clk); #1;
    check(ctrl_idle == '0, "both start after hold");
    while (core_ack != '0 || !(&ctrl_idle)) begin @(negedge clk); core_req = core_req & ~core_ack; end
    core_req = '0;
    $display("core0 %0d hits %0d misses, core1 %0d hits %0d misses, sdram contention %0d",
             stat_hits[0], stat_misses[0], stat_hits[1], stat_misses[1], n_arb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
