// End-to-end testbench of the whole system at its default parameters: two
// core groups, each with a non-critical and a critical core sharing a 16 KB,
// 8-way dynamic partitioned cache, and one off-chip memory (behavioural, 10
// cycles latency) behind the round-robin bus.
//
// In both groups at once, the non-critical core runs a loop of random reads
// and writes while the critical core runs one complete critical task through
// the four-step wrapper: release 4 of the non-critical core's ways, take
// them, read an 8 KB working set twice, give the ways back, return them to
// the non-critical core. Group 0 lets the cache pick the ways; group 1 names
// ways 1, 2, 5 and 6 in its requests. Checked: every read against a reference copy of
// memory; every partition; the second pass of each critical task hits in
// every access although the other core and the other group keep the bus
// busy; the critical core is uncached after returning its ways. Counted, with
// a failure for any that never happens: bus contention between the groups,
// SDRAM-path contention inside a group, reconfiguration waiting for a busy
// controller, way invalidation, each of the four operations, a request
// naming particular ways.
module tb_dpc_system;
  import dpc_pkg::*;
  localparam int G = 2, C = 2, W = 8, LB = 32, CW = 4;
  logic clk = 0, rst_n = 0;
  logic [G-1:0][C-1:0] core_req, core_we, core_ack;
  logic [G-1:0][C-1:0][31:0] core_addr, core_wdata, core_rdata;
  logic [G-1:0][C-1:0][3:0] core_be;
  logic [G-1:0][0:0] cfg_valid, cfg_done;
  cfg_op_e [G-1:0][0:0] cfg_op;
  logic [G-1:0][0:0][CW-1:0] cfg_num;
  logic [G-1:0][0:0][W-1:0] cfg_sel;
  logic [G-1:0][CW-1:0] cfg_moved;
  logic [G-1:0][C-1:0][W-1:0] way_mask;
  logic [G-1:0][W-1:0] free_ways;
  logic [G-1:0][C-1:0][31:0] stat_hits, stat_misses;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr;
  logic [LB*8-1:0] mem_wdata, mem_rdata;
  logic [LB-1:0] mem_wstrb;
  int reads, writes;
  int checks = 0, failures = 0;

  dpc_system dut (.*);
  mem_model #(.LINE_BYTES(LB), .LATENCY(10)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .wstrb(mem_wstrb), .ack(mem_ack), .rdata(mem_rdata), .reads, .writes);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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

  // mechanism counters
  int n_bus = 0, n_sdram = 0, n_hold_wait = 0, n_inval = 0, n_sel = 0;
  int n_ops [4];
  logic [G-1:0][W-1:0] inval_seen;
  always @(posedge clk) begin
    if (|dut.g_group[0].u_cache.inval) inval_seen[0] = dut.g_group[0].u_cache.inval;
    if (|dut.g_group[1].u_cache.inval) inval_seen[1] = dut.g_group[1].u_cache.inval;
  end
  always @(posedge clk) if (rst_n) begin
    if (&dut.g_req) n_bus++;
    if (&dut.g_group[0].u_cache.u_ccu.m_req || &dut.g_group[1].u_cache.u_ccu.m_req) n_sdram++;
    if ((dut.g_group[0].u_cache.hold && !(&dut.g_group[0].u_cache.ctrl_idle)) ||
        (dut.g_group[1].u_cache.hold && !(&dut.g_group[1].u_cache.ctrl_idle))) n_hold_wait++;
    if (|dut.g_group[0].u_cache.inval || |dut.g_group[1].u_cache.inval) n_inval++;
  end

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

  task automatic access(int g, int c, logic we, logic [31:0] a, logic [31:0] d, logic [3:0] be);
    @(negedge clk);
    core_req[g][c] = 1; core_we[g][c] = we; core_addr[g][c] = {a[31:2], 2'b00};
    core_wdata[g][c] = d; core_be[g][c] = be;
    do begin @(posedge clk); #1; end while (!core_ack[g][c]);
    if (!we) check(core_rdata[g][c] == ref_word(a), $sformatf("g%0d c%0d read %h got %h exp %h", g, c, a, core_rdata[g][c], ref_word(a)));
    else for (int b = 0; b < 4; b++) if (be[b]) ref_mem[{a[31:2], 2'b00} + 32'(b)] = d[b*8 +: 8];
    @(negedge clk);
    core_req[g][c] = 0;
  endtask

  task automatic reconf(int g, cfg_op_e op, int num, logic [W-1:0] sel);
    @(negedge clk);
    cfg_op[g][0] = op; cfg_num[g][0] = CW'(num); cfg_sel[g][0] = sel; cfg_valid[g][0] = 1;
    if (sel != '1) n_sel++;
    do begin @(posedge clk); #1; end while (!cfg_done[g][0]);
    check(int'(cfg_moved[g]) == num, $sformatf("g%0d %s moved %0d", g, op.name(), cfg_moved[g]));
    n_ops[int'(op)]++;
    @(negedge clk);
    cfg_valid[g][0] = 0;
    @(negedge clk);
  endtask

  function automatic logic [31:0] base(int g, int c);
    return 32'h0100_0000 * (2 * g + c + 1);
  endfunction

  bit nc_run [G];
  task automatic nc_loop(int g);
    while (nc_run[g])
      access(g, 0, $urandom % 4 == 0, base(g, 0) + 32'($urandom % 12288), $urandom, 4'($urandom | 1));
  endtask

  task automatic crit_pass(int g, output int hits, output int misses);
    int h0, m0;
    h0 = stat_hits[g][1]; m0 = stat_misses[g][1];
    for (int a = 0; a < 8192; a += LB) access(g, 1, 0, base(g, 1) + 32'(a) + 32'(4 * ((a / LB) % 8)), 0, 0);
    repeat (2) @(negedge clk);
    hits = stat_hits[g][1] - h0; misses = stat_misses[g][1] - m0;
  endtask

  // one critical task on group g, wrapped in the four reconfiguration steps;
  // group 0 lets the unit pick the ways, group 1 names ways 1, 2, 5 and 6
  task automatic critical_task(int g);
    int h, m;
    logic [W-1:0] sel, crit;
    sel  = (g == 0) ? 8'hff : 8'h66;
    crit = (g == 0) ? 8'hf0 : 8'h66;
    repeat (3000 + 500 * g) @(posedge clk);
    reconf(g, OP_FREE_NC, 4, sel);
    check(way_mask[g][0] == ~crit && free_ways[g] == crit, $sformatf("g%0d after FreeWaysNC", g));
    reconf(g, OP_ALLOC_C, 4, sel);
    check(way_mask[g][1] == crit && free_ways[g] == 8'h00, $sformatf("g%0d after AlloWaysC", g));
    crit_pass(g, h, m);
    check(m == 256 && h == 0, $sformatf("g%0d first pass %0d hits %0d misses", g, h, m));
    crit_pass(g, h, m);
    check(h == 256 && m == 0, $sformatf("g%0d second pass %0d hits %0d misses", g, h, m));
    inval_seen[g] = '0;
    reconf(g, OP_FREE_C, 4, sel);
    repeat (2) @(negedge clk);
    check(inval_seen[g] == crit, $sformatf("g%0d invalidated %b", g, inval_seen[g]));
    reconf(g, OP_ALLOC_NC, 4, sel);
    check(way_mask[g][0] == 8'hff && way_mask[g][1] == 8'h00, "after AlloWaysNC");
    h = stat_hits[g][1];
    access(g, 1, 0, base(g, 1), 0, 0);
    repeat (2) @(negedge clk);
    check(stat_hits[g][1] == h, "critical core uncached after its task");
    repeat (2000) @(posedge clk);
    nc_run[g] = 0;
  endtask

  initial begin
    core_req = '0; core_we = '0; core_addr = '0; core_wdata = '0; core_be = '0;
    cfg_valid = '0; cfg_op = '{default: '{default: OP_FREE_NC}}; cfg_num = '0; cfg_sel = '1;
    foreach (n_ops[i]) n_ops[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int g = 0; g < G; g++)
      check(way_mask[g][0] == 8'hff && way_mask[g][1] == 8'h00, "reset partition");
    nc_run[0] = 1; nc_run[1] = 1;
    fork
      nc_loop(0);
      nc_loop(1);
      critical_task(0);
      critical_task(1);
    join
    repeat (4) @(negedge clk);
    for (int g = 0; g < G; g++)
      check(stat_hits[g][0] > 0 && stat_misses[g][0] > 0, "coverage: non-critical hits and misses");
    check(n_bus > 0, "coverage: both groups asked for the bus at once");
    check(n_sdram > 0, "coverage: both cores of a group asked for SDRAM at once");
    check(n_hold_wait > 0, "coverage: reconfiguration waited for a busy controller");
    check(n_inval > 0, "coverage: released ways invalidated");
    check(n_sel > 0, "coverage: reconfiguration naming particular ways");
    for (int i = 0; i < 4; i++) check(n_ops[i] > 0, "coverage: every reconfiguration operation");
    $display("bus contention %0d sdram contention %0d hold waits %0d inval %0d mem reads %0d writes %0d",
             n_bus, n_sdram, n_hold_wait, n_inval, reads, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
