// Testbench of the dynamic partitioned cache of one core group at its
// default size (16 KB, 8 ways, 32-byte lines, one non-critical core 0 and one
// critical core 1) with a behavioural SDRAM of 8 cycles latency.
//
// It plays the critical-task wrapper while the non-critical core runs a loop
// of random reads and writes:
//   1. release 4 ways of the non-critical core, give them to the critical one;
//   2. the critical task reads its 8 KB working set twice: the first pass
//      misses, the second must hit in every access, and takes the same number
//      of cycles whether the non-critical core is idle or busy (isolation);
//   3. the critical core returns its ways, the non-critical core takes them
//      back; the returned ways were invalidated, so the critical core's data
//      is no longer cached, and with no ways it is served uncached;
//   4. requests larger than what is available move only what exists.
// All read data is compared with a reference copy of memory (the cores use
// separate address regions), masks with the expected partition, and the
// read-hit time (one cycle after the request) is checked. Each mechanism is
// counted and a failure is counted for one that never happened.
module tb_dp_cache;
  import dpc_pkg::*;
  localparam int C = 2, W = 8, LB = 32, CW = 4;
  logic clk = 0, rst_n = 0;
  logic [C-1:0] core_req, core_we, core_ack;
  logic [C-1:0][31:0] core_addr, core_wdata, core_rdata;
  logic [C-1:0][3:0] core_be;
  logic [0:0] cfg_valid, cfg_done;
  cfg_op_e [0:0] cfg_op;
  logic [0:0][CW-1:0] cfg_num;
  logic [0:0][W-1:0] cfg_sel;
  logic [CW-1:0] cfg_moved;
  logic [C-1:0][W-1:0] way_mask;
  logic [W-1:0] free_ways;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr;
  logic [LB*8-1:0] mem_wdata, mem_rdata;
  logic [LB-1:0] mem_wstrb;
  logic [C-1:0][31:0] stat_hits, stat_misses;
  int reads, writes;
  int checks = 0, failures = 0;

  dp_cache dut (.*);
  mem_model #(.LINE_BYTES(LB), .LATENCY(8)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .wstrb(mem_wstrb), .ack(mem_ack), .rdata(mem_rdata), .reads, .writes);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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
  int n_hold_wait = 0, n_arb = 0, n_inval = 0, n_uncached = 0, n_short = 0;
  int n_ops [4];
  always @(posedge clk) if (rst_n) begin
    if (dut.hold && !(&dut.ctrl_idle)) n_hold_wait++;
    if (&dut.u_ccu.m_req) n_arb++;
    if (|dut.inval) n_inval++;
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

  task automatic access(int c, logic we, logic [31:0] a, logic [31:0] d, logic [3:0] be, output int cyc);
    @(negedge clk);
    core_req[c] = 1; core_we[c] = we; core_addr[c] = {a[31:2], 2'b00};
    core_wdata[c] = d; core_be[c] = be;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!core_ack[c]);
    if (!we) check(core_rdata[c] == ref_word(a), $sformatf("core %0d read %h got %h exp %h", c, a, core_rdata[c], ref_word(a)));
    else for (int b = 0; b < 4; b++) if (be[b]) ref_mem[{a[31:2], 2'b00} + 32'(b)] = d[b*8 +: 8];
    @(negedge clk);
    core_req[c] = 0;
  endtask

  task automatic reconf(cfg_op_e op, int num, int exp_moved);
    @(negedge clk);
    cfg_op[0] = op; cfg_num[0] = CW'(num); cfg_valid[0] = 1;
    do begin @(posedge clk); #1; end while (!cfg_done[0]);
    check(int'(cfg_moved) == exp_moved, $sformatf("op %s moved %0d exp %0d", op.name(), cfg_moved, exp_moved));
    if (int'(cfg_moved) < num) n_short++;
    n_ops[int'(op)]++;
    @(negedge clk);
    cfg_valid[0] = 0;
    @(negedge clk);
  endtask

  // the non-critical core's loop: random accesses over 12 KB
  bit nc_run;
  int nc_acc = 0;
  task automatic nc_loop();
    int cyc;
    while (nc_run) begin
      access(0, $urandom % 4 == 0, 32'h0010_0000 + 32'($urandom % 12288), $urandom, 4'($urandom | 1), cyc);
      nc_acc++;
    end
  endtask

  // one pass of the critical task over its working set; returns its cycles
  task automatic crit_pass(int bytes, output int cycles, output int hits, output int misses);
    int cyc, h0, m0;
    longint t0;
    h0 = stat_hits[1]; m0 = stat_misses[1];
    t0 = $time;
    for (int a = 0; a < bytes; a += LB) access(1, 0, 32'h0020_0000 + 32'(a) + 32'(4 * ((a / LB) % 8)), 0, 0, cyc);
    cycles = int'(($time - t0) / 10);
    repeat (2) @(negedge clk);
    hits = stat_hits[1] - h0; misses = stat_misses[1] - m0;
  endtask

  initial begin
    int cyc, cyc_quiet, cyc_busy, h, m;
    core_req = '0; core_we = '0; core_addr = '0; core_wdata = '0; core_be = '0;
    cfg_valid = '0; cfg_op = '{default: OP_FREE_NC}; cfg_num = '0; cfg_sel = '1;
    foreach (n_ops[i]) n_ops[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(way_mask[0] == 8'hff && way_mask[1] == 8'h00, "reset partition");

    // non-critical core alone, then the critical task arrives
    nc_run = 1;
    fork
      nc_loop();
      begin
        repeat (20000) @(posedge clk);
        reconf(OP_FREE_NC, 4, 4);
        check(way_mask[0] == 8'h0f && free_ways == 8'hf0, "after FreeWaysNC");
        reconf(OP_ALLOC_C, 4, 4);
        check(way_mask[1] == 8'hf0 && free_ways == 8'h00, "after AlloWaysC");
        // first pass warms the critical core's ways
        crit_pass(8192, cyc, h, m);
        check(m == 256 && h == 0, $sformatf("first pass: %0d hits %0d misses", h, m));
        // second pass with the non-critical core busy: every access hits
        crit_pass(8192, cyc_busy, h, m);
        check(h == 256 && m == 0, $sformatf("second pass with interference: %0d hits %0d misses", h, m));
        nc_run = 0;
      end
    join
    // third pass with the non-critical core idle: same time
    crit_pass(8192, cyc_quiet, h, m);
    check(h == 256 && m == 0, "third pass hits");
    check(cyc_busy == cyc_quiet, $sformatf("critical pass time %0d busy vs %0d quiet", cyc_busy, cyc_quiet));
    check(cyc_quiet == 256 * 2, $sformatf("pass of 256 hits took %0d cycles", cyc_quiet));
    access(1, 0, 32'h0020_0000, 0, 0, cyc);
    check(cyc == 1, $sformatf("read hit took %0d cycles", cyc));

    // the critical task ends: ways go back to the non-critical core
    reconf(OP_FREE_C, 4, 4);
    reconf(OP_ALLOC_NC, 4, 4);
    check(way_mask[0] == 8'hff && way_mask[1] == 8'h00, "after AlloWaysNC");
    // the critical core now owns nothing: served uncached
    h = stat_hits[1];
    for (int i = 0; i < 4; i++) begin
      access(1, 0, 32'h0020_0000, 0, 0, cyc);
      access(1, 1, 32'h0020_0040, $urandom, 4'hf, cyc);
      n_uncached++;
    end
    repeat (2) @(negedge clk);
    check(stat_hits[1] == h, "critical core hit with no ways");
    // the non-critical core may reuse the returned ways: its lines still read right
    nc_run = 1;
    fork
      nc_loop();
      begin repeat (5000) @(posedge clk); nc_run = 0; end
    join

    // requests beyond what exists
    reconf(OP_ALLOC_C, 3, 0);
    reconf(OP_FREE_NC, 9, 8);
    reconf(OP_ALLOC_C, 8, 8);
    check(way_mask[1] == 8'hff, "critical core owns all ways");
    for (int i = 0; i < 200; i++)
      access(1, $urandom % 2, 32'h0020_0000 + 32'($urandom % 32768), $urandom, 4'($urandom | 1), cyc);
    reconf(OP_FREE_C, 8, 8);
    reconf(OP_ALLOC_NC, 8, 8);

    repeat (4) @(negedge clk);
    check(stat_hits[0] > 0 && stat_misses[0] > 0, "coverage: non-critical hits and misses");
    check(n_hold_wait > 0, "coverage: reconfiguration waited for a busy controller");
    check(n_arb > 0, "coverage: both controllers asked for SDRAM at once");
    check(n_inval > 0, "coverage: released ways invalidated");
    check(n_uncached > 0 && n_short > 0, "coverage: uncached access, partial request");
    for (int i = 0; i < 4; i++) check(n_ops[i] > 0, "coverage: every reconfiguration operation");
    $display("nc accesses %0d hits %0d misses %0d | crit hits %0d misses %0d | hold waits %0d sdram contention %0d inval %0d",
             nc_acc, stat_hits[0], stat_misses[0], stat_hits[1], stat_misses[1], n_hold_wait, n_arb, n_inval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
