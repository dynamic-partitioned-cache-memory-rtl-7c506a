// Task-set workload on one core group (16 KB, 8 ways), comparing the dynamic
// partitioning with a static one on the same hardware.
//
// Five task sets of three or four critical tasks each (the set sizes of the
// evaluated benchmark sets; the working-set sizes and way counts are this
// testbench's own, since the real programs cannot run without processors)
// run frame by frame on the critical core. The non-critical core meanwhile
// runs a loop of random accesses over 14 KB and never stops.
//   dynamic: each task is wrapped in the four reconfiguration calls with its
//            own way count; between the tasks and the frame end the
//            non-critical core owns all 8 ways;
//   static:  the critical core takes the largest way count of the set once
//            and keeps it for the whole run (every task gets the same share).
// Checked: every read against a reference copy of memory; every critical
// task's second pass over its working set hits in every access in both
// modes; and the non-critical core misses less often with the dynamic
// partition than with the static one, for every task set.
module tb_taskset;
  import dpc_pkg::*;
  localparam int C = 2, W = 8, LB = 32, CW = 4;
  localparam int FRAMES = 3, FRAME_CYCLES = 40000;
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
    repeat (5000000) @(posedge clk);
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

  task automatic access(int c, logic we, logic [31:0] a, logic [31:0] d, logic [3:0] be);
    @(negedge clk);
    core_req[c] = 1; core_we[c] = we; core_addr[c] = {a[31:2], 2'b00};
    core_wdata[c] = d; core_be[c] = be;
    do begin @(posedge clk); #1; end while (!core_ack[c]);
    if (!we) check(core_rdata[c] == ref_word(a), $sformatf("core %0d read %h", c, a));
    else for (int b = 0; b < 4; b++) if (be[b]) ref_mem[{a[31:2], 2'b00} + 32'(b)] = d[b*8 +: 8];
    @(negedge clk);
    core_req[c] = 0;
  endtask

  task automatic reconf(cfg_op_e op, int num);
    @(negedge clk);
    cfg_op[0] = op; cfg_num[0] = CW'(num); cfg_valid[0] = 1;
    do begin @(posedge clk); #1; end while (!cfg_done[0]);
    check(int'(cfg_moved) == num, $sformatf("%s moved %0d of %0d", op.name(), cfg_moved, num));
    @(negedge clk);
    cfg_valid[0] = 0;
  endtask

  // critical task: read its working set twice; the second pass must all hit
  task automatic run_task(int t, int kbytes);
    int h0, m0;
    logic [31:0] b;
    b = 32'h0200_0000 + 32'(t) * 32'h0001_0000;
    for (int a = 0; a < kbytes * 1024; a += LB) access(1, 0, b + 32'(a), 0, 0);
    @(negedge clk); @(negedge clk);
    h0 = stat_hits[1]; m0 = stat_misses[1];
    for (int a = 0; a < kbytes * 1024; a += LB) access(1, 0, b + 32'(a) + 32'(4 * ((a / LB) % 8)), 0, 0);
    @(negedge clk); @(negedge clk);
    check(stat_misses[1] == m0 && stat_hits[1] - h0 == kbytes * 1024 / LB,
          $sformatf("task %0d second pass: %0d misses", t, stat_misses[1] - m0));
  endtask

  bit nc_run;
  task automatic nc_loop();
    while (nc_run)
      access(0, $urandom % 8 == 0, 32'h0100_0000 + 32'($urandom % 14336), $urandom, 4'hf);
  endtask

  // one set in one mode; returns the non-critical core's misses per 1000 lookups
  task automatic run_set(int kb[$], bit dynamic, output int permille);
    int maxw, h0, m0;
    maxw = 0;
    foreach (kb[i]) if ((kb[i] + 1) / 2 > maxw) maxw = (kb[i] + 1) / 2;
    // fresh start: reset the cache
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    @(negedge clk);
    if (!dynamic) begin
      reconf(OP_FREE_NC, maxw);
      reconf(OP_ALLOC_C, maxw);
    end
    h0 = stat_hits[0]; m0 = stat_misses[0];
    nc_run = 1;
    fork
      nc_loop();
      begin
        for (int f = 0; f < FRAMES; f++) begin
          longint t0;
          t0 = $time;
          foreach (kb[i]) begin
            int w;
            w = (kb[i] + 1) / 2;
            if (dynamic) begin
              reconf(OP_FREE_NC, w);
              reconf(OP_ALLOC_C, w);
            end
            run_task(i, kb[i]);
            if (dynamic) begin
              reconf(OP_FREE_C, w);
              reconf(OP_ALLOC_NC, w);
            end
          end
          check(($time - t0) / 10 < FRAME_CYCLES, "tasks missed the frame deadline");
          while (($time - t0) / 10 < FRAME_CYCLES) @(posedge clk);
        end
        nc_run = 0;
      end
    join
    @(negedge clk); @(negedge clk);
    permille = int'((longint'(stat_misses[0] - m0) * 1000) / longint'(stat_hits[0] - h0 + stat_misses[0] - m0));
  endtask

  initial begin
    int sets [5][$];
    int dyn, sta;
    sets[0] = '{4, 2, 6};      // three tasks
    sets[1] = '{6, 2, 4};
    sets[2] = '{8, 2, 4};
    sets[3] = '{4, 6, 2, 2};   // four tasks
    sets[4] = '{8, 4, 2};
    core_req = '0; core_we = '0; core_addr = '0; core_wdata = '0; core_be = '0;
    cfg_valid = '0; cfg_op = '{default: OP_FREE_NC}; cfg_num = '0; cfg_sel = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      run_set(sets[s], 0, sta);
      run_set(sets[s], 1, dyn);
      $display("task set %0d: non-critical misses per 1000 lookups static %0d dynamic %0d", s + 1, sta, dyn);
      check(dyn < sta, $sformatf("set %0d: dynamic partition did not reduce non-critical misses", s + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
