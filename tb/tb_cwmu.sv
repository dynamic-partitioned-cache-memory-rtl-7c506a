// Testbench of the ways management unit, with one non-critical and two
// critical cores. Random reconfiguration requests (all four operations, from
// both critical ports, sometimes at once) and randomly busy cache controllers.
// Half of the requests name particular ways with a random select mask.
// A reference model of the masks (lowest eligible free ways allocated,
// highest eligible owned ways released, no more than available) predicts
// every mask and the moved count. A directed case gives the critical core
// exactly the third and sixth ways. Also checked: reset partition, masks never overlap, `hold` stays up
// while a controller is busy and nothing changes then, the invalidation of
// released ways, and the request-to-done time with idle controllers (done
// two clock edges after the request is raised).
module tb_cwmu;
  import dpc_pkg::*;
  localparam int C = 3, W = 8, NCRIT = C - 1, CW = $clog2(W + 1);
  logic clk = 0, rst_n = 0;
  logic [NCRIT-1:0] cfg_valid, cfg_done;
  cfg_op_e [NCRIT-1:0] cfg_op;
  logic [NCRIT-1:0][CW-1:0] cfg_num;
  logic [NCRIT-1:0][W-1:0] cfg_sel;
  logic [CW-1:0] cfg_moved;
  logic [C-1:0][W-1:0] mask;
  logic [W-1:0] free_ways, inval;
  logic hold;
  logic [C-1:0] ctrl_idle;
  int checks = 0, failures = 0;
  logic [C-1:0][W-1:0] ref_mask;
  int n_ops[4], n_stalled, n_short, n_both, n_sel;

  cwmu #(.NUM_CORES(C), .NUM_WAYS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // masks never overlap, and never change while a controller is busy
  always @(posedge clk) if (rst_n) begin
    logic [W-1:0] acc;
    acc = '0;
    for (int c = 0; c < C; c++) begin
      check((acc & mask[c]) == '0, "masks overlap");
      acc |= mask[c];
    end
    check(free_ways == ~acc, "free pool");
  end
  logic [C-1:0][W-1:0] mask_d;
  logic busy_d;
  always @(posedge clk) begin
    if (rst_n && busy_d) check(mask == mask_d, "mask changed while a controller was busy");
    mask_d <= mask;
    busy_d <= !(&ctrl_idle);
  end

  // reference: apply one operation for critical port p
  function automatic int apply_ref(int p, cfg_op_e op, int num, logic [W-1:0] sel, output logic [W-1:0] freed);
    int tgt, moved;
    logic [W-1:0] pool;
    freed = '0; moved = 0;
    tgt = (op == OP_FREE_NC || op == OP_ALLOC_NC) ? 0 : p + 1;
    pool = sel;
    for (int c = 0; c < C; c++) pool &= ~ref_mask[c];
    if (op == OP_ALLOC_C || op == OP_ALLOC_NC) begin
      for (int w = 0; w < W; w++) if (pool[w] && moved < num) begin
        ref_mask[tgt][w] = 1; moved++;
      end
    end else begin
      for (int w = W - 1; w >= 0; w--) if (ref_mask[tgt][w] && sel[w] && moved < num) begin
        ref_mask[tgt][w] = 0; freed[w] = 1; moved++;
      end
    end
    return moved;
  endfunction

  // requests of one critical port, and the reference update when done
  task automatic request(int p, cfg_op_e op, int num, logic [W-1:0] sel = '1);
    int cyc, moved;
    logic [W-1:0] freed;
    cfg_op[p] = op; cfg_num[p] = CW'(num); cfg_sel[p] = sel; cfg_valid[p] = 1;
    if (sel != '1) n_sel++;
    cyc = 0;
    do begin
      @(posedge clk); #1; cyc++;
    end while (!cfg_done[p]);
    moved = apply_ref(p, op, num, sel, freed);
    check(cfg_moved == CW'(moved), $sformatf("moved %0d exp %0d", cfg_moved, moved));
    check(&ctrl_idle, "done with a busy controller");
    if (cyc == 2) n_short++;
    cfg_valid[p] = 0;
    @(posedge clk); #1;
    check(mask == ref_mask, $sformatf("mask %h exp %h", mask, ref_mask));
    check(inval == freed, $sformatf("inval %b exp %b", inval, freed));
    n_ops[int'(op)]++;
  endtask

  function automatic logic [W-1:0] rand_sel();
    return ($urandom % 2) ? W'($urandom) : '1;
  endfunction

  int stall;
  initial begin
    ctrl_idle = '1; stall = 0;
    forever begin
      @(negedge clk);
      if (stall > 0) stall--;
      else if (!hold && ($urandom % 10) == 0) stall = 1 + $urandom % 6;
      ctrl_idle = (stall > 0) ? ~C'(2) : '1;
      if (stall > 0 && hold) n_stalled++;
    end
  end

  initial begin
    cfg_valid = '0; cfg_op = '{default: OP_FREE_NC}; cfg_num = '0; cfg_sel = '1;
    foreach (n_ops[i]) n_ops[i] = 0;
    n_stalled = 0; n_short = 0; n_both = 0; n_sel = 0;
    ref_mask = '0; ref_mask[0] = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(mask == ref_mask, "reset partition");
    // a timed request with idle controllers: done in the third cycle
    begin
      int cyc;
      @(negedge clk);
      force ctrl_idle = '1;
      cfg_op[0] = OP_FREE_NC; cfg_num[0] = CW'(2); cfg_valid[0] = 1;
      cyc = 1;
      @(posedge clk); #1;
      while (!cfg_done[0]) begin cyc++; @(posedge clk); #1; end
      check(cyc == 2, $sformatf("request to done took %0d cycles", cyc));
      begin logic [W-1:0] f; void'(apply_ref(0, OP_FREE_NC, 2, '1, f)); end
      @(negedge clk); cfg_valid[0] = 0; release ctrl_idle;
      @(posedge clk); #1;
      check(mask == ref_mask, "after timed request");
    end
    // critical core 1 takes exactly the third and sixth ways, then returns them
    @(negedge clk);
    request(0, OP_ALLOC_NC, W);
    request(0, OP_FREE_NC, 2, 8'b0010_0100);
    check(mask[0] == 8'b1101_1011 && free_ways == 8'b0010_0100, "select: non-critical released ways 2 and 5");
    request(0, OP_ALLOC_C, 2, 8'b0010_0100);
    check(mask[1] == 8'b0010_0100 && free_ways == '0, "select: critical core owns ways 2 and 5");
    request(0, OP_FREE_C, 2, 8'b0010_0100);
    request(0, OP_ALLOC_NC, 2, 8'b0010_0100);
    check(mask[0] == '1, "select: ways returned");
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (($urandom % 4) == 0) begin
        n_both++;
        fork
          request(0, cfg_op_e'($urandom % 4), $urandom % (W + 2), rand_sel());
          request(1, cfg_op_e'($urandom % 4), $urandom % (W + 2), rand_sel());
        join
      end else begin
        request($urandom % 2, cfg_op_e'($urandom % 4), $urandom % (W + 2), rand_sel());
      end
    end
    check(n_stalled > 0 && n_both > 0, "coverage: stalled drain and simultaneous requests");
    check(n_sel > 0, "coverage: requests naming particular ways");
    for (int i = 0; i < 4; i++) check(n_ops[i] > 0, "coverage: every operation");
    $display("ops %0d %0d %0d %0d stalled %0d simultaneous %0d", n_ops[0], n_ops[1], n_ops[2], n_ops[3], n_stalled, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
