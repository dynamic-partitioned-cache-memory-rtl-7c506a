// Cache ways management unit.
//
// Owns the partitioning of the shared cache. It keeps one ways mask register
// per core (bit w set: the core owns way w); ways that no core owns form the
// free pool. Core 0 is the non-critical core; cores 1..NUM_CORES-1 are
// critical cores, and only they have a reconfiguration port, so the
// non-critical core can never change the partitioning itself. A critical core
// running a task issues, in order, the four requests of the task wrapper:
//   OP_FREE_NC  n : the non-critical core gives up n ways to the pool,
//   OP_ALLOC_C  n : the requesting critical core takes n ways from the pool,
//   (the task runs on its private ways)
//   OP_FREE_C   n : the critical core gives its ways back to the pool,
//   OP_ALLOC_NC n : the non-critical core takes n ways from the pool.
// A critical core can change only its own mask and the non-critical core's.
// Each request also carries a way-select mask `cfg_sel`: only ways set in it
// may be moved, so a core can name particular ways (say, ways 2 and 5), or
// pass all ones to let the unit choose. Among the eligible ways, allocation
// takes the lowest-numbered free ones and release gives up the
// highest-numbered owned ones; a request for more ways than are eligible
// moves as many as there are and reports the number actually moved.
//
// A change runs in three steps: the request is taken and `hold` stops the
// cache controllers from starting accesses; once every controller is idle
// the masks are rewritten, `cfg_done` pulses for the requester with
// `cfg_moved`, and every released way is invalidated (`inval`, one cycle
// later), so the next owner finds it empty and no data crosses between
// cores. With idle controllers `cfg_done` rises two cycles after
// `cfg_valid` is first seen. Several critical cores asking at once are served lowest port
// first. After reset the non-critical core owns every way.
//
// The operations, their restriction to critical cores, the free pool and
// choosing either a number of ways or particular ways follow the document;
// the select-mask encoding, which ways are picked within it, the
// drain-then-switch sequence, invalidation, the reset partition and the
// handshake are this design's.
module cwmu #(
  parameter int unsigned NUM_CORES = 2,
  parameter int unsigned NUM_WAYS  = 8,
  localparam int unsigned NCRIT    = NUM_CORES - 1,
  localparam int unsigned CNT_W    = $clog2(NUM_WAYS + 1),
  localparam int unsigned PIW      = (NCRIT > 1) ? $clog2(NCRIT) : 1,
  localparam int unsigned TW       = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // reconfiguration ports, one per critical core (port k is core k+1)
  input  logic    [NCRIT-1:0]                cfg_valid,
  input  dpc_pkg::cfg_op_e [NCRIT-1:0]                cfg_op,
  input  logic    [NCRIT-1:0][CNT_W-1:0]     cfg_num,
  input  logic    [NCRIT-1:0][NUM_WAYS-1:0]  cfg_sel,
  output logic    [NCRIT-1:0]                cfg_done,
  output logic    [CNT_W-1:0]                cfg_moved,
  // partitioning
  output logic    [NUM_CORES-1:0][NUM_WAYS-1:0] mask,
  output logic    [NUM_WAYS-1:0]             free_ways,
  // cache control unit
  output logic                               hold,
  input  logic    [NUM_CORES-1:0]            ctrl_idle,
  output logic    [NUM_WAYS-1:0]             inval
);

  typedef enum logic [1:0] {M_IDLE, M_DRAIN, M_APPLY} mstate_e;

  mstate_e                      state_q;
  logic [PIW-1:0]               port_q;
  dpc_pkg::cfg_op_e                      op_q;
  logic [CNT_W-1:0]             num_q;
  logic [NUM_WAYS-1:0]          sel_q;
  logic [NUM_CORES-1:0][NUM_WAYS-1:0] mask_q;

  logic [PIW-1:0]               pick;
  logic                         any_req;
  logic [TW-1:0]                target;
  logic [NUM_WAYS-1:0]          moving;
  logic [CNT_W-1:0]             moved;

  // lowest requesting port
  always_comb begin
    pick    = '0;
    any_req = 1'b0;
    for (int i = NCRIT - 1; i >= 0; i--) begin
      if (cfg_valid[i]) begin
        pick    = PIW'(i);
        any_req = 1'b1;
      end
    end
  end

  always_comb begin
    free_ways = '1;
    for (int unsigned c = 0; c < NUM_CORES; c++) free_ways &= ~mask_q[c];
  end

  // ways that the latched request moves
  always_comb begin
    logic [NUM_WAYS-1:0] src;
    target = (op_q == dpc_pkg::OP_FREE_NC || op_q == dpc_pkg::OP_ALLOC_NC) ? TW'(dpc_pkg::DPC_NC_CORE) : TW'(int'(port_q) + 1);
    moving = '0;
    moved  = '0;
    if (op_q == dpc_pkg::OP_ALLOC_C || op_q == dpc_pkg::OP_ALLOC_NC) begin
      src = free_ways & sel_q;
      for (int w = 0; w < NUM_WAYS; w++)
        if (src[w] && moved < num_q) begin
          moving[w] = 1'b1;
          moved     = moved + 1'b1;
        end
    end else begin
      src = mask_q[target] & sel_q;
      for (int w = NUM_WAYS - 1; w >= 0; w--)
        if (src[w] && moved < num_q) begin
          moving[w] = 1'b1;
          moved     = moved + 1'b1;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= M_IDLE;
      port_q  <= '0;
      op_q    <= dpc_pkg::OP_FREE_NC;
      num_q   <= '0;
      sel_q   <= '0;
      inval   <= '0;
      for (int unsigned c = 0; c < NUM_CORES; c++)
        mask_q[c] <= (c == dpc_pkg::DPC_NC_CORE) ? '1 : '0;
    end else begin
      inval <= '0;
      unique case (state_q)
        M_IDLE: if (any_req) begin
          port_q  <= pick;
          op_q    <= cfg_op[pick];
          num_q   <= cfg_num[pick];
          sel_q   <= cfg_sel[pick];
          state_q <= M_DRAIN;
        end
        M_DRAIN: if (&ctrl_idle) state_q <= M_APPLY;
        M_APPLY: begin
          if (op_q == dpc_pkg::OP_ALLOC_C || op_q == dpc_pkg::OP_ALLOC_NC) begin
            mask_q[target] <= mask_q[target] | moving;
          end else begin
            mask_q[target] <= mask_q[target] & ~moving;
            inval          <= moving;
          end
          state_q <= M_IDLE;
        end
        default: state_q <= M_IDLE;
      endcase
    end
  end

  assign hold      = (state_q != M_IDLE);
  assign mask      = mask_q;
  assign cfg_moved = moved;

  always_comb begin
    cfg_done = '0;
    if (state_q == M_APPLY) cfg_done[port_q] = 1'b1;
  end

  a_apply_idle: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == M_APPLY |-> &ctrl_idle);

endmodule
