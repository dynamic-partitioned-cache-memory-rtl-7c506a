// Mixed-critical multi-core memory system.
//
// NUM_GROUPS core groups, each made of one non-critical core (core 0 of the
// group) and NUM_CORES-1 critical cores that share one dynamic partitioned
// cache (dp_cache). The caches of all groups reach the off-chip memory over
// one shared bus whose round-robin arbiter bounds the wait of any group by
// the number of groups. Within a group the cache's own round-robin
// multiplexer does the same for the cores, so arbitration is hierarchical.
//
// The processor cores and the off-chip memory with its controller are not
// part of this module: the core ports, the reconfiguration ports of the
// critical cores and the line-wide memory port are brought out. Ports are
// indexed [group][core]; see dp_cache for the handshakes.
//
// Two groups sharing a bus to off-chip memory, two cores per group and the
// round-robin bus follow the document's system figure; the grouping into a
// single module and the bus handshake are this design's.
module dpc_system #(
  parameter int unsigned NUM_GROUPS  = 2,
  parameter int unsigned NUM_CORES   = dpc_pkg::DPC_NUM_CORES,
  parameter int unsigned ADDR_W      = dpc_pkg::DPC_ADDR_W,
  parameter int unsigned DATA_W      = dpc_pkg::DPC_DATA_W,
  parameter int unsigned CACHE_BYTES = dpc_pkg::DPC_CACHE_BYTES,
  parameter int unsigned NUM_WAYS    = dpc_pkg::DPC_NUM_WAYS,
  parameter int unsigned LINE_BYTES  = dpc_pkg::DPC_LINE_BYTES,
  localparam int unsigned LINE_W     = LINE_BYTES * 8,
  localparam int unsigned BE_W       = DATA_W / 8,
  localparam int unsigned NCRIT      = NUM_CORES - 1,
  localparam int unsigned CNT_W      = $clog2(NUM_WAYS + 1)
) (
  input  logic                                                 clk,
  input  logic                                                 rst_n,
  // cores
  input  logic [NUM_GROUPS-1:0][NUM_CORES-1:0]                 core_req,
  input  logic [NUM_GROUPS-1:0][NUM_CORES-1:0]                 core_we,
  input  logic [NUM_GROUPS-1:0][NUM_CORES-1:0][ADDR_W-1:0]     core_addr,
  input  logic [NUM_GROUPS-1:0][NUM_CORES-1:0][DATA_W-1:0]     core_wdata,
  input  logic [NUM_GROUPS-1:0][NUM_CORES-1:0][BE_W-1:0]       core_be,
  output logic [NUM_GROUPS-1:0][NUM_CORES-1:0]                 core_ack,
  output logic [NUM_GROUPS-1:0][NUM_CORES-1:0][DATA_W-1:0]     core_rdata,
  // reconfiguration ports of the critical cores
  input  logic             [NUM_GROUPS-1:0][NCRIT-1:0]         cfg_valid,
  input  dpc_pkg::cfg_op_e [NUM_GROUPS-1:0][NCRIT-1:0]         cfg_op,
  input  logic             [NUM_GROUPS-1:0][NCRIT-1:0][CNT_W-1:0] cfg_num,
  input  logic             [NUM_GROUPS-1:0][NCRIT-1:0][NUM_WAYS-1:0] cfg_sel,
  output logic             [NUM_GROUPS-1:0][NCRIT-1:0]         cfg_done,
  output logic             [NUM_GROUPS-1:0][CNT_W-1:0]         cfg_moved,
  // partition status
  output logic [NUM_GROUPS-1:0][NUM_CORES-1:0][NUM_WAYS-1:0]   way_mask,
  output logic [NUM_GROUPS-1:0][NUM_WAYS-1:0]                  free_ways,
  // statistics
  output logic [NUM_GROUPS-1:0][NUM_CORES-1:0][31:0]           stat_hits,
  output logic [NUM_GROUPS-1:0][NUM_CORES-1:0][31:0]           stat_misses,
  // off-chip memory
  output logic                                                 mem_req,
  output logic                                                 mem_we,
  output logic [ADDR_W-1:0]                                    mem_addr,
  output logic [LINE_W-1:0]                                    mem_wdata,
  output logic [LINE_BYTES-1:0]                                mem_wstrb,
  input  logic                                                 mem_ack,
  input  logic [LINE_W-1:0]                                    mem_rdata
);

  logic [NUM_GROUPS-1:0]                 g_req, g_we, g_ack;
  logic [NUM_GROUPS-1:0][ADDR_W-1:0]     g_addr;
  logic [NUM_GROUPS-1:0][LINE_W-1:0]     g_wdata;
  logic [NUM_GROUPS-1:0][LINE_BYTES-1:0] g_wstrb;
  logic [LINE_W-1:0]                     g_rdata;

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_group
    dp_cache #(
      .NUM_CORES   (NUM_CORES),
      .ADDR_W      (ADDR_W),
      .DATA_W      (DATA_W),
      .CACHE_BYTES (CACHE_BYTES),
      .NUM_WAYS    (NUM_WAYS),
      .LINE_BYTES  (LINE_BYTES)
    ) u_cache (
      .clk         (clk),
      .rst_n       (rst_n),
      .core_req    (core_req[g]),
      .core_we     (core_we[g]),
      .core_addr   (core_addr[g]),
      .core_wdata  (core_wdata[g]),
      .core_be     (core_be[g]),
      .core_ack    (core_ack[g]),
      .core_rdata  (core_rdata[g]),
      .cfg_valid   (cfg_valid[g]),
      .cfg_op      (cfg_op[g]),
      .cfg_num     (cfg_num[g]),
      .cfg_sel     (cfg_sel[g]),
      .cfg_done    (cfg_done[g]),
      .cfg_moved   (cfg_moved[g]),
      .way_mask    (way_mask[g]),
      .free_ways   (free_ways[g]),
      .mem_req     (g_req[g]),
      .mem_we      (g_we[g]),
      .mem_addr    (g_addr[g]),
      .mem_wdata   (g_wdata[g]),
      .mem_wstrb   (g_wstrb[g]),
      .mem_ack     (g_ack[g]),
      .mem_rdata   (g_rdata),
      .stat_hits   (stat_hits[g]),
      .stat_misses (stat_misses[g])
    );
  end

  mem_mux #(
    .N          (NUM_GROUPS),
    .ADDR_W     (ADDR_W),
    .LINE_BYTES (LINE_BYTES)
  ) u_bus (
    .clk     (clk),
    .rst_n   (rst_n),
    .m_req   (g_req),
    .m_we    (g_we),
    .m_addr  (g_addr),
    .m_wdata (g_wdata),
    .m_wstrb (g_wstrb),
    .m_ack   (g_ack),
    .m_rdata (g_rdata),
    .s_req   (mem_req),
    .s_we    (mem_we),
    .s_addr  (mem_addr),
    .s_wdata (mem_wdata),
    .s_wstrb (mem_wstrb),
    .s_ack   (mem_ack),
    .s_rdata (mem_rdata)
  );

endmodule
