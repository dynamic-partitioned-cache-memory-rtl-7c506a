// Dynamic partitioned cache memory of one core group.
//
// A set-associative cache shared by one non-critical core (core 0) and one or
// more critical cores, partitioned by whole ways. Every way belongs to at most
// one core at a time, so a critical task that owns ways sees no interference
// from the other core, and the ways it gives back after the task are used by
// the non-critical core again. Four parts:
//   cwmu - ways management unit: per-core ways masks, free pool, the
//          reconfiguration ports of the critical cores;
//   ccu  - one cache controller per core and the shared path to SDRAM;
//   ccs  - core-to-cache switch: routes each controller to its own ways;
//   cwb  - the ways: tag, valid and data storage, one bank per way.
// Geometry: CACHE_BYTES split into NUM_WAYS ways of SETS lines of LINE_BYTES;
// with the defaults, 16 KB, 8 ways, 64 sets, 32-byte lines.
//
// Interfaces: word-wide core ports (request held until `core_ack`); critical
// core reconfiguration ports (`cfg_valid`/`cfg_op`/`cfg_num`/`cfg_sel`, held
// until `cfg_done`); one line-wide memory port (request held until `mem_ack`).
// A read hit is acknowledged in the cycle after the request is taken;
// misses add the memory time; a reconfiguration request with idle
// controllers completes two cycles after it is raised. The block structure,
// the 16 KB / 8-way configuration and the two-core group follow the
// document; line size, policies and handshakes are this design's.
module dp_cache #(
  parameter int unsigned NUM_CORES   = dpc_pkg::DPC_NUM_CORES,
  parameter int unsigned ADDR_W      = dpc_pkg::DPC_ADDR_W,
  parameter int unsigned DATA_W      = dpc_pkg::DPC_DATA_W,
  parameter int unsigned CACHE_BYTES = dpc_pkg::DPC_CACHE_BYTES,
  parameter int unsigned NUM_WAYS    = dpc_pkg::DPC_NUM_WAYS,
  parameter int unsigned LINE_BYTES  = dpc_pkg::DPC_LINE_BYTES,
  localparam int unsigned SETS       = CACHE_BYTES / (NUM_WAYS * LINE_BYTES),
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES),
  localparam int unsigned SET_W      = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TAG_W      = ADDR_W - SET_W - OFF_W,
  localparam int unsigned LINE_W     = LINE_BYTES * 8,
  localparam int unsigned BE_W       = DATA_W / 8,
  localparam int unsigned NCRIT      = NUM_CORES - 1,
  localparam int unsigned CNT_W      = $clog2(NUM_WAYS + 1)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // cores (core 0 non-critical)
  input  logic [NUM_CORES-1:0]                 core_req,
  input  logic [NUM_CORES-1:0]                 core_we,
  input  logic [NUM_CORES-1:0][ADDR_W-1:0]     core_addr,
  input  logic [NUM_CORES-1:0][DATA_W-1:0]     core_wdata,
  input  logic [NUM_CORES-1:0][BE_W-1:0]       core_be,
  output logic [NUM_CORES-1:0]                 core_ack,
  output logic [NUM_CORES-1:0][DATA_W-1:0]     core_rdata,
  // reconfiguration ports of the critical cores (port k is core k+1)
  input  logic            [NCRIT-1:0]          cfg_valid,
  input  dpc_pkg::cfg_op_e [NCRIT-1:0]         cfg_op,
  input  logic            [NCRIT-1:0][CNT_W-1:0] cfg_num,
  input  logic            [NCRIT-1:0][NUM_WAYS-1:0] cfg_sel,
  output logic            [NCRIT-1:0]          cfg_done,
  output logic            [CNT_W-1:0]          cfg_moved,
  // partition status
  output logic [NUM_CORES-1:0][NUM_WAYS-1:0]   way_mask,
  output logic [NUM_WAYS-1:0]                  free_ways,
  // memory
  output logic                                 mem_req,
  output logic                                 mem_we,
  output logic [ADDR_W-1:0]                    mem_addr,
  output logic [LINE_W-1:0]                    mem_wdata,
  output logic [LINE_BYTES-1:0]                mem_wstrb,
  input  logic                                 mem_ack,
  input  logic [LINE_W-1:0]                    mem_rdata,
  // statistics
  output logic [NUM_CORES-1:0][31:0]           stat_hits,
  output logic [NUM_CORES-1:0][31:0]           stat_misses
);

  logic                                 hold;
  logic [NUM_CORES-1:0]                 ctrl_idle;
  logic [NUM_WAYS-1:0]                  inval;

  logic [NUM_CORES-1:0]                 c_en, c_tag_we, c_data_we;
  logic [NUM_CORES-1:0][SET_W-1:0]      c_set;
  logic [NUM_CORES-1:0][NUM_WAYS-1:0]   c_wsel, c_rvalid;
  logic [NUM_CORES-1:0][TAG_W-1:0]      c_wtag;
  logic [NUM_CORES-1:0][LINE_W-1:0]     c_wdata;
  logic [NUM_CORES-1:0][LINE_BYTES-1:0] c_wstrb;
  logic [NUM_CORES-1:0][NUM_WAYS-1:0][TAG_W-1:0]  c_rtag;
  logic [NUM_CORES-1:0][NUM_WAYS-1:0][LINE_W-1:0] c_rdata;

  logic [NUM_WAYS-1:0]                  way_en, way_tag_we, way_data_we, way_rvalid;
  logic [NUM_WAYS-1:0][SET_W-1:0]       way_set;
  logic [NUM_WAYS-1:0][TAG_W-1:0]       way_wtag, way_rtag;
  logic [NUM_WAYS-1:0][LINE_W-1:0]      way_wdata, way_rdata;
  logic [NUM_WAYS-1:0][LINE_BYTES-1:0]  way_wstrb;

  cwmu #(
    .NUM_CORES (NUM_CORES),
    .NUM_WAYS  (NUM_WAYS)
  ) u_cwmu (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_valid (cfg_valid),
    .cfg_op    (cfg_op),
    .cfg_num   (cfg_num),
    .cfg_sel   (cfg_sel),
    .cfg_done  (cfg_done),
    .cfg_moved (cfg_moved),
    .mask      (way_mask),
    .free_ways (free_ways),
    .hold      (hold),
    .ctrl_idle (ctrl_idle),
    .inval     (inval)
  );

  ccu #(
    .NUM_CORES  (NUM_CORES),
    .ADDR_W     (ADDR_W),
    .DATA_W     (DATA_W),
    .NUM_WAYS   (NUM_WAYS),
    .SETS       (SETS),
    .LINE_BYTES (LINE_BYTES)
  ) u_ccu (
    .clk         (clk),
    .rst_n       (rst_n),
    .core_req    (core_req),
    .core_we     (core_we),
    .core_addr   (core_addr),
    .core_wdata  (core_wdata),
    .core_be     (core_be),
    .core_ack    (core_ack),
    .core_rdata  (core_rdata),
    .mask        (way_mask),
    .hold        (hold),
    .ctrl_idle   (ctrl_idle),
    .c_en        (c_en),
    .c_set       (c_set),
    .c_wsel      (c_wsel),
    .c_tag_we    (c_tag_we),
    .c_data_we   (c_data_we),
    .c_wtag      (c_wtag),
    .c_wdata     (c_wdata),
    .c_wstrb     (c_wstrb),
    .c_rvalid    (c_rvalid),
    .c_rtag      (c_rtag),
    .c_rdata     (c_rdata),
    .mem_req     (mem_req),
    .mem_we      (mem_we),
    .mem_addr    (mem_addr),
    .mem_wdata   (mem_wdata),
    .mem_wstrb   (mem_wstrb),
    .mem_ack     (mem_ack),
    .mem_rdata   (mem_rdata),
    .stat_hits   (stat_hits),
    .stat_misses (stat_misses)
  );

  ccs #(
    .NUM_CORES  (NUM_CORES),
    .NUM_WAYS   (NUM_WAYS),
    .SET_W      (SET_W),
    .TAG_W      (TAG_W),
    .LINE_BYTES (LINE_BYTES)
  ) u_ccs (
    .clk         (clk),
    .rst_n       (rst_n),
    .mask        (way_mask),
    .c_en        (c_en),
    .c_set       (c_set),
    .c_wsel      (c_wsel),
    .c_tag_we    (c_tag_we),
    .c_data_we   (c_data_we),
    .c_wtag      (c_wtag),
    .c_wdata     (c_wdata),
    .c_wstrb     (c_wstrb),
    .c_rvalid    (c_rvalid),
    .c_rtag      (c_rtag),
    .c_rdata     (c_rdata),
    .way_en      (way_en),
    .way_set     (way_set),
    .way_tag_we  (way_tag_we),
    .way_data_we (way_data_we),
    .way_wtag    (way_wtag),
    .way_wdata   (way_wdata),
    .way_wstrb   (way_wstrb),
    .way_rvalid  (way_rvalid),
    .way_rtag    (way_rtag),
    .way_rdata   (way_rdata)
  );

  cwb #(
    .NUM_WAYS   (NUM_WAYS),
    .SETS       (SETS),
    .TAG_W      (TAG_W),
    .LINE_BYTES (LINE_BYTES)
  ) u_cwb (
    .clk         (clk),
    .rst_n       (rst_n),
    .way_en      (way_en),
    .way_set     (way_set),
    .way_tag_we  (way_tag_we),
    .way_data_we (way_data_we),
    .way_wtag    (way_wtag),
    .way_wdata   (way_wdata),
    .way_wstrb   (way_wstrb),
    .way_inval   (inval),
    .way_rvalid  (way_rvalid),
    .way_rtag    (way_rtag),
    .way_rdata   (way_rdata)
  );

endmodule
