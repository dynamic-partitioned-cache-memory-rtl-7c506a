// Cache control unit.
//
// Holds one cache controller per core (NUM_CORES of them) and the path they
// share towards SDRAM. Each controller serves its own core from the ways in
// that core's mask; their memory requests (refills and write-through words)
// meet in a round-robin multiplexer, so one core waits for the other's
// transfer at most once per access. The ways management unit's `hold` goes
// to every controller and their `idle` flags come back as a vector.
//
// Following the document, the unit instantiates one controller per core and
// owns the connection to SDRAM; sharing that connection round-robin is this
// design's choice, matching the arbitration of the system bus.
module ccu #(
  parameter int unsigned NUM_CORES  = 2,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned NUM_WAYS   = 8,
  parameter int unsigned SETS       = 64,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned SET_W     = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TAG_W     = ADDR_W - SET_W - OFF_W,
  localparam int unsigned LINE_W    = LINE_BYTES * 8,
  localparam int unsigned BE_W      = DATA_W / 8
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // cores
  input  logic [NUM_CORES-1:0]                  core_req,
  input  logic [NUM_CORES-1:0]                  core_we,
  input  logic [NUM_CORES-1:0][ADDR_W-1:0]      core_addr,
  input  logic [NUM_CORES-1:0][DATA_W-1:0]      core_wdata,
  input  logic [NUM_CORES-1:0][BE_W-1:0]        core_be,
  output logic [NUM_CORES-1:0]                  core_ack,
  output logic [NUM_CORES-1:0][DATA_W-1:0]      core_rdata,
  // ways management
  input  logic [NUM_CORES-1:0][NUM_WAYS-1:0]    mask,
  input  logic                                  hold,
  output logic [NUM_CORES-1:0]                  ctrl_idle,
  // towards the core-to-cache switch
  output logic [NUM_CORES-1:0]                  c_en,
  output logic [NUM_CORES-1:0][SET_W-1:0]       c_set,
  output logic [NUM_CORES-1:0][NUM_WAYS-1:0]    c_wsel,
  output logic [NUM_CORES-1:0]                  c_tag_we,
  output logic [NUM_CORES-1:0]                  c_data_we,
  output logic [NUM_CORES-1:0][TAG_W-1:0]       c_wtag,
  output logic [NUM_CORES-1:0][LINE_W-1:0]      c_wdata,
  output logic [NUM_CORES-1:0][LINE_BYTES-1:0]  c_wstrb,
  input  logic [NUM_CORES-1:0][NUM_WAYS-1:0]    c_rvalid,
  input  logic [NUM_CORES-1:0][NUM_WAYS-1:0][TAG_W-1:0]  c_rtag,
  input  logic [NUM_CORES-1:0][NUM_WAYS-1:0][LINE_W-1:0] c_rdata,
  // SDRAM side
  output logic                                  mem_req,
  output logic                                  mem_we,
  output logic [ADDR_W-1:0]                     mem_addr,
  output logic [LINE_W-1:0]                     mem_wdata,
  output logic [LINE_BYTES-1:0]                 mem_wstrb,
  input  logic                                  mem_ack,
  input  logic [LINE_W-1:0]                     mem_rdata,
  // statistics
  output logic [NUM_CORES-1:0][31:0]            stat_hits,
  output logic [NUM_CORES-1:0][31:0]            stat_misses
);

  logic [NUM_CORES-1:0]                 m_req, m_we, m_ack;
  logic [NUM_CORES-1:0][ADDR_W-1:0]     m_addr;
  logic [NUM_CORES-1:0][LINE_W-1:0]     m_wdata;
  logic [NUM_CORES-1:0][LINE_BYTES-1:0] m_wstrb;
  logic [LINE_W-1:0]                    m_rdata;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_ctrl
    cache_ctrl #(
      .ADDR_W     (ADDR_W),
      .DATA_W     (DATA_W),
      .NUM_WAYS   (NUM_WAYS),
      .SETS       (SETS),
      .LINE_BYTES (LINE_BYTES)
    ) u_ctrl (
      .clk         (clk),
      .rst_n       (rst_n),
      .core_req    (core_req[c]),
      .core_we     (core_we[c]),
      .core_addr   (core_addr[c]),
      .core_wdata  (core_wdata[c]),
      .core_be     (core_be[c]),
      .core_ack    (core_ack[c]),
      .core_rdata  (core_rdata[c]),
      .mask        (mask[c]),
      .hold        (hold),
      .idle        (ctrl_idle[c]),
      .way_en      (c_en[c]),
      .way_set     (c_set[c]),
      .way_wsel    (c_wsel[c]),
      .way_tag_we  (c_tag_we[c]),
      .way_data_we (c_data_we[c]),
      .way_wtag    (c_wtag[c]),
      .way_wdata   (c_wdata[c]),
      .way_wstrb   (c_wstrb[c]),
      .way_rvalid  (c_rvalid[c]),
      .way_rtag    (c_rtag[c]),
      .way_rdata   (c_rdata[c]),
      .mem_req     (m_req[c]),
      .mem_we      (m_we[c]),
      .mem_addr    (m_addr[c]),
      .mem_wdata   (m_wdata[c]),
      .mem_wstrb   (m_wstrb[c]),
      .mem_ack     (m_ack[c]),
      .mem_rdata   (m_rdata),
      .stat_hits   (stat_hits[c]),
      .stat_misses (stat_misses[c])
    );
  end

  mem_mux #(
    .N          (NUM_CORES),
    .ADDR_W     (ADDR_W),
    .LINE_BYTES (LINE_BYTES)
  ) u_sdram_mux (
    .clk     (clk),
    .rst_n   (rst_n),
    .m_req   (m_req),
    .m_we    (m_we),
    .m_addr  (m_addr),
    .m_wdata (m_wdata),
    .m_wstrb (m_wstrb),
    .m_ack   (m_ack),
    .m_rdata (m_rdata),
    .s_req   (mem_req),
    .s_we    (mem_we),
    .s_addr  (mem_addr),
    .s_wdata (mem_wdata),
    .s_wstrb (mem_wstrb),
    .s_ack   (mem_ack),
    .s_rdata (mem_rdata)
  );

endmodule
