// Round-robin memory multiplexer for line-wide transfers.
//
// Several masters share one memory port. A master raises `m_req` with its
// command fields and holds them until it sees `m_ack`; the port below follows
// the same rule. When the port is free, a round-robin arbiter picks one
// requesting master; the multiplexer then forwards that master's command
// until the memory acknowledges, passes the acknowledge and read line back,
// and becomes free again. Each hop costs one arbitration cycle. The read
// line is one bus shared by all masters (`m_rdata` is the port's `s_rdata`);
// only the acknowledged master takes it.
//
// The same unit serves two places of the design: inside a cache, where the
// cache controllers of the cores share the path to SDRAM, and at system
// level, where the core groups share the bus to off-chip memory. Using
// round-robin on both levels follows the document's bus arbitration; the
// handshake and the line-wide transfer are this design's choice.
module mem_mux #(
  parameter int unsigned N          = 2,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // masters
  input  logic [N-1:0]                 m_req,
  input  logic [N-1:0]                 m_we,
  input  logic [N-1:0][ADDR_W-1:0]     m_addr,
  input  logic [N-1:0][LINE_BYTES*8-1:0] m_wdata,
  input  logic [N-1:0][LINE_BYTES-1:0] m_wstrb,
  output logic [N-1:0]                 m_ack,
  output logic [LINE_BYTES*8-1:0]      m_rdata,
  // memory side
  output logic                         s_req,
  output logic                         s_we,
  output logic [ADDR_W-1:0]            s_addr,
  output logic [LINE_BYTES*8-1:0]      s_wdata,
  output logic [LINE_BYTES-1:0]        s_wstrb,
  input  logic                         s_ack,
  input  logic [LINE_BYTES*8-1:0]      s_rdata
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          busy_q;
  logic [IW-1:0] owner_q;
  logic [N-1:0]  grant;
  logic [IW-1:0] grant_idx;

  rr_arbiter #(.N(N)) u_arb (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (m_req),
    .accept (!busy_q),
    .grant  (grant)
  );

  always_comb begin
    grant_idx = '0;
    for (int unsigned i = 0; i < N; i++)
      if (grant[i]) grant_idx = IW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
    end else if (!busy_q) begin
      if (|grant) begin
        busy_q  <= 1'b1;
        owner_q <= grant_idx;
      end
    end else if (s_ack) begin
      busy_q <= 1'b0;
    end
  end

  assign s_req   = busy_q && m_req[owner_q];
  assign s_we    = m_we[owner_q];
  assign s_addr  = m_addr[owner_q];
  assign s_wdata = m_wdata[owner_q];
  assign s_wstrb = m_wstrb[owner_q];
  assign m_rdata = s_rdata;

  always_comb begin
    m_ack = '0;
    if (busy_q) m_ack[owner_q] = s_ack;
  end

  // A master keeps its request up until it is acknowledged.
  for (genvar i = 0; i < N; i++) begin : g_hold
    a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
      m_req[i] && !m_ack[i] |=> m_req[i]);
  end
  a_ack_owner: assert property (@(posedge clk) disable iff (!rst_n)
    s_ack |-> busy_q);

endmodule
