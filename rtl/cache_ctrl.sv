// Cache controller of one core.
//
// Serves the word accesses of its core from the ways that the core currently
// owns (its ways mask) and from memory. An access is looked up in all owned
// ways at once:
//   read hit   - acknowledged with the word in the cycle after the request
//                is taken (one cycle to read the ways, compare in the next);
//   read miss  - the line is fetched from memory, written into a victim way
//                of the core and the word returned; a core that owns no way
//                is served from memory without allocation;
//   write      - write-through: a hit also updates the cached line, and the
//                word always goes to memory; a write miss allocates nothing.
// The victim is the lowest owned way that is invalid in the set, otherwise
// the owned way that the set's round-robin pointer points at, or the next
// owned way after it; the pointer then moves past the victim (FIFO order
// within each set).
// Since a victim is only ever chosen among the core's own ways, one core can
// never evict another core's lines.
//
// While `hold` is high no new access starts; `idle` tells the ways management
// unit that the controller is between accesses, so that ownership can change
// safely. Core port: raise `core_req` with its fields and hold them until the
// one-cycle `core_ack`. Memory port: the same rule with `mem_req`/`mem_ack`,
// whole lines (`mem_addr` is line-aligned, so its low bits are always
// zero), byte strobes for the written word. `stat_hits` and
// `stat_misses` count lookups for measurements.
//
// The document names the controller and its place (one per core, between
// core, switch and SDRAM); write-through, the replacement rule, the port
// handshakes and the timing are this design's choices.
module cache_ctrl #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned NUM_WAYS   = 8,
  parameter int unsigned SETS       = 64,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned SET_W     = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TAG_W     = ADDR_W - SET_W - OFF_W,
  localparam int unsigned LINE_W    = LINE_BYTES * 8,
  localparam int unsigned BE_W      = DATA_W / 8,
  localparam int unsigned WORDS     = LINE_BYTES / BE_W,
  localparam int unsigned WOFF_W    = $clog2(BE_W),
  localparam int unsigned WIDX_W    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned WAY_IW    = (NUM_WAYS > 1) ? $clog2(NUM_WAYS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // core
  input  logic                 core_req,
  input  logic                 core_we,
  input  logic [ADDR_W-1:0]    core_addr,
  input  logic [DATA_W-1:0]    core_wdata,
  input  logic [BE_W-1:0]      core_be,
  output logic                 core_ack,
  output logic [DATA_W-1:0]    core_rdata,
  // ways management
  input  logic [NUM_WAYS-1:0]  mask,
  input  logic                 hold,
  output logic                 idle,
  // ways, through the core-to-cache switch
  output logic                 way_en,
  output logic [SET_W-1:0]     way_set,
  output logic [NUM_WAYS-1:0]  way_wsel,
  output logic                 way_tag_we,
  output logic                 way_data_we,
  output logic [TAG_W-1:0]     way_wtag,
  output logic [LINE_W-1:0]    way_wdata,
  output logic [LINE_BYTES-1:0] way_wstrb,
  input  logic [NUM_WAYS-1:0]  way_rvalid,
  input  logic [NUM_WAYS-1:0][TAG_W-1:0]  way_rtag,
  input  logic [NUM_WAYS-1:0][LINE_W-1:0] way_rdata,
  // memory
  output logic                 mem_req,
  output logic                 mem_we,
  output logic [ADDR_W-1:0]    mem_addr,
  output logic [LINE_W-1:0]    mem_wdata,
  output logic [LINE_BYTES-1:0] mem_wstrb,
  input  logic                 mem_ack,
  input  logic [LINE_W-1:0]    mem_rdata,
  // statistics
  output logic [31:0]          stat_hits,
  output logic [31:0]          stat_misses
);

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_REFILL, S_WTHRU} state_e;

  state_e               state_q;
  logic                 we_q;
  logic [ADDR_W-1:0]    addr_q;
  logic [DATA_W-1:0]    wdata_q;
  logic [BE_W-1:0]      be_q;
  logic [NUM_WAYS-1:0]  victim_q;
  logic [SETS-1:0][WAY_IW-1:0] rr_q;  // per-set replacement pointer

  logic [TAG_W-1:0]     tag_q;
  logic [SET_W-1:0]     set_q;
  logic [WIDX_W-1:0]    widx_q;
  logic [NUM_WAYS-1:0]  hit_vec;
  logic                 hit;
  logic [LINE_W-1:0]    hit_line;
  logic [NUM_WAYS-1:0]  victim;
  logic [WAY_IW-1:0]    victim_idx;
  logic [LINE_W-1:0]    word_line;   // written word replicated over the line
  logic [LINE_BYTES-1:0] word_strb;  // its bytes within the line

  assign tag_q  = addr_q[ADDR_W-1 -: TAG_W];
  assign set_q  = addr_q[OFF_W +: SET_W];
  assign widx_q = (WORDS > 1) ? WIDX_W'(addr_q[OFF_W-1:WOFF_W]) : '0;

  // tag compare over the owned ways
  always_comb begin
    hit_line = '0;
    for (int unsigned w = 0; w < NUM_WAYS; w++) begin
      hit_vec[w] = mask[w] && way_rvalid[w] && (way_rtag[w] == tag_q);
      if (hit_vec[w]) hit_line = hit_line | way_rdata[w];
    end
    hit = |hit_vec;
  end

  // victim: first invalid owned way, else round-robin over owned ways
  always_comb begin
    logic        found;
    int unsigned idx;
    victim     = '0;
    victim_idx = '0;
    found      = 1'b0;
    for (int unsigned w = 0; w < NUM_WAYS; w++) begin
      if (!found && mask[w] && !way_rvalid[w]) begin
        found      = 1'b1;
        victim[w]  = 1'b1;
        victim_idx = WAY_IW'(w);
      end
    end
    for (int unsigned k = 0; k < NUM_WAYS; k++) begin
      idx = (int'(rr_q[set_q]) + k) % NUM_WAYS;
      if (!found && mask[idx]) begin
        found       = 1'b1;
        victim[idx] = 1'b1;
        victim_idx  = WAY_IW'(idx);
      end
    end
  end

  always_comb begin
    word_line = {WORDS{wdata_q}};
    word_strb = '0;
    word_strb[widx_q*BE_W +: BE_W] = be_q;
  end

  // state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      we_q        <= 1'b0;
      addr_q      <= '0;
      wdata_q     <= '0;
      be_q        <= '0;
      victim_q    <= '0;
      rr_q        <= '0;
      stat_hits   <= '0;
      stat_misses <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (core_req && !hold) begin
          we_q    <= core_we;
          addr_q  <= core_addr;
          wdata_q <= core_wdata;
          be_q    <= core_be;
          state_q <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) stat_hits   <= stat_hits + 1;
          else     stat_misses <= stat_misses + 1;
          if (we_q)                     state_q <= S_WTHRU;
          else if (hit)                 state_q <= S_IDLE;
          else begin
            victim_q <= victim;
            if (|mask) rr_q[set_q] <= WAY_IW'((int'(victim_idx) + 1) % NUM_WAYS);
            state_q  <= S_REFILL;
          end
        end
        S_REFILL: if (mem_ack) state_q <= S_IDLE;
        S_WTHRU:  if (mem_ack) state_q <= S_IDLE;
        default:  state_q <= S_IDLE;
      endcase
    end
  end

  // way access
  always_comb begin
    way_en      = 1'b0;
    way_set     = set_q;
    way_wsel    = '0;
    way_tag_we  = 1'b0;
    way_data_we = 1'b0;
    way_wtag    = tag_q;
    way_wdata   = word_line;
    way_wstrb   = word_strb;
    unique case (state_q)
      S_IDLE: begin
        way_en  = core_req && !hold;
        way_set = core_addr[OFF_W +: SET_W];
      end
      S_LOOKUP: if (we_q && hit) begin   // update the hit line
        way_en      = 1'b1;
        way_wsel    = hit_vec;
        way_data_we = 1'b1;
      end
      S_REFILL: if (mem_ack) begin       // install the fetched line
        way_en      = |victim_q;
        way_wsel    = victim_q;
        way_tag_we  = 1'b1;
        way_data_we = 1'b1;
        way_wdata   = mem_rdata;
        way_wstrb   = '1;
      end
      default: ;
    endcase
  end

  // memory access
  assign mem_req   = (state_q == S_REFILL) || (state_q == S_WTHRU);
  assign mem_we    = (state_q == S_WTHRU);
  assign mem_addr  = {addr_q[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  assign mem_wdata = word_line;
  assign mem_wstrb = word_strb;

  // core response
  always_comb begin
    core_ack   = 1'b0;
    core_rdata = hit_line[widx_q*DATA_W +: DATA_W];
    unique case (state_q)
      S_LOOKUP: core_ack = !we_q && hit;
      S_REFILL: begin
        core_ack   = mem_ack;
        core_rdata = mem_rdata[widx_q*DATA_W +: DATA_W];
      end
      S_WTHRU:  core_ack = mem_ack;
      default: ;
    endcase
  end

  assign idle = (state_q == S_IDLE);

  a_hit_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_LOOKUP |-> $onehot0(hit_vec));
  a_mask_stable: assert property (@(posedge clk) disable iff (!rst_n)
    !idle |=> $stable(mask) || idle);

endmodule
