// Behavioural model of the off-chip memory behind the cache: a line-wide
// memory port with a fixed latency. A request (held until acknowledged) is
// answered LATENCY cycles later with a one-cycle `ack`; a write applies the
// bytes selected by `wstrb`. Storage is sparse, one entry per 32-bit word;
// a word that was never written reads as init_word(address), a fixed hash of
// its address, so testbenches can predict any location without preloading.
// `reads` and `writes` count completed transfers.
module mem_model #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned LATENCY    = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req,
  input  logic                    we,
  input  logic [ADDR_W-1:0]       addr,
  input  logic [LINE_BYTES*8-1:0] wdata,
  input  logic [LINE_BYTES-1:0]   wstrb,
  output logic                    ack,
  output logic [LINE_BYTES*8-1:0] rdata,
  output int                      reads,
  output int                      writes
);

  localparam int unsigned WORDS = LINE_BYTES / 4;

  typedef enum logic [1:0] {IDLE, WAIT, ACK} st_e;
  st_e st;
  int  cnt;
  logic [31:0] store [logic [31:0]];

  function automatic logic [31:0] init_word(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [31:0] peek(logic [31:0] a);
    logic [31:0] wa;
    wa = {a[31:2], 2'b00};
    if (store.exists(wa)) return store[wa];
    return init_word(wa);
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < WORDS; i++)
      rdata[i*32 +: 32] = peek(32'(addr) + 32'(4 * i));
  end

  assign ack = (st == ACK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= IDLE;
      cnt    <= 0;
      reads  <= 0;
      writes <= 0;
    end else begin
      unique case (st)
        IDLE: if (req) begin
          cnt <= LATENCY;
          st  <= WAIT;
        end
        WAIT: if (cnt <= 1) st <= ACK; else cnt <= cnt - 1;
        ACK: begin
          if (we) begin
            writes <= writes + 1;
            for (int unsigned i = 0; i < WORDS; i++) begin
              logic [31:0] w;
              w = peek(32'(addr) + 32'(4 * i));
              for (int b = 0; b < 4; b++)
                if (wstrb[i*4 + b]) w[b*8 +: 8] = wdata[i*32 + b*8 +: 8];
              store[32'(addr) + 32'(4 * i)] = w;
            end
          end else begin
            reads <= reads + 1;
          end
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
