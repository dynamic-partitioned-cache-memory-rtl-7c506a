// Cache ways block: the tag and data storage of all ways.
//
// Each way is an independent bank with its own port, so the ways of
// different cores can be accessed in the same cycle. A way holds, for every
// set, a valid bit, a tag and one line of data. A read (`way_en`) returns
// valid bit, tag and line one cycle later (synchronous, block-RAM style;
// a write in the same cycle returns the old contents). `way_tag_we` writes
// the tag and sets the valid bit; `way_data_we` writes the bytes of the line
// selected by `way_wstrb`. `way_inval` clears every valid bit of a way in one
// cycle; the ways management unit uses it when a way leaves its owner.
//
// The document defines the block as the memory that stores tags and data, one
// bank per way; the per-way valid bits kept in flip-flops, the single-cycle
// invalidation and the read timing are this design's choices.
module cwb #(
  parameter int unsigned NUM_WAYS   = 8,
  parameter int unsigned SETS       = 64,
  parameter int unsigned TAG_W      = 21,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned SET_W     = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned LINE_W    = LINE_BYTES * 8
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [NUM_WAYS-1:0]                 way_en,
  input  logic [NUM_WAYS-1:0][SET_W-1:0]      way_set,
  input  logic [NUM_WAYS-1:0]                 way_tag_we,
  input  logic [NUM_WAYS-1:0]                 way_data_we,
  input  logic [NUM_WAYS-1:0][TAG_W-1:0]      way_wtag,
  input  logic [NUM_WAYS-1:0][LINE_W-1:0]     way_wdata,
  input  logic [NUM_WAYS-1:0][LINE_BYTES-1:0] way_wstrb,
  input  logic [NUM_WAYS-1:0]                 way_inval,
  output logic [NUM_WAYS-1:0]                 way_rvalid,
  output logic [NUM_WAYS-1:0][TAG_W-1:0]      way_rtag,
  output logic [NUM_WAYS-1:0][LINE_W-1:0]     way_rdata
);

  for (genvar w = 0; w < NUM_WAYS; w++) begin : g_way
    logic [SETS-1:0]   valid_q;
    logic [TAG_W-1:0]  tag_mem  [SETS];
    logic [LINE_W-1:0] data_mem [SETS];

    // valid bits
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        valid_q <= '0;
      end else if (way_inval[w]) begin
        valid_q <= '0;
      end else if (way_en[w] && way_tag_we[w]) begin
        valid_q[way_set[w]] <= 1'b1;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          way_rvalid[w] <= 1'b0;
      else if (way_en[w])  way_rvalid[w] <= valid_q[way_set[w]];
    end

    // tag bank
    always_ff @(posedge clk) begin
      if (way_en[w]) begin
        if (way_tag_we[w]) tag_mem[way_set[w]] <= way_wtag[w];
        way_rtag[w] <= tag_mem[way_set[w]];
      end
    end

    // data bank, byte-writable
    always_ff @(posedge clk) begin
      if (way_en[w]) begin
        if (way_data_we[w]) begin
          for (int b = 0; b < LINE_BYTES; b++)
            if (way_wstrb[w][b]) data_mem[way_set[w]][b*8 +: 8] <= way_wdata[w][b*8 +: 8];
        end
        way_rdata[w] <= data_mem[way_set[w]];
      end
    end
  end

endmodule
