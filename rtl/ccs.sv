// Core-to-cache switch.
//
// Connects every cache controller to the ways that its core owns. Ownership
// is the ways mask register of each core, kept by the ways management unit;
// the masks of different cores never overlap, so each way has at most one
// owner. For every way the switch forwards the access of its owner (set
// index, writes) and for every controller it returns valid bit, tag and line
// of each owned way, with ways the core does not own reading as invalid and
// zero. A way with no owner receives no access. The switch is purely
// combinational and adds no cycle.
//
// Masking the returned ways per core is what isolates a critical core's ways
// from the non-critical core. The document gives the switch's function; the
// multiplexer structure is this design's.
module ccs #(
  parameter int unsigned NUM_CORES  = 2,
  parameter int unsigned NUM_WAYS   = 8,
  parameter int unsigned SET_W      = 6,
  parameter int unsigned TAG_W      = 21,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned LINE_W    = LINE_BYTES * 8
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [NUM_CORES-1:0][NUM_WAYS-1:0]   mask,
  // controller side
  input  logic [NUM_CORES-1:0]                 c_en,
  input  logic [NUM_CORES-1:0][SET_W-1:0]      c_set,
  input  logic [NUM_CORES-1:0][NUM_WAYS-1:0]   c_wsel,
  input  logic [NUM_CORES-1:0]                 c_tag_we,
  input  logic [NUM_CORES-1:0]                 c_data_we,
  input  logic [NUM_CORES-1:0][TAG_W-1:0]      c_wtag,
  input  logic [NUM_CORES-1:0][LINE_W-1:0]     c_wdata,
  input  logic [NUM_CORES-1:0][LINE_BYTES-1:0] c_wstrb,
  output logic [NUM_CORES-1:0][NUM_WAYS-1:0]   c_rvalid,
  output logic [NUM_CORES-1:0][NUM_WAYS-1:0][TAG_W-1:0]  c_rtag,
  output logic [NUM_CORES-1:0][NUM_WAYS-1:0][LINE_W-1:0] c_rdata,
  // way side
  output logic [NUM_WAYS-1:0]                  way_en,
  output logic [NUM_WAYS-1:0][SET_W-1:0]       way_set,
  output logic [NUM_WAYS-1:0]                  way_tag_we,
  output logic [NUM_WAYS-1:0]                  way_data_we,
  output logic [NUM_WAYS-1:0][TAG_W-1:0]       way_wtag,
  output logic [NUM_WAYS-1:0][LINE_W-1:0]      way_wdata,
  output logic [NUM_WAYS-1:0][LINE_BYTES-1:0]  way_wstrb,
  input  logic [NUM_WAYS-1:0]                  way_rvalid,
  input  logic [NUM_WAYS-1:0][TAG_W-1:0]       way_rtag,
  input  logic [NUM_WAYS-1:0][LINE_W-1:0]      way_rdata
);

  // forward path: each way takes the access of the core that owns it
  always_comb begin
    way_en      = '0;
    way_set     = '0;
    way_tag_we  = '0;
    way_data_we = '0;
    way_wtag    = '0;
    way_wdata   = '0;
    way_wstrb   = '0;
    for (int unsigned w = 0; w < NUM_WAYS; w++) begin
      for (int unsigned c = 0; c < NUM_CORES; c++) begin
        if (mask[c][w]) begin
          way_en[w]      = c_en[c];
          way_set[w]     = c_set[c];
          way_tag_we[w]  = c_tag_we[c]  && c_wsel[c][w];
          way_data_we[w] = c_data_we[c] && c_wsel[c][w];
          way_wtag[w]    = c_wtag[c];
          way_wdata[w]   = c_wdata[c];
          way_wstrb[w]   = c_wstrb[c];
        end
      end
    end
  end

  // return path: each core sees only its own ways
  always_comb begin
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      for (int unsigned w = 0; w < NUM_WAYS; w++) begin
        c_rvalid[c][w] = mask[c][w] && way_rvalid[w];
        c_rtag[c][w]   = mask[c][w] ? way_rtag[w]  : '0;
        c_rdata[c][w]  = mask[c][w] ? way_rdata[w] : '0;
      end
    end
  end

  // No way may have two owners.
  for (genvar w = 0; w < NUM_WAYS; w++) begin : g_excl
    logic [NUM_CORES-1:0] owners;
    for (genvar c = 0; c < NUM_CORES; c++) begin : g_col
      assign owners[c] = mask[c][w];
    end
    a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(owners));
  end

endmodule
