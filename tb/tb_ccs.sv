// Testbench of the core-to-cache switch: random disjoint ownership masks and
// random controller and way signals; every output is compared with a
// reference routing computed in the testbench (a way takes its owner's
// access, or none; a core sees only its own ways).
module tb_ccs;
  localparam int C = 3, W = 8, SW = 4, TW = 6, LB = 4, LW = 32;
  logic clk = 0, rst_n = 0;
  logic [C-1:0][W-1:0] mask, c_wsel, c_rvalid;
  logic [C-1:0] c_en, c_tag_we, c_data_we;
  logic [C-1:0][SW-1:0] c_set;
  logic [C-1:0][TW-1:0] c_wtag;
  logic [C-1:0][LW-1:0] c_wdata;
  logic [C-1:0][LB-1:0] c_wstrb;
  logic [C-1:0][W-1:0][TW-1:0] c_rtag;
  logic [C-1:0][W-1:0][LW-1:0] c_rdata;
  logic [W-1:0] way_en, way_tag_we, way_data_we, way_rvalid;
  logic [W-1:0][SW-1:0] way_set;
  logic [W-1:0][TW-1:0] way_wtag, way_rtag;
  logic [W-1:0][LW-1:0] way_wdata, way_rdata;
  logic [W-1:0][LB-1:0] way_wstrb;
  int checks = 0, failures = 0;

  ccs #(.NUM_CORES(C), .NUM_WAYS(W), .SET_W(SW), .TAG_W(TW), .LINE_BYTES(LB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
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

  initial begin
    mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int owner [W];
      @(negedge clk);
      mask = '0;
      for (int w = 0; w < W; w++) begin
        owner[w] = $urandom % (C + 1);          // C means unowned
        if (owner[w] < C) mask[owner[w]][w] = 1'b1;
      end
      for (int c = 0; c < C; c++) begin
        c_en[c] = $urandom % 2; c_tag_we[c] = $urandom % 2; c_data_we[c] = $urandom % 2;
        c_set[c] = SW'($urandom); c_wsel[c] = W'($urandom); c_wtag[c] = TW'($urandom);
        c_wdata[c] = $urandom; c_wstrb[c] = LB'($urandom);
      end
      for (int w = 0; w < W; w++) begin
        way_rvalid[w] = $urandom % 2; way_rtag[w] = TW'($urandom); way_rdata[w] = $urandom;
      end
      #1;
      for (int w = 0; w < W; w++) begin
        if (owner[w] < C) begin
          int o;
          o = owner[w];
          check(way_en[w] == c_en[o] && way_set[w] == c_set[o], "forward en/set");
          check(way_tag_we[w] == (c_tag_we[o] && c_wsel[o][w]), "forward tag_we");
          check(way_data_we[w] == (c_data_we[o] && c_wsel[o][w]), "forward data_we");
          check(way_wtag[w] == c_wtag[o] && way_wdata[w] == c_wdata[o] && way_wstrb[w] == c_wstrb[o], "forward data");
        end else begin
          check(!way_en[w] && !way_tag_we[w] && !way_data_we[w], "unowned way idle");
        end
        for (int c = 0; c < C; c++) begin
          if (owner[w] == c)
            check(c_rvalid[c][w] == way_rvalid[w] && c_rtag[c][w] == way_rtag[w] && c_rdata[c][w] == way_rdata[w], "return own way");
          else
            check(!c_rvalid[c][w] && c_rtag[c][w] == '0 && c_rdata[c][w] == '0, "foreign way hidden");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
