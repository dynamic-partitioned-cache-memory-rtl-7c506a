// Testbench of the cache ways block: random tag and byte-masked data writes
// to random ways and sets, checked against a reference copy kept in the
// testbench; one-cycle read latency; the valid bit after a tag write; and the
// whole-way invalidation leaving other ways untouched.
module tb_cwb;
  localparam int W = 4, SETS = 16, TAG_W = 10, LB = 8, LW = LB * 8, SW = 4;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] way_en, way_tag_we, way_data_we, way_inval, way_rvalid;
  logic [W-1:0][SW-1:0] way_set;
  logic [W-1:0][TAG_W-1:0] way_wtag, way_rtag;
  logic [W-1:0][LW-1:0] way_wdata, way_rdata;
  logic [W-1:0][LB-1:0] way_wstrb;
  int checks = 0, failures = 0;

  logic [TAG_W-1:0] rtag [W][SETS];
  logic [LW-1:0]    rdat [W][SETS];
  logic             rval [W][SETS];

  cwb #(.NUM_WAYS(W), .SETS(SETS), .TAG_W(TAG_W), .LINE_BYTES(LB)) dut (.*);

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
    way_en = '0; way_tag_we = '0; way_data_we = '0; way_inval = '0;
    way_set = '0; way_wtag = '0; way_wdata = '0; way_wstrb = '0;
    for (int w = 0; w < W; w++) for (int s = 0; s < SETS; s++) begin
      rval[w][s] = 0; rtag[w][s] = '0; rdat[w][s] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill every line once so the reference knows all contents
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk);
      way_en = '1; way_tag_we = '1; way_data_we = '1;
      for (int w = 0; w < W; w++) begin
        way_set[w] = SW'(s); way_wtag[w] = TAG_W'($urandom);
        way_wdata[w] = {$urandom, $urandom}; way_wstrb[w] = '1;
        rtag[w][s] = way_wtag[w]; rdat[w][s] = way_wdata[w]; rval[w][s] = 1;
      end
    end
    @(negedge clk); way_en = '0; way_tag_we = '0; way_data_we = '0;
    // random traffic
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] en_now;
      int set_now [W];
      @(negedge clk);
      way_inval = '0;
      for (int w = 0; w < W; w++) begin
        way_en[w]      = $urandom % 2;
        way_set[w]     = SW'($urandom);
        way_tag_we[w]  = ($urandom % 4) == 0;
        way_data_we[w] = ($urandom % 3) == 0;
        way_wtag[w]    = TAG_W'($urandom);
        way_wdata[w]   = {$urandom, $urandom};
        way_wstrb[w]   = LB'($urandom);
      end
      if (($urandom % 50) == 0) way_inval[$urandom % W] = 1'b1;
      en_now = way_en;
      for (int w = 0; w < W; w++) set_now[w] = int'(way_set[w]);
      @(posedge clk);
      #1;
      for (int w = 0; w < W; w++) if (en_now[w]) begin
        int s;
        s = set_now[w];
        check(way_rvalid[w] == rval[w][s], $sformatf("valid way %0d set %0d", w, s));
        if (rval[w][s]) begin
          check(way_rtag[w] == rtag[w][s], $sformatf("tag way %0d set %0d", w, s));
          check(way_rdata[w] == rdat[w][s], $sformatf("data way %0d set %0d", w, s));
        end
      end
      // update reference: read returned old contents, writes land now
      for (int w = 0; w < W; w++) begin
        if (way_inval[w]) begin
          for (int s = 0; s < SETS; s++) rval[w][s] = 0;
        end else if (en_now[w] && way_tag_we[w]) begin
          rval[w][set_now[w]] = 1;
        end
        if (en_now[w] && way_tag_we[w]) rtag[w][set_now[w]] = way_wtag[w];
        if (en_now[w] && way_data_we[w])
          for (int b = 0; b < LB; b++)
            if (way_wstrb[w][b]) rdat[w][set_now[w]][b*8 +: 8] = way_wdata[w][b*8 +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
