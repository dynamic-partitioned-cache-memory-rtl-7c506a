// Testbench of the round-robin memory multiplexer: three masters issue random
// line reads and byte-masked writes to separate address regions of a
// behavioural memory. Every read is compared with a reference copy of the
// memory; the testbench also checks that each memory transfer belongs to a
// requesting master, that all transfers complete, and that a waiting master
// is served before any other master is served twice (round-robin bound).
module tb_mem_mux;
  localparam int N = 3, AW = 32, LB = 16, LW = LB * 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] m_req, m_we, m_ack;
  logic [N-1:0][AW-1:0] m_addr;
  logic [N-1:0][LW-1:0] m_wdata;
  logic [N-1:0][LB-1:0] m_wstrb;
  logic [LW-1:0] m_rdata;
  logic s_req, s_we, s_ack;
  logic [AW-1:0] s_addr;
  logic [LW-1:0] s_wdata, s_rdata;
  logic [LB-1:0] s_wstrb;
  int reads, writes;
  int checks = 0, failures = 0;
  int served [N];
  int done_cnt [N];
  int contended = 0;

  mem_mux #(.N(N), .ADDR_W(AW), .LINE_BYTES(LB)) dut (.*);
  mem_model #(.ADDR_W(AW), .LINE_BYTES(LB), .LATENCY(3)) u_mem (
    .clk, .rst_n, .req(s_req), .we(s_we), .addr(s_addr), .wdata(s_wdata),
    .wstrb(s_wstrb), .ack(s_ack), .rdata(s_rdata), .reads, .writes);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // reference memory, per byte
  logic [7:0] ref_mem [logic [31:0]];
  function automatic logic [7:0] ref_byte(logic [31:0] a);
    logic [31:0] w;
    if (ref_mem.exists(a)) return ref_mem[a];
    w = ({a[31:2], 2'b00} * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
    return w[a[1:0]*8 +: 8];
  endfunction

  // fairness: between two grants of a master, a continuously waiting master is served
  int since [N][N];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (m_ack[i]) begin
      for (int j = 0; j < N; j++) begin
        if (j != i && m_req[j]) begin
          since[j][i]++;
          check(since[j][i] <= 1, "round-robin bound exceeded");
        end
        since[i][j] = 0;
      end
    end
    if ($countones(m_req) > 1) contended++;
  end

  task automatic master(int i);
    for (int k = 0; k < 150; k++) begin
      logic [31:0] a;
      logic we;
      logic [LW-1:0] d;
      logic [LB-1:0] st;
      a  = 32'h1000 * (i + 1) + 32'(LB * ($urandom % 8));
      we = $urandom % 2;
      d  = {$urandom, $urandom, $urandom, $urandom};
      st = LB'($urandom);
      @(negedge clk);
      m_addr[i] = a; m_we[i] = we; m_wdata[i] = d; m_wstrb[i] = st; m_req[i] = 1;
      do @(posedge clk); while (!m_ack[i]);
      if (!we) begin
        logic [LW-1:0] e;
        for (int b = 0; b < LB; b++) e[b*8 +: 8] = ref_byte(a + 32'(b));
        check(m_rdata == e, $sformatf("master %0d read %h", i, a));
      end else begin
        for (int b = 0; b < LB; b++) if (st[b]) ref_mem[a + 32'(b)] = d[b*8 +: 8];
      end
      done_cnt[i]++;
      @(negedge clk);
      m_req[i] = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    m_req = '0; m_we = '0; m_addr = '0; m_wdata = '0; m_wstrb = '0;
    foreach (since[i, j]) since[i][j] = 0;
    foreach (done_cnt[i]) done_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      master(0);
      master(1);
      master(2);
    join
    for (int i = 0; i < N; i++) check(done_cnt[i] == 150, "all transfers done");
    check(reads + writes == 3 * 150, "memory saw every transfer once");
    check(contended > 0, "coverage: contention");
    $display("contended cycles %0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
