// Testbench of the round-robin arbiter: random request vectors against an
// independent reference (scan from the last winner, modulo N). Checks the
// grant every cycle, that a grant is one-hot and requested, and that a
// requester held high is granted within N accepted grants.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic accept;
  int checks = 0, failures = 0;
  int last, wait_cnt[N];

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .accept, .grant);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] ref_grant(logic [N-1:0] r, int l);
    for (int k = 1; k <= N; k++)
      if (r[(l + k) % N]) return N'(1) << ((l + k) % N);
    return '0;
  endfunction

  initial begin
    req = '0; accept = 0; last = N - 1;
    foreach (wait_cnt[i]) wait_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // keep requester 0 always asking in the second half, to check the bound
      req    = N'($urandom) | ((t >= 1500) ? N'(1) : N'(0));
      accept = ($urandom % 4) != 0;
      #1;
      checks++;
      if (grant !== ref_grant(req, last)) begin
        failures++;
        if (failures < 10) $display("t=%0d req=%b last=%0d grant=%b exp=%b", t, req, last, grant, ref_grant(req, last));
      end
      if (accept && |grant) begin
        for (int i = 0; i < N; i++) if (grant[i]) last = i;
        if (req[0] && !grant[0]) wait_cnt[0]++;
        else wait_cnt[0] = 0;
        if (t >= 1500) begin
          checks++;
          if (wait_cnt[0] >= N) begin
            failures++;
            $display("requester 0 starved for %0d grants", wait_cnt[0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
