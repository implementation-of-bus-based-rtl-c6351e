// tb_rr_arbiter: random request vectors; the expected grant is recomputed
// from a separate model of the rotating priority (search starts after the
// last used winner). Also checks that a requester held high continuously
// is served within N grants (fairness).
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [2:0] grant_idx;
  logic any_grant, advance;
  int checks = 0, failures = 0;
  int last_model;
  int wait_cnt [N];

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx;
    req = '0; advance = 0;
    last_model = N - 1;
    foreach (wait_cnt[i]) wait_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req = N'($urandom) | (t < 1500 ? N'(1) : N'(0));   // port 0 always asking in first half
      advance = ($urandom_range(0, 3) != 0);
      #1;
      exp_idx = -1;
      for (int k = 1; k <= N; k++)
        if (exp_idx < 0 && req[(last_model + k) % N]) exp_idx = (last_model + k) % N;
      check(any_grant == (exp_idx >= 0), "any_grant");
      if (exp_idx >= 0) begin
        check(grant == N'(1) << exp_idx, $sformatf("grant %b exp idx %0d", grant, exp_idx));
        check(grant_idx == 3'(exp_idx), "grant_idx");
      end else check(grant == '0, "no grant");
      @(posedge clk);
      if (advance && exp_idx >= 0) begin
        last_model = exp_idx;
        for (int i = 0; i < N; i++)
          if (i == exp_idx) wait_cnt[i] = 0;
          else if (req[i]) wait_cnt[i]++;
        if (t < 1500) check(wait_cnt[0] < N, "fairness: port 0 served within N grants");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
