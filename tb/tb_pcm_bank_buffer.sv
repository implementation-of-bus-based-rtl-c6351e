// tb_pcm_bank_buffer: a writer fills granules (left samples, then right)
// and a reader takes left/right pairs. Phase 1 at 8 samples per granule
// with the writer ahead: every pair must come out in order, the writer must
// stall when both banks are full, and no underrun may be flagged. Phase 2:
// the writer falls behind, so the reader finishes a bank with the next one
// not filled: underrun must be flagged. Phase 3: one full 576-sample
// granule through a default-size instance.
module tb_pcm_bank_buffer;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam int N = 8;
  logic wr_en, wr_ready, rd_req, rd_avail, rd_valid, underrun;
  logic [19:0] wr_data, rd_left, rd_right;
  logic [15:0] banks_played;
  pcm_bank_buffer #(.SAMPLES_PER_GRANULE(N)) dut (.*);

  logic b_wr, b_wr_ready, b_rd, b_avail, b_valid, b_under;
  logic [19:0] b_wd, b_l, b_r;
  logic [15:0] b_played;
  pcm_bank_buffer u_big (.clk, .rst_n, .wr_en(b_wr), .wr_data(b_wd), .wr_ready(b_wr_ready),
    .rd_req(b_rd), .rd_avail(b_avail), .rd_valid(b_valid), .rd_left(b_l), .rd_right(b_r),
    .underrun(b_under), .banks_played(b_played));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [39:0] pq[$];
  int nunder = 0, nstall = 0, gran = 0, wpos = 0;
  logic [19:0] gl [N], gr [N];
  int wr_pct = 90;

  always @(posedge clk) if (rst_n) begin
    if (rd_valid) begin
      if (pq.size() == 0) check(0, "unexpected pair");
      else check({rd_left, rd_right} == pq.pop_front(), "pair");
    end
    if (underrun) nunder++;
    if (wr_en && !wr_ready) nstall++;
  end

  // writer: generates a granule, writes left then right
  function automatic void new_granule();
    for (int i = 0; i < N; i++) begin gl[i] = 20'($urandom); gr[i] = 20'($urandom); end
  endfunction
  initial new_granule();
  always @(posedge clk) if (rst_n) begin
    if (wr_en && wr_ready) begin
      wpos++;
      if (wpos == 2 * N) begin
        for (int i = 0; i < N; i++) pq.push_back({gl[i], gr[i]});
        wpos = 0; gran++;
        new_granule();
      end
    end
    wr_en   <= ($urandom_range(0, 99) < wr_pct);
    wr_data <= (wpos < N) ? gl[wpos] : gr[wpos - N];
  end

  bit reading = 0;
  always @(negedge clk) rd_req = reading && rd_avail && ($urandom_range(0, 99) < 15);

  initial begin
    b_wr = 0; b_rd = 0; b_wd = 0; wr_en = 0; wr_data = 0; rd_req = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);       // writer fills both banks, then stalls
    check(!wr_ready, "both banks full: writer stalled");
    reading = 1;
    repeat (2000) @(negedge clk);
    check(nunder == 0, "no underrun while the writer is ahead");
    check(nstall > 0, "writer stall seen");
    wr_pct = 3;                         // writer falls behind
    repeat (3000) @(negedge clk);
    check(nunder > 0, "underrun flagged when the writer is late");
    check(banks_played > 16'd10, "banks played");
    // full-size granule
    for (int k = 0; k < 2 * 576; k++) begin @(negedge clk); b_wr = 1; b_wd = 20'(k * 3 + 1); end
    @(negedge clk); b_wr = 0;
    for (int k = 0; k < 576; k++) begin
      @(negedge clk); b_rd = b_avail;
      @(negedge clk); b_rd = 0;
      check(b_valid && b_l == 20'(k * 3 + 1) && b_r == 20'((k + 576) * 3 + 1), "576-sample granule pair");
    end
    check(b_played == 16'd1 && !b_avail, "one granule played");
    $display("underruns %0d, writer stall cycles %0d", nunder, nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
