// tb_mp3_stream_buffer: random writes and reads against a queue model at a
// depth of 100 (so the pointers wrap many times), then a fill to exactly
// 70,000 bytes at the default depth. Checks read data (one cycle after
// rd_en), count, free, and that writes beyond full are dropped.
module tb_mp3_stream_buffer;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // small instance
  logic s_wr, s_rd, s_rv;
  logic [7:0] s_wd, s_rdat;
  logic [6:0] s_cnt, s_free;
  mp3_stream_buffer #(.DEPTH(100)) u_small (.clk, .rst_n, .wr_en(s_wr), .wr_data(s_wd), .rd_en(s_rd),
    .rd_data(s_rdat), .rd_valid(s_rv), .count(s_cnt), .free(s_free));
  // full-size instance
  logic b_wr, b_rd, b_rv;
  logic [7:0] b_wd, b_rdat;
  logic [16:0] b_cnt, b_free;
  mp3_stream_buffer u_big (.clk, .rst_n, .wr_en(b_wr), .wr_data(b_wd), .rd_en(b_rd),
    .rd_data(b_rdat), .rd_valid(b_rv), .count(b_cnt), .free(b_free));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] q[$];
  logic [7:0] exp_rd;
  bit exp_rv;
  int nfull = 0;

  initial begin
    s_wr = 0; s_rd = 0; s_wd = 0; b_wr = 0; b_rd = 0; b_wd = 0; exp_rv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (exp_rv) check(s_rv && s_rdat == exp_rd, "read data");
      else check(!s_rv, "no read");
      check(s_cnt == 7'(q.size()) && s_free == 7'(100 - q.size()), "count/free");
      if (q.size() == 100) nfull++;
      s_wr = ($urandom_range(0, 99) < ((t / 1000) % 2 ? 35 : 65));
      s_rd = ($urandom_range(0, 99) < ((t / 1000) % 2 ? 65 : 35));
      s_wd = 8'($urandom);
      exp_rv = s_rd && q.size() > 0;
      @(posedge clk);
      begin
        bit was_full;
        was_full = (q.size() == 100);
        if (exp_rv) exp_rd = q.pop_front();
        if (s_wr && !was_full) q.push_back(s_wd);
      end
    end
    check(nfull > 0, "small buffer reached full");
    s_wr = 0; s_rd = 0;
    // full-size fill
    for (int k = 0; k < 70001; k++) begin
      @(negedge clk); b_wr = 1; b_wd = 8'(k * 7);
    end
    @(negedge clk); b_wr = 0;
    check(b_cnt == 17'd70000 && b_free == 17'd0, "70,000 bytes held, write 70,001 dropped");
    for (int k = 0; k < 70000; k++) begin
      @(negedge clk); b_rd = 1;
      @(negedge clk); b_rd = 0;
      if (k % 997 == 0 || k == 69999) check(b_rv && b_rdat == 8'(k * 7), "full-size read back");
    end
    check(b_cnt == 0, "emptied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
