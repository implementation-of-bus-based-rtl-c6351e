// tb_freq_inversion: streams granules of random single-precision values
// (32 sub-bands x 18 samples, default size) through the frequency-inversion
// unit with random idle cycles. A model keeps its own (sub-band, sample)
// position and expects the sign bit flipped exactly when both are odd and
// every other bit unchanged. Granules are started with in_first, one
// granule follows without the marker (the counters must wrap by
// themselves), and one granule is cut short by a new in_first (the counters
// must restart). Checks: every output value, output count, and that both
// negated and untouched values were seen.
module tb_freq_inversion;
  localparam int SB = 32, SS = 18, N = SB * SS;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_first = 1'b0;
  logic [31:0] in_data = '0;
  logic        out_valid;
  logic [31:0] out_data;

  int checks = 0, failures = 0;
  int negated = 0, kept = 0;
  logic [31:0] expq[$];

  freq_inversion dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [31:0] e;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("FAIL unexpected output %h", out_data);
    end else begin
      e = expq.pop_front();
      if (out_data != e) begin
        failures++;
        if (failures < 10) $display("FAIL got %h expected %h", out_data, e);
      end
    end
  end

  // send `len` values starting at position 0 (with marker if `mark`)
  task automatic send_granule(input int len, input bit mark, input int start_pos);
    for (int i = 0; i < len; i++) begin
      int pos, sb, ss;
      logic [31:0] v;
      pos = (start_pos + i) % N;
      sb  = pos / SS;
      ss  = pos % SS;
      v   = $urandom;
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        in_first = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_first = mark && (i == 0);
      in_data  = v;
      if ((sb % 2 == 1) && (ss % 2 == 1)) begin
        expq.push_back({~v[31], v[30:0]});
        negated++;
      end else begin
        expq.push_back(v);
        kept++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_first = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send_granule(N, 1'b1, 0);          // normal granule
    send_granule(N, 1'b0, 0);          // counters wrap on their own
    send_granule(200, 1'b1, 0);        // cut short ...
    send_granule(N, 1'b1, 0);          // ... and restarted by in_first
    for (int g = 0; g < 3; g++) send_granule(N, 1'b1, 0);
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", expq.size());
    end
    checks++;
    if (negated == 0 || kept == 0) begin
      failures++;
      $display("FAIL negated=%0d kept=%0d", negated, kept);
    end
    $display("negated %0d, unchanged %0d", negated, kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
