// tb_ac97_link: a codec model drives BIT_CLK (8 system clocks per bit) and
// samples SYNC and SDATA_OUT on falling edges, rebuilding each 256-bit
// frame. Checks: SYNC is high for exactly the 16 bits of slot 0 and rises
// every 256 bit clocks; tag bit 15 (frame valid) is set; a register write
// offered on the command port appears once in slots 1/2 with slot-valid
// tags; PCM pairs appear in slots 3/4, in order, with their valid tags when
// the source had data and are zero and untagged otherwise.
module tb_ac97_link;
  logic clk = 0, rst_n = 0, bit_clk = 0;
  logic sync, sdata_out, ac97_reset_n, cmd_valid, cmd_read, cmd_taken;
  logic [6:0] cmd_addr;
  logic [15:0] cmd_data, frame_count;
  logic pcm_avail, pcm_req, pcm_valid;
  logic [19:0] pcm_left, pcm_right;
  int checks = 0, failures = 0;

  ac97_link dut (.*);
  always #5 clk = ~clk;
  always #40 bit_clk = ~bit_clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PCM source model
  logic [39:0] sent_q[$], src_q[$];
  always @(posedge clk) begin
    pcm_valid <= 1'b0;
    if (rst_n && pcm_req) begin
      check(src_q.size() > 0, "request only when data available");
      if (src_q.size() > 0) begin
        {pcm_left, pcm_right} <= src_q[0];
        sent_q.push_back(src_q.pop_front());
        pcm_valid <= 1'b1;
      end
    end
  end
  always @(negedge clk) pcm_avail = src_q.size() > 0;

  // command port model
  int ncmd_taken = 0;
  always @(posedge clk) if (rst_n && cmd_taken) begin ncmd_taken++; cmd_valid <= 1'b0; end

  // codec model: sample at falling edges
  logic [255:0] frame;
  int bitn = -1, nframes = 0, sync_len = 0, cmd_frames = 0, pcm_frames = 0, last_rise_bit = 0, bitclk_count = 0;
  logic prev_sync = 0;
  always @(negedge bit_clk) if (ac97_reset_n) begin
    bitclk_count++;
    if (sync && !prev_sync) begin
      if (nframes > 0) check(bitclk_count - last_rise_bit == 256, $sformatf("frame period %0d bits", bitclk_count - last_rise_bit));
      last_rise_bit = bitclk_count;
      bitn = 0;
      sync_len = 0;
    end
    prev_sync = sync;
    if (sync) sync_len++;
    if (bitn >= 0) begin
      frame[255 - bitn] = sdata_out;
      bitn++;
      if (bitn == 256) begin
        bitn = -1;
        nframes++;
        check(sync_len == 16, $sformatf("SYNC high %0d bits", sync_len));
        check(frame[255] == 1'b1, "frame valid tag");
        check(frame[242:240] == 3'b000, "bit 2 and codec id");
        // slot k (1..12) occupies bits 255-16-20(k-1) down
        if (frame[254]) begin
          cmd_frames++;
          check(frame[253] == 1'b1, "slot 2 valid with slot 1");
          check(frame[239:220] == {1'b0, 7'h02, 12'd0}, "slot 1 command address");
          check(frame[219:200] == {16'h0808, 4'd0}, "slot 2 command data");
        end else check(frame[239:200] == '0, "no command: slots 1/2 zero");
        if (frame[252]) begin
          pcm_frames++;
          check(frame[251] == 1'b1, "slot 4 valid with slot 3");
          if (sent_q.size() == 0) check(0, "PCM without source data");
          else check(frame[199:160] == sent_q.pop_front(), "PCM slots 3/4");
        end else check(frame[199:160] == '0, "no PCM: slots 3/4 zero");
        check(frame[159:0] == '0 && frame[250:243] == '0, "unused slots zero");
      end
    end
  end

  initial begin
    cmd_valid = 0; cmd_read = 0; cmd_addr = 7'h02; cmd_data = 16'h0808;
    pcm_valid = 0; pcm_avail = 0; pcm_left = 0; pcm_right = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    cmd_valid = 1;                           // one register write
    for (int k = 0; k < 6; k++) src_q.push_back({20'($urandom), 20'($urandom)});
    wait (nframes >= 12);
    for (int k = 0; k < 3; k++) src_q.push_back({20'($urandom), 20'($urandom)});
    wait (nframes >= 20);
    check(ncmd_taken == 1 && cmd_frames == 1, $sformatf("command sent once (%0d taken, %0d frames)", ncmd_taken, cmd_frames));
    check(pcm_frames == 9 && sent_q.size() == 0, $sformatf("PCM frames %0d", pcm_frames));
    check(frame_count >= 16'd20, "frame counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
