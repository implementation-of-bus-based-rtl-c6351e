// tb_sync_header: a byte stream of filler (including false starts such as
// 0xFF followed by 0x7x) and 40 frame headers with random fields. For each
// header the fields are cut out of the 32-bit word here by shifts and
// masks, following the bit positions of the header table, and compared
// with the unit's output. Also checks that exactly 40 frames are found and
// the `stereo` flag.
module tb_sync_header;
  import mp3soc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, header_valid, stereo;
  logic [7:0] in_byte;
  mp3_header_t header;
  logic [15:0] sync_count;
  int checks = 0, failures = 0, found = 0;
  logic [31:0] exp_q[$];

  sync_header dut (.*);
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

  always @(posedge clk) if (rst_n && header_valid) begin
    logic [31:0] h;
    found++;
    if (exp_q.size() == 0) check(0, "unexpected header");
    else begin
      h = exp_q.pop_front();
      check(header.sync == h[31:20], "sync");
      check(header.version == h[19], "version");
      check(header.layer == h[18:17], "layer");
      check(header.protection == h[16], "protection");
      check(header.bitrate_idx == h[15:12], "bit rate index");
      check(header.samprate_idx == h[11:10], "sampling rate index");
      check(header.padding == h[9], "padding");
      check(header.private_bit == h[8], "private");
      check(header.channel_mode == h[7:6], "channel mode");
      check(header.mode_ext == h[5:4], "mode extension");
      check(header.copyright == h[3], "copyright");
      check(header.original == h[2], "original");
      check(header.emphasis == h[1:0], "emphasis");
      check(stereo == (h[7:6] != 2'b11), "stereo flag");
    end
  end

  task automatic put(logic [7:0] b);
    @(negedge clk); in_valid = 1; in_byte = b;
    @(negedge clk); in_valid = 0;
  endtask

  function automatic logic [7:0] filler();
    logic [7:0] b;
    do b = 8'($urandom); while (b == 8'hFF);
    return b;
  endfunction

  initial begin
    logic [31:0] h;
    in_valid = 0; in_byte = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      repeat ($urandom_range(0, 20)) put(filler());
      put(8'hFF); put(8'h7A);                       // false start
      repeat ($urandom_range(0, 5)) put(filler());
      h = {12'hFFF, 20'($urandom)};
      exp_q.push_back(h);
      put(h[31:24]); put(h[23:16]); put(h[15:8]); put(h[7:0]);
      repeat (8) put(filler());
    end
    repeat (4) @(negedge clk);
    check(found == 40 && sync_count == 16'd40, $sformatf("frames found %0d", found));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
