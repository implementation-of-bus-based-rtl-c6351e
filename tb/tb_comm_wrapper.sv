// tb_comm_wrapper: host messages fed byte by byte.
//  1. 0,0,25,55 + 25 bitstream bytes: the 25 bytes must be written to the
//     RAM in order, nothing else.
//  2. a free-slot query: the reply must be 0,0,3,57 followed by the free
//     count (70,000 - 25 = 69,975 = 0x011157) as three bytes, MSB first,
//     each handed to the transmitter only while it is not busy.
//  3. an unknown type with a 3-byte payload: skipped, nothing written.
//  4. a 300-byte block (length 0,1,44): 300 writes.
//  5. the start command: exactly one start_decode pulse.
module tb_comm_wrapper;
  import mp3soc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_valid, tx_start, tx_busy, mem_wr, start_decode;
  logic [7:0] rx_byte, tx_byte, mem_data;
  logic [16:0] mem_free;
  int checks = 0, failures = 0, nstart = 0, busy_cnt = 0;
  logic [7:0] wq[$], txq[$];

  comm_wrapper #(.FREE_W(17)) dut (.*);
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

  // transmitter model: busy for 6 cycles after start
  always @(posedge clk) begin
    if (!rst_n) begin busy_cnt <= 0; mem_free <= 17'd70000; end
    else begin
      if (tx_start) begin
        check(busy_cnt == 0, "start only while not busy");
        txq.push_back(tx_byte);
        busy_cnt <= 6;
      end else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
      if (mem_wr) begin
        mem_free <= mem_free - 1'b1;
        if (wq.size() == 0) check(0, "unexpected RAM write");
        else check(mem_data == wq.pop_front(), "RAM byte");
      end
      if (start_decode) nstart++;
    end
  end
  assign tx_busy = busy_cnt != 0;

  task automatic put(logic [7:0] b);
    @(negedge clk); rx_valid = 1; rx_byte = b;
    @(negedge clk); rx_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    logic [7:0] b;
    rx_valid = 0; rx_byte = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    put(0); put(0); put(25); put(MSG_MP3_DATA);
    for (int k = 0; k < 25; k++) begin b = 8'($urandom); wq.push_back(b); put(b); end
    repeat (5) @(negedge clk);
    check(wq.size() == 0, "25 bytes stored");
    check(mem_free == 17'd69975, "free count");
    put(0); put(0); put(0); put(MSG_FREE_REQ);
    repeat (100) @(negedge clk);
    check(txq.size() == 7, $sformatf("reply length %0d", txq.size()));
    if (txq.size() == 7)
      check(txq[0] == 0 && txq[1] == 0 && txq[2] == 3 && txq[3] == MSG_FREE_RESP &&
            txq[4] == 8'h01 && txq[5] == 8'h11 && txq[6] == 8'h57, "reply bytes");
    put(0); put(0); put(3); put(8'd99); put(1); put(2); put(3);
    put(0); put(1); put(44); put(MSG_MP3_DATA);
    for (int k = 0; k < 300; k++) begin b = 8'($urandom); wq.push_back(b); put(b); end
    repeat (5) @(negedge clk);
    check(wq.size() == 0, "300 bytes stored, unknown message skipped");
    check(nstart == 0, "no start yet");
    put(0); put(0); put(0); put(MSG_START);
    repeat (5) @(negedge clk);
    check(nstart == 1, "one start pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
