// tb_uart: transmitter looped back into the receiver at 8 clocks per bit.
// Checks every received byte, that each character takes 10 bit periods
// (busy time of the transmitter = 80 cycles), that the line idles high,
// and that a character with a broken stop bit raises frame_err.
module tb_uart;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0;
  logic start, busy, txd, valid, frame_err, rxd;
  logic [7:0] tx_data, rx_data;
  int checks = 0, failures = 0;
  logic [7:0] q[$];
  bit force_low = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (.clk, .rst_n, .start, .data(tx_data), .busy, .txd);
  uart_rx #(.CLKS_PER_BIT(CPB)) u_rx (.clk, .rst_n, .rxd, .valid, .data(rx_data), .frame_err);
  assign rxd = txd && !force_low;

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

  int nerr = 0;
  always @(posedge clk) if (rst_n) begin
    if (valid) begin
      if (q.size() == 0) check(0, "unexpected byte");
      else check(rx_data == q.pop_front(), "byte");
    end
    if (frame_err) nerr++;
  end

  initial begin
    int cyc;
    start = 0; tx_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(txd == 1'b1, "line idles high");
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      tx_data = (k == 0) ? 8'h55 : 8'($urandom);
      q.push_back(tx_data);
      start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      check(cyc == 10 * CPB, $sformatf("character time %0d cycles", cyc));
    end
    repeat (3 * CPB) @(negedge clk);
    check(q.size() == 0, "all bytes received");
    // broken stop bit
    @(negedge clk); tx_data = 8'hA5; start = 1;
    @(negedge clk); start = 0;
    repeat (9 * CPB + 2) @(negedge clk);
    force_low = 1;
    repeat (2 * CPB) @(negedge clk);
    force_low = 0;
    repeat (4 * CPB) @(negedge clk);
    check(nerr == 1, "frame error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
