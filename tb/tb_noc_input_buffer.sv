// tb_noc_input_buffer: random push/pop against a queue model. Checks the
// output order, the population, the availability flag (low exactly at 8
// elements) and the data-present flag, and that full/empty were reached.
module tb_noc_input_buffer;
  localparam int DEPTH = 8, WIDTH = 26;
  logic clk = 0, rst_n = 0;
  logic push, pop, avail, has_data;
  logic [WIDTH-1:0] din, dout;
  logic [3:0] population;
  int checks = 0, failures = 0, n_full = 0, n_empty_pop = 0;
  logic [WIDTH-1:0] q[$];

  noc_input_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(population == 4'(q.size()), "population");
      check(avail == (q.size() < DEPTH), "avail");
      check(has_data == (q.size() > 0), "has_data");
      if (q.size() > 0) check(dout == q[0], "order");
      if (q.size() == DEPTH) n_full++;
      // phases: fill-biased, drain-biased, mixed
      push = avail && ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 75));
      pop  = has_data && ($urandom_range(0, 99) < ((i / 500) % 2 ? 75 : 30));
      din  = WIDTH'($urandom);
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    check(n_full > 0, "buffer reached full");
    $display("full seen %0d times", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
