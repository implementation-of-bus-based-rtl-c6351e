// tb_bus_port: three bus ports on a shared bus (TIMEOUT 16).
// Port 1 streams words to port 0 (the document's example: the address on
// the bus is then 0x10), port 2 sends to port 1 now and then. Checks: every
// word arrives once, in order, with the right source; BUS_Control only
// moves through the 4-phase sequence 00-01-11-10-00 (or 01-00 on a
// time-out); a string of words goes out under one grant (burst); when port
// 0 stops reading, port 1 times out and releases the bus, port 2 still gets
// through, and port 1's words are delivered after port 0 resumes.
module tb_bus_port;
  import mp3soc_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic              tx_valid [N], tx_done [N], tx_timeout [N], rx_valid [N], rx_read [N];
  logic [15:0]       tx_data [N], rx_data [N];
  logic [3:0]        tx_dest [N], rx_src [N];
  logic [N-1:0]      preq, pack, grant;
  bus_word_t         pword [N];
  bus_word_t         bus;
  logic [1:0]        gidx;
  logic              job_req;
  int checks = 0, failures = 0, handshakes = 0, timeouts = 0, bursts = 0, addr10 = 0;
  logic [19:0] txq [N][$];          // {dest, data}
  logic [19:0] rxq [N][$];          // expected at receiver: {src, data}
  int words_in_grant;
  bit p0_reads = 1;

  shared_bus #(.N_PORTS(N)) u_bus (.clk, .rst_n, .port_req(preq), .port_word(pword), .port_ack(pack),
                                   .grant, .grant_access(gidx), .job_req, .bus);
  for (genvar i = 0; i < N; i++) begin : g
    bus_port #(.MY_ID(i), .TIMEOUT(16)) u_p (
      .clk, .rst_n, .tx_valid(tx_valid[i]), .tx_data(tx_data[i]), .tx_dest(tx_dest[i]),
      .tx_done(tx_done[i]), .tx_timeout(tx_timeout[i]), .rx_valid(rx_valid[i]), .rx_data(rx_data[i]),
      .rx_src(rx_src[i]), .rx_read(rx_read[i]), .port_req(preq[i]), .port_word(pword[i]),
      .port_ack(pack[i]), .grant(grant[i]), .bus);
  end

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

  // PE models
  always_comb for (int i = 0; i < N; i++) begin
    tx_valid[i] = txq[i].size() > 0;
    {tx_dest[i], tx_data[i]} = tx_valid[i] ? txq[i][0] : 20'd0;
  end

  logic [1:0] prev_ctl = 2'b00;
  int last_owner = -1;
  always @(posedge clk) if (rst_n) begin
    logic [1:0] ctl;
    ctl = {bus.ack, bus.req};
    check(ctl == prev_ctl || (prev_ctl == 2'b00 && ctl == 2'b01) || (prev_ctl == 2'b01 && ctl == 2'b11) ||
          (prev_ctl == 2'b11 && ctl == 2'b10) || (prev_ctl == 2'b10 && ctl == 2'b00) ||
          (prev_ctl == 2'b01 && ctl == 2'b00), $sformatf("BUS_Control %b -> %b", prev_ctl, ctl));
    if (prev_ctl == 2'b10 && ctl == 2'b00) handshakes++;
    if (ctl == 2'b01 && prev_ctl == 2'b00 && bus.addr == 8'h10) addr10++;
    prev_ctl = ctl;
    // burst: count words per continuous ownership
    if (job_req && int'(gidx) == last_owner) begin
      if (tx_done[last_owner]) begin words_in_grant++; if (words_in_grant == 2) bursts++; end
    end else begin
      last_owner = job_req ? int'(gidx) : -1;
      words_in_grant = 0;
    end
    for (int i = 0; i < N; i++) begin
      if (tx_done[i]) void'(txq[i].pop_front());
      if (tx_timeout[i]) timeouts++;
      if (rx_read[i]) begin
        if (rxq[i].size() == 0) check(0, "unexpected word");
        else check({rx_src[i], rx_data[i]} == rxq[i].pop_front(), $sformatf("word at port %0d", i));
      end
    end
  end

  always @(negedge clk) for (int i = 0; i < N; i++)
    rx_read[i] = rx_valid[i] && (i != 0 || p0_reads) && ($urandom_range(0, 99) < 80);

  task automatic send(int s, int d, logic [15:0] w);
    txq[s].push_back({4'(d), w});
    rxq[d].push_back({4'(s), w});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) send(1, 0, 16'h1000 + 16'(k));
    repeat (400) @(negedge clk);
    // port 0 stops reading: port 1 must time out, port 2 must still get through
    p0_reads = 0;
    for (int k = 0; k < 10; k++) send(1, 0, 16'h2000 + 16'(k));
    repeat (50) @(negedge clk);
    for (int k = 0; k < 5; k++) send(2, 1, 16'h3000 + 16'(k));
    repeat (400) @(negedge clk);
    check(rxq[1].size() == 0, "port 2 got through while port 0 was stalled");
    p0_reads = 1;
    repeat (2000) @(negedge clk);
    for (int i = 0; i < N; i++) check(rxq[i].size() == 0 && txq[i].size() == 0, $sformatf("port %0d drained", i));
    check(timeouts > 0, "time-out happened");
    check(bursts > 0, "several words under one grant");
    check(addr10 > 0, "address 0x10 for port 1 -> port 0");
    $display("handshakes %0d, timeouts %0d, bursts %0d", handshakes, timeouts, bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
