// tb_noc_mesh: the 3x3 mesh with nine traffic-generating PEs.
// 1. Latency of an isolated message: pe_talks to alert_pe takes
//    2*hops + 4 cycles (one cycle in the NI transmit buffer, two per router,
//    one in the NI receive buffer). Checked for the (1,0)->(1,1) example and
//    for the longest path (0,0)->(2,2), four links.
// 2. Random all-to-all traffic with PEs that sometimes stop reading, so the
//    network fills up. Every message must arrive once, at the right tile,
//    with the right origin, and in order for each source/destination pair;
//    back-pressure to a PE must happen.
module tb_noc_mesh;
  import mp3soc_pkg::*;
  localparam int MX = 3, MY = 3;
  logic clk = 0, rst_n = 0;
  logic              pe_talks [MX][MY], pe_avail [MX][MY], alert_pe [MX][MY], pe_read [MX][MY];
  logic [DATA_W-1:0] pe_output [MX][MY], input_to_pe [MX][MY];
  loc_t              pe_dest [MX][MY], origin_to_pe [MX][MY];
  int checks = 0, failures = 0, sent = 0, recvd = 0, backpressure = 0;
  logic [15:0] exp_q [MX*MY][MX*MY][$];   // [src][dst]
  int seq [MX*MY];

  noc_mesh #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receivers
  always @(posedge clk) if (rst_n) begin
    for (int x = 0; x < MX; x++) for (int y = 0; y < MY; y++) begin
      if (pe_read[x][y] && alert_pe[x][y]) begin
        int s, d;
        s = int'(origin_to_pe[x][y].x) * MY + int'(origin_to_pe[x][y].y);
        d = x * MY + y;
        recvd++;
        if (s >= MX * MY || exp_q[s][d].size() == 0) check(0, $sformatf("unexpected message at (%0d,%0d)", x, y));
        else check(input_to_pe[x][y] == exp_q[s][d].pop_front(), "message order/content");
      end
    end
  end

  task automatic idle_all();
    for (int x = 0; x < MX; x++) for (int y = 0; y < MY; y++) begin
      pe_talks[x][y] = 0; pe_read[x][y] = 0;
    end
  endtask

  task automatic single(int sx, int sy, int dx, int dy, int exp_lat);
    int lat;
    @(negedge clk);
    pe_talks[sx][sy] = 1; pe_output[sx][sy] = 16'h0018; pe_dest[sx][sy] = '{x: 2'(dx), y: 2'(dy)};
    exp_q[sx*MY+sy][dx*MY+dy].push_back(16'h0018);
    sent++;
    lat = 0;
    @(negedge clk); pe_talks[sx][sy] = 0; lat = 1;
    while (!alert_pe[dx][dy] && lat < 100) begin @(negedge clk); lat++; end
    check(lat == exp_lat, $sformatf("latency (%0d,%0d)->(%0d,%0d) = %0d, expected %0d", sx, sy, dx, dy, lat, exp_lat));
    pe_read[dx][dy] = 1;
    @(negedge clk); pe_read[dx][dy] = 0;
  endtask

  initial begin
    for (int x = 0; x < MX; x++) for (int y = 0; y < MY; y++) begin
      pe_output[x][y] = '0; pe_dest[x][y] = '0; seq[x*MY+y] = 0;
    end
    idle_all();
    repeat (3) @(posedge clk);
    rst_n = 1;
    single(1, 0, 1, 1, 2 * 1 + 4);
    single(0, 0, 2, 2, 2 * 4 + 4);
    single(2, 2, 0, 0, 2 * 4 + 4);
    // random traffic
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      for (int x = 0; x < MX; x++) for (int y = 0; y < MY; y++) begin
        int s, dx, dy;
        s = x * MY + y;
        pe_read[x][y] = alert_pe[x][y] && (((t / 700) % 2 == 1 && x == 1) ? 1'b0 : ($urandom_range(0, 99) < 70));
        pe_talks[x][y] = 0;
        if ($urandom_range(0, 99) < 25) begin
          if (!pe_avail[x][y]) backpressure++;
          else begin
            dx = $urandom_range(0, MX - 1); dy = $urandom_range(0, MY - 1);
            pe_talks[x][y]  = 1;
            pe_dest[x][y]   = '{x: 2'(dx), y: 2'(dy)};
            pe_output[x][y] = {4'(s), 12'(seq[s]++)};
            exp_q[s][dx*MY+dy].push_back(pe_output[x][y]);
            sent++;
          end
        end
      end
    end
    @(negedge clk);
    idle_all();
    repeat (400) begin
      @(negedge clk);
      for (int x = 0; x < MX; x++) for (int y = 0; y < MY; y++) pe_read[x][y] = alert_pe[x][y];
    end
    idle_all();
    check(recvd == sent, $sformatf("delivered %0d of %0d", recvd, sent));
    check(backpressure > 0, "NI back-pressure happened");
    $display("sent %0d, back-pressure events %0d", sent, backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
