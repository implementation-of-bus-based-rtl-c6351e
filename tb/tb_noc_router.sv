// tb_noc_router: the router at tile (1,1) with traffic on all five inputs.
// Each input sends flits whose destinations are legal for XY routing from
// where they come in; output availability is toggled at random. Checks:
// every flit leaves on the port XY routing names (worked out here from the
// coordinates), flits between one input and one output keep their order,
// nothing is lost or duplicated, an isolated flit crosses in 2 cycles, and
// a flit was held back by a busy output at least once.
module tb_noc_router;
  import mp3soc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  in_tell [NPORTS], in_avail [NPORTS], out_tell [NPORTS], out_avail [NPORTS];
  flit_t in_flit [NPORTS], out_flit [NPORTS];
  int checks = 0, failures = 0, stalls = 0, sent = 0, recvd = 0;
  flit_t exp_q [NPORTS][NPORTS][$];   // [input][output]

  noc_router #(.X(1), .Y(1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int exp_port(int dx, int dy);
    if (dx > 1) return 2;      // E
    if (dx < 1) return 3;      // W
    if (dy > 1) return 1;      // N
    if (dy < 1) return 4;      // S
    return 0;                  // PE
  endfunction

  // legal destination for a flit entering on port p
  function automatic loc_t rand_dest(int p);
    loc_t d;
    d.x = 2'($urandom_range(0, 2));
    d.y = 2'($urandom_range(0, 2));
    case (p)
      1: begin d.x = 1; d.y = 2'($urandom_range(0, 1)); end   // from N: going to smaller y
      4: begin d.x = 1; d.y = 2'($urandom_range(1, 2)); end   // from S: going to larger y
      2: d.x = 2'($urandom_range(0, 1));                      // from E: going west
      3: d.x = 2'($urandom_range(1, 2));                      // from W: going east
      default: ;
    endcase
    return d;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (out_tell[o]) begin
        int src;
        flit_t f;
        f = out_flit[o];
        src = int'(f.data[15:13]);
        recvd++;
        check(out_avail[o], "sent only to an available port");
        check(exp_port(int'(f.dest.x), int'(f.dest.y)) == o, $sformatf("flit to (%0d,%0d) left on port %0d", f.dest.x, f.dest.y, o));
        if (exp_q[src][o].size() == 0) check(0, "unexpected flit");
        else check(f == exp_q[src][o].pop_front(), "order input->output");
      end
      if (!out_avail[o]) begin
        int pend = 0;
        for (int i = 0; i < NPORTS; i++) pend += exp_q[i][o].size();
        if (pend > 0) stalls++;
      end
    end
  end

  int seq [NPORTS];
  bit random_avail = 0;
  always @(negedge clk) for (int o = 0; o < NPORTS; o++)
    out_avail[o] = random_avail ? ($urandom_range(0, 99) < 60) : 1'b1;

  initial begin
    flit_t f;
    int t0;
    for (int p = 0; p < NPORTS; p++) begin in_tell[p] = 0; in_flit[p] = '0; seq[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // isolated flit: PE -> E, latency
    @(negedge clk);
    f = '{data: 16'h0001, origin: '{x:1, y:1}, dest: '{x:2, y:1}, ftype: FLIT_BODY};
    in_tell[0] = 1; in_flit[0] = f;
    exp_q[0][2].push_back(f);
    sent++;
    t0 = 0;
    @(negedge clk); in_tell[0] = 0;
    while (!out_tell[2]) begin @(negedge clk); t0++; end
    check(t0 == 1, $sformatf("isolated flit latency %0d cycles after the input cycle (expect 2 total)", t0 + 1));
    repeat (3) @(negedge clk);
    // random traffic
    random_avail = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) begin
        in_tell[p] = 0;
        if (in_avail[p] && $urandom_range(0, 99) < 40) begin
          f.dest   = rand_dest(p);
          f.origin = '{x:0, y:0};
          f.ftype  = FLIT_BODY;
          f.data   = {3'(p), 13'(seq[p]++)};
          in_tell[p] = 1; in_flit[p] = f;
          exp_q[p][exp_port(int'(f.dest.x), int'(f.dest.y))].push_back(f);
          sent++;
        end
      end
    end
    @(negedge clk);
    for (int p = 0; p < NPORTS; p++) in_tell[p] = 0;
    random_avail = 0;
    repeat (100) @(negedge clk);
    check(recvd == sent, $sformatf("all flits delivered %0d/%0d", recvd, sent));
    check(stalls > 0, "busy output held a flit");
    $display("sent %0d, stall cycles %0d", sent, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
