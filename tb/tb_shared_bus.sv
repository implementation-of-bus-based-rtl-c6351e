// tb_shared_bus: nine ports raising and holding their request flags at
// random. A separate model of the arbitration (round-robin pick while the
// bus is idle, owner keeps the bus while its flag is high) predicts
// job_req, grant and grant_access every cycle; the bus must carry the
// owner's data/address/request and the OR of the acknowledges, and read
// zero when nobody owns it. Every port must get the bus.
module tb_shared_bus;
  import mp3soc_pkg::*;
  localparam int N = 9;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] port_req, port_ack, grant;
  bus_word_t port_word [N];
  logic [3:0] grant_access;
  logic job_req;
  bus_word_t bus;
  int checks = 0, failures = 0;
  bit m_jr; int m_own, m_last;
  int hold [N];
  int grants_per_port [N];

  shared_bus #(.N_PORTS(N)) dut (.*);
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

  initial begin
    m_jr = 0; m_own = 0; m_last = N - 1;
    port_req = '0; port_ack = '0;
    for (int i = 0; i < N; i++) begin port_word[i] = '0; hold[i] = 0; grants_per_port[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // port behaviour: request at random; the owner holds for a while
      for (int i = 0; i < N; i++) begin
        port_word[i] = '{data: 16'($urandom), addr: 8'($urandom), ack: 1'b0, req: 1'($urandom)};
        if (m_jr && m_own == i) begin
          if (hold[i] > 0) hold[i]--; else port_req[i] = 0;
        end else if (!port_req[i]) port_req[i] = ($urandom_range(0, 99) < 10);
      end
      port_ack = N'($urandom) & N'($urandom);
      #1;
      check(job_req == m_jr, "job_req");
      check(grant == (m_jr ? N'(1) << m_own : '0), "grant");
      if (m_jr) begin
        check(grant_access == 4'(m_own), "grant_access");
        check(bus.data == port_word[m_own].data && bus.addr == port_word[m_own].addr &&
              bus.req == port_word[m_own].req, "bus carries owner's word");
      end else check(bus.data == '0 && bus.addr == '0 && !bus.req, "idle bus reads zero");
      check(bus.ack == |port_ack, "ack is OR of slaves");
      @(posedge clk);
      // model update
      if (!m_jr) begin
        for (int k = 1; k <= N; k++)
          if (!m_jr && port_req[(m_last + k) % N]) begin
            m_jr = 1; m_own = (m_last + k) % N; m_last = m_own;
            hold[m_own] = $urandom_range(0, 6);
            grants_per_port[m_own]++;
          end
      end else if (!port_req[m_own]) m_jr = 0;
    end
    for (int i = 0; i < N; i++) check(grants_per_port[i] > 0, $sformatf("port %0d got the bus", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
