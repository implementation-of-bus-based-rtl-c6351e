// tb_noc_ni: network interface at tile (1,0).
// Directed: data 0x0018 for tile (1,1) must leave as the 26-bit flit
// 0x0006115 (data 0x0018, origin 0100, destination 0101, body type 01).
// Random: streams in both directions with the router and the PE applying
// back-pressure at random; checks order, wrapping/unwrapping, that pe_avail
// drops after eight unsent flits, and that ni_avail drops after eight
// unread ones.
module tb_noc_ni;
  import mp3soc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pe_talks, pe_avail, alert_pe, pe_read, tell_noc, noc_avail, tell_pe, ni_avail;
  logic [15:0] pe_output, input_to_pe;
  loc_t pe_dest, origin_to_pe;
  flit_t data_to_noc, data_to_pe;
  int checks = 0, failures = 0, tx_full = 0, rx_full = 0;
  flit_t tx_q[$];
  logic [19:0] rx_q[$];

  noc_ni #(.X(1), .Y(0)) dut (.*);
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

  always @(posedge clk) if (rst_n) begin
    if (tell_noc) begin
      check(noc_avail, "tell only when router available");
      if (tx_q.size() == 0) check(0, "unexpected flit to router");
      else check(data_to_noc == tx_q.pop_front(), "wrapped flit");
    end
    if (pe_read && alert_pe) begin
      if (rx_q.size() == 0) check(0, "unexpected data to PE");
      else check({origin_to_pe, input_to_pe} == rx_q.pop_front(), "unwrapped data/origin");
    end
    if (!pe_avail) tx_full++;
    if (!ni_avail) rx_full++;
  end

  initial begin
    flit_t f;
    pe_talks = 0; pe_output = '0; pe_dest = '0; pe_read = 0; noc_avail = 0;
    tell_pe = 0; data_to_pe = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the document's example: (1,0) -> (1,1), data 0x0018
    @(negedge clk);
    pe_talks = 1; pe_output = 16'h0018; pe_dest = '{x:1, y:1};
    tx_q.push_back(flit_t'(26'h0006115));
    @(negedge clk); pe_talks = 0; noc_avail = 1;
    #1;
    check(tell_noc && data_to_noc == flit_t'(26'h0006115), "flit 0x0006115 offered to the router");
    @(negedge clk); noc_avail = 0;
    // random both ways
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      noc_avail = (t % 400 < 100) ? 1'b0 : ($urandom_range(0, 99) < 50);
      pe_read   = alert_pe && ((t % 400 >= 200 && t % 400 < 300) ? 1'b0 : ($urandom_range(0, 99) < 50));
      pe_talks  = pe_avail && ($urandom_range(0, 99) < 40);
      if (pe_talks) begin
        pe_output = 16'($urandom);
        pe_dest   = '{x: 2'($urandom_range(0, 2)), y: 2'($urandom_range(0, 2))};
        f = '{data: pe_output, origin: '{x:1, y:0}, dest: pe_dest, ftype: FLIT_BODY};
        tx_q.push_back(f);
      end
      tell_pe = ni_avail && ($urandom_range(0, 99) < 40);
      if (tell_pe) begin
        data_to_pe = '{data: 16'($urandom), origin: '{x: 2'($urandom_range(0, 2)), y: 2'($urandom_range(0, 2))},
                       dest: '{x:1, y:0}, ftype: FLIT_BODY};
        rx_q.push_back({data_to_pe.origin, data_to_pe.data});
      end
    end
    @(negedge clk); pe_talks = 0; tell_pe = 0; noc_avail = 1; pe_read = 0;
    repeat (20) begin @(negedge clk); pe_read = alert_pe; end
    @(negedge clk); pe_read = 0;
    check(tx_q.size() == 0 && rx_q.size() == 0, "all delivered");
    check(tx_full > 0, "transmit buffer filled up");
    check(rx_full > 0, "receive buffer filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
