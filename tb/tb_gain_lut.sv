// tb_gain_lut: all 256 global-gain values. The expected value 2^((gg-210)/4)
// is computed in double precision, converted here to single precision by
// hand (exponent rebias, fraction rounded to 23 bits), and must match the
// converter within one unit in the last place. Also checks the printed
// table entries for gg = 210, 209 and 197 (0x3F800000, 0x3F5744FD,
// 0x3DD744FD).
module tb_gain_lut;
  logic [7:0]  global_gain;
  logic [31:0] gain_float;
  int checks = 0, failures = 0;

  gain_lut dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] to_single(real r);
    logic [63:0] d;
    logic [52:0] frac;
    logic [31:0] s;
    int e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    frac = {1'b0, d[51:0]} + 53'(1 << 28);     // round to nearest at bit 29
    if (frac[52]) begin e++; frac = '0; end
    s = {d[63], 8'(e), frac[51:29]};
    return s;
  endfunction

  initial begin
    logic [31:0] exp_v;
    int diff;
    #1;
    for (int g = 0; g < 256; g++) begin
      global_gain = 8'(g);
      #1;
      exp_v = to_single(2.0 ** ((real'(g) - 210.0) / 4.0));
      diff = int'(gain_float) - int'(exp_v);
      check(diff >= -1 && diff <= 1, $sformatf("gg=%0d got %h expected %h", g, gain_float, exp_v));
    end
    global_gain = 8'd210; #1; check(gain_float == 32'h3F800000, "table row 0");
    global_gain = 8'd209; #1; check(gain_float == 32'h3F5744FD, "table row 1");
    global_gain = 8'd197; #1; check(gain_float == 32'h3DD744FD, "table row 13");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
