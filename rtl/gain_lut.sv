// gain_lut: global gain of one channel/granule to an IEEE-754 single.
//
// The dequantiser scales every sample by 2^((gg - 210)/4), gg being the 8-bit
// global gain. With n = 210 - gg that is 2^(-n/4), and its single-precision
// bit pattern splits into:
//   bit 31      0 (the value is never negative);
//   bits 30:24  63 - floor((n + 3) / 8), an integer expression;
//   bits 23:0   one of eight patterns selected by n mod 8 (the exponent
//               LSB plus the 23 fraction bits of 2^(-k/4), k = n mod 8).
// So an 8 x 24 table plus a subtract and a shift replace a 256 x 32 table
// and any power or division hardware. Purely combinational.
// The split and the patterns follow the document; the sign convention
// n = 210 - gg is chosen so that the table and the gain formula agree.
//
// Lint note: the exponent is computed 10 bits wide (signed) to hold
// negative n; only its low 7 bits form bits 30:24, the upper bits are
// unused by design.
// Bit 31 (sign) is constant 0 by construction.
module gain_lut (
  input  logic [7:0]  global_gain,
  output logic [31:0] gain_float
);
  logic signed [9:0] n;
  logic signed [9:0] e_hi;
  logic [23:0]       low;

  assign n    = 10'sd210 - $signed({2'b00, global_gain});
  assign e_hi = 10'sd63 - ((n + 10'sd3) >>> 3);   // arithmetic shift = floor division

  always_comb begin
    case (n[2:0])   // n mod 8, also for negative n
      3'd0: low = 24'h800000;
      3'd1: low = 24'h5744FD;
      3'd2: low = 24'h3504F3;
      3'd3: low = 24'h1837F0;
      3'd4: low = 24'h000000;
      3'd5: low = 24'hD744FD;
      3'd6: low = 24'hB504F3;
      default: low = 24'h9837F0;
    endcase
  end

  assign gain_float = {1'b0, e_hi[6:0], low};
endmodule
