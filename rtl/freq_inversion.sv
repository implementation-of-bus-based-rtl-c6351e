// freq_inversion: frequency-inversion step of the Hybrid processing element.
//
// The sub-band filter bank mirrors the spectrum of every odd sub-band. After
// the IMDCT this is undone by multiplying every second sample of every
// second sub-band by -1. The samples are IEEE-754 single-precision values,
// so the multiplication is a flip of the sign bit (bit 31): no floating-point
// core is needed.
//
// Order of the stream: one granule of one channel is SUBBANDS x SAMPLES
// values (32 x 18 = 576), sub-band by sub-band, the SAMPLES values of a
// sub-band in time order. Sample ss of sub-band sb is negated when both sb
// and ss are odd. Two counters track (sb, ss); `in_first` marks the first
// value of a granule and restarts them, and they also wrap by themselves
// after SUBBANDS x SAMPLES values.
//
// Interface and timing: in_valid/in_first/in_data in; out_valid/out_data
// one clock later (registered). No back-pressure: one value per clock.
// The rule (which samples are negated) and the 32 x 18 granule follow the
// document; the sign-bit implementation, the stream order and the
// in_first marker are this design's choice.
module freq_inversion #(
  parameter int unsigned SUBBANDS = 32,
  parameter int unsigned SAMPLES  = 18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_first,
  input  logic [31:0] in_data,
  output logic        out_valid,
  output logic [31:0] out_data
);
  localparam int unsigned SBW = $clog2(SUBBANDS);
  localparam int unsigned SSW = $clog2(SAMPLES);

  logic [SBW-1:0] sb, sb_now;
  logic [SSW-1:0] ss, ss_now;

  // position of the value arriving in this cycle
  assign sb_now = in_first ? '0 : sb;
  assign ss_now = in_first ? '0 : ss;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb        <= '0;
      ss        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= {in_data[31] ^ (sb_now[0] & ss_now[0]), in_data[30:0]};
        if (ss_now == SSW'(SAMPLES - 1)) begin
          ss <= '0;
          sb <= (sb_now == SBW'(SUBBANDS - 1)) ? '0 : sb_now + 1'b1;
        end else begin
          ss <= ss_now + 1'b1;
          sb <= sb_now;
        end
      end
    end
  end
endmodule
