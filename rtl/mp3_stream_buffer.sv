// mp3_stream_buffer: on-chip RAM for the MP3 file sent by the host.
//
// DEPTH bytes (70,000 by default, the size of the MP3 file the decoder can
// hold) used as a circular byte FIFO: the host interface writes bitstream
// bytes, the decoder side reads them in order. `free` is the number of empty
// slots, which the host asks for before sending more. The read is
// synchronous like a block RAM: rd_en in one cycle, rd_data valid
// (rd_valid) in the next. Writes when full and reads when empty are ignored.
// The size follows the document; the FIFO organisation is this design's
// choice.
module mp3_stream_buffer #(
  parameter int unsigned DEPTH = 70000
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [7:0]               wr_data,
  input  logic                     rd_en,
  output logic [7:0]               rd_data,
  output logic                     rd_valid,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign do_wr = wr_en && (count != CW'(DEPTH));
  assign do_rd = rd_en && (count != '0);
  assign free  = CW'(DEPTH) - count;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
    if (do_rd) rd_data <= mem[rd_ptr];
  end
endmodule
