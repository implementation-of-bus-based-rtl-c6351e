// uart_tx: serial transmitter for the host link (8N1, LSB first).
// Pulse `start` with a byte on `data` while `busy` is low; the byte leaves as
// a start bit, eight data bits and a stop bit, each CLKS_PER_BIT cycles long.
// `busy` is high from the cycle after `start` until the stop bit has ended.
// Frame format and rate are this design's choice (see uart_rx).
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 760
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);
  logic [9:0] shreg;      // stop, data[7:0], start
  logic [3:0] nbits;
  logic [$clog2(CLKS_PER_BIT)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '1;
      nbits <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      txd   <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        shreg <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= '0;
        busy  <= 1'b1;
      end
    end else begin
      txd <= shreg[0];
      if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
        cnt   <= '0;
        shreg <= {1'b1, shreg[9:1]};
        nbits <= nbits - 1'b1;
        if (nbits == 4'd1) busy <= 1'b0;
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
