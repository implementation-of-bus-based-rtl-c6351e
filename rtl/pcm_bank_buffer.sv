// pcm_bank_buffer: two-bank PCM buffer between sub-band synthesis and the
// AC-link driver.
//
// Each bank holds one granule: SAMPLES_PER_GRANULE 20-bit PCM samples of the
// left channel followed by as many of the right channel, written in that
// order by the synthesis side (wr_en/wr_data, accepted while wr_ready). When
// a bank is full the writer moves to the other bank, and a bank only becomes
// writable again once the driver has read all of it, so synthesis fills one
// bank while the driver plays the other.
// The driver pulses rd_req once per audio frame while rd_avail is high; one
// cycle later rd_valid shows the next left/right pair (synchronous RAM read).
// When the driver finishes a bank it moves to the other one; if that bank is
// not full yet, `underrun` pulses: the decoder did not keep up with real
// time. banks_played counts finished banks.
// Two banks of one granule each, holding both channels, follow the
// document; the left-then-right write order and the flags are this design's
// choice.
module pcm_bank_buffer #(
  parameter int unsigned SAMPLES_PER_GRANULE = 576,
  parameter int unsigned PCM_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  // synthesis side
  input  logic             wr_en,
  input  logic [PCM_W-1:0] wr_data,
  output logic             wr_ready,
  // driver side
  input  logic             rd_req,
  output logic             rd_avail,
  output logic             rd_valid,
  output logic [PCM_W-1:0] rd_left,
  output logic [PCM_W-1:0] rd_right,
  output logic             underrun,
  output logic [15:0]      banks_played
);
  localparam int unsigned N  = SAMPLES_PER_GRANULE;
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned WW = $clog2(2 * N);

  // one RAM per channel, two banks each: address {bank, index}
  logic [PCM_W-1:0] mem_l [2*N];
  logic [PCM_W-1:0] mem_r [2*N];

  logic [1:0]    full;        // bank filled and not yet played
  logic          wbank, rbank;
  logic [WW-1:0] widx;        // 0 .. 2N-1 within the bank (left then right)
  logic [AW-1:0] ridx;
  logic          do_wr, do_rd;

  assign wr_ready = !full[wbank];
  assign rd_avail = full[rbank];
  assign do_wr    = wr_en && wr_ready;
  assign do_rd    = rd_req && rd_avail;

  function automatic int unsigned addr(logic b, int unsigned i);
    return (b ? N : 0) + i;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) begin
      if (widx < WW'(N)) mem_l[addr(wbank, int'(widx))]     <= wr_data;
      else               mem_r[addr(wbank, int'(widx) - N)] <= wr_data;
    end
    if (do_rd) begin
      rd_left  <= mem_l[addr(rbank, int'(ridx))];
      rd_right <= mem_r[addr(rbank, int'(ridx))];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full         <= '0;
      wbank        <= 1'b0;
      rbank        <= 1'b0;
      widx         <= '0;
      ridx         <= '0;
      rd_valid     <= 1'b0;
      underrun     <= 1'b0;
      banks_played <= '0;
    end else begin
      rd_valid <= do_rd;
      underrun <= 1'b0;
      if (do_wr) begin
        if (widx == WW'(2 * N - 1)) begin
          widx <= '0;
          wbank <= !wbank;
        end else widx <= widx + 1'b1;
      end
      if (do_rd) begin
        if (ridx == AW'(N - 1)) begin
          ridx         <= '0;
          rbank        <= !rbank;
          banks_played <= banks_played + 1'b1;
          // next bank must already be full (or complete this very cycle)
          if (!full[!rbank] && !(do_wr && wbank == !rbank && widx == WW'(2 * N - 1)))
            underrun <= 1'b1;
        end else ridx <= ridx + 1'b1;
      end
      for (int b = 0; b < 2; b++) begin
        if (do_wr && wbank == 1'(b) && widx == WW'(2 * N - 1)) full[b] <= 1'b1;
        else if (do_rd && rbank == 1'(b) && ridx == AW'(N - 1)) full[b] <= 1'b0;
      end
    end
  end
endmodule
