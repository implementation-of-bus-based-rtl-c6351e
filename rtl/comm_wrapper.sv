// comm_wrapper: message layer between the host computer and the decoder.
//
// Every message, in both directions, is a byte stream: three length bytes,
// one type byte, then `length` payload bytes. The length counts payload
// bytes only and is sent most significant byte first, so a 25-byte block of
// bitstream arrives as 0, 0, 25, 55, b0 ... b24.
// Types handled:
//   MSG_MP3_DATA (55)  payload bytes are written to the bitstream RAM;
//   MSG_FREE_REQ       the wrapper answers with MSG_FREE_RESP carrying the
//                      number of free RAM slots as 3 bytes (MSB first);
//   MSG_START          pulses start_decode once the message has ended;
//   other types        payload is skipped.
// Interface: rx_valid/rx_byte from the serial receiver; tx_start/tx_byte to
// the serial transmitter with its busy flag; mem_wr/mem_data into the
// bitstream RAM and its free-slot count. One byte is handled per received
// character, so the wrapper never stalls the receiver.
// The header layout and type 55 follow the document; the length byte order
// is read from its worked example; the other type codes and the reply
// format are this design's choice.
module comm_wrapper
  import mp3soc_pkg::*;
#(
  parameter int unsigned FREE_W = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx_valid,
  input  logic [7:0]        rx_byte,
  output logic              tx_start,
  output logic [7:0]        tx_byte,
  input  logic              tx_busy,
  output logic              mem_wr,
  output logic [7:0]        mem_data,
  input  logic [FREE_W-1:0] mem_free,
  output logic              start_decode
);
  typedef enum logic [1:0] {R_HDR, R_PAYLOAD} rstate_e;
  rstate_e     rstate;
  logic [1:0]  hcnt;
  logic [23:0] len, left;
  logic [7:0]  mtype;

  // reply sequencer: 7 bytes
  logic        reply_req;
  logic [55:0] reply_sh;
  logic [2:0]  reply_left;
  logic        tx_wait;     // one cycle for busy to rise after start

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate       <= R_HDR;
      hcnt         <= '0;
      len          <= '0;
      left         <= '0;
      mtype        <= '0;
      mem_wr       <= 1'b0;
      mem_data     <= '0;
      start_decode <= 1'b0;
      reply_req    <= 1'b0;
    end else begin
      mem_wr       <= 1'b0;
      start_decode <= 1'b0;
      reply_req    <= 1'b0;
      if (rx_valid) begin
        case (rstate)
          R_HDR: begin
            hcnt <= hcnt + 1'b1;
            if (hcnt != 2'd3) begin
              len <= {len[15:0], rx_byte};
            end else begin
              hcnt  <= '0;
              mtype <= rx_byte;
              left  <= len;
              if (len != '0) rstate <= R_PAYLOAD;
              else if (rx_byte == MSG_FREE_REQ) reply_req <= 1'b1;
              else if (rx_byte == MSG_START)    start_decode <= 1'b1;
            end
          end
          R_PAYLOAD: begin
            left <= left - 1'b1;
            if (mtype == MSG_MP3_DATA) begin
              mem_wr   <= 1'b1;
              mem_data <= rx_byte;
            end
            if (left == 24'd1) begin
              rstate <= R_HDR;
              if (mtype == MSG_FREE_REQ) reply_req    <= 1'b1;
              if (mtype == MSG_START)    start_decode <= 1'b1;
            end
          end
          default: rstate <= R_HDR;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reply_sh   <= '0;
      reply_left <= '0;
      tx_start   <= 1'b0;
      tx_byte    <= '0;
      tx_wait    <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      tx_wait  <= 1'b0;
      if (reply_req && reply_left == '0) begin
        reply_sh   <= {8'd0, 8'd0, 8'd3, MSG_FREE_RESP, 24'(mem_free)};
        reply_left <= 3'd7;
      end else if (reply_left != '0 && !tx_busy && !tx_start && !tx_wait) begin
        tx_start   <= 1'b1;
        tx_wait    <= 1'b1;
        tx_byte    <= reply_sh[55:48];
        reply_sh   <= {reply_sh[47:0], 8'd0};
        reply_left <= reply_left - 1'b1;
      end
    end
  end
endmodule
