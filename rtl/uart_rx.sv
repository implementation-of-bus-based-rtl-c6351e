// uart_rx: serial receiver for the host link (8 data bits, no parity, one
// stop bit, LSB first). The line is synchronised with two flops; a falling
// edge starts a character, which is then sampled in the middle of each bit
// period of CLKS_PER_BIT clock cycles. A valid stop bit gives a one-cycle
// `valid` pulse with the byte on `data`; a missing stop bit is dropped and
// pulses `frame_err`.
// The document only says a serial port is used; the frame format and the
// default rate (87.5 MHz / 115200 baud ~ 760 clocks per bit) are this
// design's choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 760
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;
  state_e state;
  logic [1:0] sync_q;
  logic [$clog2(CLKS_PER_BIT)-1:0] cnt;
  logic [2:0] bitn;
  logic rx;

  assign rx = sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q    <= 2'b11;
      state     <= S_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync_q    <= {sync_q[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        S_IDLE: if (!rx) begin
          cnt   <= '0;
          state <= S_START;
        end
        S_START: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT / 2 - 1)) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= rx ? S_IDLE : S_DATA;   // glitch: back to idle
          end else cnt <= cnt + 1'b1;
        end
        S_DATA: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            data <= {rx, data[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) state <= S_STOP;
          end else cnt <= cnt + 1'b1;
        end
        S_STOP: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt       <= '0;
            valid     <= rx;
            frame_err <= !rx;
            state     <= S_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
