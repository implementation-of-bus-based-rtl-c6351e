// ac97_link: AC'97 controller side of the AC-link to the audio codec.
//
// The codec drives BIT_CLK (12.288 MHz). The controller frames the serial
// stream: 256 bit-clock periods per frame (48 kHz), a 16-bit tag slot
// (slot 0) followed by twelve 20-bit slots, MSB first. SYNC is high during
// slot 0. Tag bits: 15 frame valid, 14..3 slot 1..12 valid, 2 zero, 1:0
// codec ID (0, primary codec). Slot 1 carries a codec register command
// ({read, 7-bit register address, 12 zero bits}), slot 2 its 16-bit data
// (left-aligned, four zero bits), slots 3 and 4 the left and right 20-bit
// PCM samples. Other slots are zero and marked invalid.
//
// Clocking: everything runs on the system clock (87.5 MHz in the decoder,
// about 7 clocks per bit). BIT_CLK goes through a two-flop synchroniser;
// on each detected rising edge SDATA_OUT and SYNC move to the next bit, so
// they change shortly after the rising edge and are stable at the falling
// edge where the codec samples them. This needs a system clock of at least
// about 5x BIT_CLK.
// Interface: a register command is offered with cmd_valid/cmd_read/
// cmd_addr/cmd_data and taken (cmd_taken pulse) at the start of the next
// frame. At each frame start the controller pulses pcm_req if pcm_avail;
// the pair arrives with pcm_valid (any time before slot 3) and is sent with
// slots 3/4 marked valid. frame_count counts frames; ac97_reset_n is the
// active-low codec reset.
// Frame layout, SYNC use, slot roles and the data edge follow the document
// and its AC-link figures; the single-clock-domain scheme and the command
// port are this design's choice.
module ac97_link #(
  parameter int unsigned PCM_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  // AC-link pins
  input  logic             bit_clk,
  output logic             sync,
  output logic             sdata_out,
  output logic             ac97_reset_n,
  // register commands
  input  logic             cmd_valid,
  input  logic             cmd_read,
  input  logic [6:0]       cmd_addr,
  input  logic [15:0]      cmd_data,
  output logic             cmd_taken,
  // PCM source
  input  logic             pcm_avail,
  output logic             pcm_req,
  input  logic             pcm_valid,
  input  logic [PCM_W-1:0] pcm_left,
  input  logic [PCM_W-1:0] pcm_right,
  output logic [15:0]      frame_count
);
  localparam int unsigned FRAME_BITS = 256;

  logic [2:0]   bclk_q;
  logic         bclk_rise;
  logic [7:0]   bitpos;         // position of the next bit to drive
  logic [255:0] frame_sh;       // bits still to send, MSB first
  logic [19:0]  slot1, slot2;
  logic         pcm_in_frame;
  logic [PCM_W-1:0] left_q, right_q;

  assign bclk_rise = bclk_q[1] && !bclk_q[2];

  // 20-bit slot from a PCM sample (left-aligned if narrower)
  function automatic logic [19:0] to_slot(logic [PCM_W-1:0] s);
    return 20'({s, {(20 - PCM_W){1'b0}}});
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bclk_q       <= '0;
      bitpos       <= '0;
      frame_sh     <= '0;
      sync         <= 1'b0;
      sdata_out    <= 1'b0;
      ac97_reset_n <= 1'b0;
      slot1        <= '0;
      slot2        <= '0;
      pcm_in_frame <= 1'b0;
      cmd_taken    <= 1'b0;
      pcm_req      <= 1'b0;
      left_q       <= '0;
      right_q      <= '0;
      frame_count  <= '0;
    end else begin
      bclk_q       <= {bclk_q[1:0], bit_clk};
      ac97_reset_n <= 1'b1;
      cmd_taken    <= 1'b0;
      pcm_req      <= 1'b0;
      if (pcm_valid) begin
        left_q  <= pcm_left;
        right_q <= pcm_right;
      end
      if (bclk_rise) begin
        if (bitpos == '0) begin
          // frame start: decide the contents of this frame
          pcm_in_frame <= pcm_avail;
          if (cmd_valid) begin
            slot1     <= {cmd_read, cmd_addr, 12'd0};
            slot2     <= {cmd_data, 4'd0};
            cmd_taken <= 1'b1;
          end else begin
            slot1 <= '0;
            slot2 <= '0;
          end
          pcm_req   <= pcm_avail;
          // tag: frame valid, slot1..12 valid, 0, codec id 00
          sdata_out <= 1'b1;
          frame_sh  <= {cmd_valid, cmd_valid, pcm_avail, pcm_avail, 8'd0, 3'd0, 241'd0};
          sync      <= 1'b1;
          frame_count <= frame_count + 1'b1;
        end else begin
          sdata_out <= frame_sh[255];
          frame_sh  <= {frame_sh[254:0], 1'b0};
          sync      <= bitpos < 8'd16;
          // load the data slots when the tag has been sent
          if (bitpos == 8'd15) begin
            frame_sh <= {slot1, slot2,
                         pcm_in_frame ? to_slot(left_q)  : 20'd0,
                         pcm_in_frame ? to_slot(right_q) : 20'd0,
                         176'd0};
          end
        end
        bitpos <= (bitpos == 8'(FRAME_BITS - 1)) ? '0 : bitpos + 1'b1;
      end
    end
  end
endmodule
