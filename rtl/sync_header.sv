// sync_header: frame synchronisation front of the Sync processing element.
//
// Bytes of the MP3 bitstream arrive one per in_valid. The unit looks for the
// sync word, twelve 1 bits starting on a byte boundary (a byte 0xFF followed
// by a byte whose upper nibble is 0xF). The 32-bit frame header is that pair
// of bytes and the next two; once all four are in, header_valid pulses for
// one cycle with the fields split out (sync 31:20, version 19, layer 18:17,
// protection 16, bit-rate index 15:12, sampling-rate index 11:10, padding 9,
// private 8, channel mode 7:6, mode extension 5:4, copyright 3, original 2,
// emphasis 1:0). `stereo` is low only for channel mode 11 (single channel).
// The unit then searches for the next sync word. sync_count counts frames
// found.
// Sync-word rule and field positions follow the document. The decoding of
// the side information that follows the header is not part of this unit.
module sync_header
  import mp3soc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  output logic        header_valid,
  output mp3_header_t header,
  output logic        stereo,
  output logic [15:0] sync_count
);
  typedef enum logic [2:0] {S_SEARCH, S_GOT_FF, S_B2, S_B3} state_e;
  state_e      state;
  logic [23:0] hdr_sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_SEARCH;
      hdr_sh       <= '0;
      header       <= '0;
      header_valid <= 1'b0;
      sync_count   <= '0;
    end else begin
      header_valid <= 1'b0;
      if (in_valid) begin
        hdr_sh <= {hdr_sh[15:0], in_byte};
        case (state)
          S_SEARCH: if (in_byte == 8'hFF) state <= S_GOT_FF;
          S_GOT_FF: begin
            if (in_byte[7:4] == 4'hF) state <= S_B2;
            else                      state <= S_SEARCH;
          end
          S_B2: state <= S_B3;
          S_B3: begin
            header       <= mp3_header_t'({hdr_sh, in_byte});
            header_valid <= 1'b1;
            sync_count   <= sync_count + 1'b1;
            state        <= S_SEARCH;
          end
          default: state <= S_SEARCH;
        endcase
      end
    end
  end

  assign stereo = header.channel_mode != 2'b11;
endmodule
