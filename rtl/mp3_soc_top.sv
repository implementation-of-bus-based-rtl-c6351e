// mp3_soc_top: communication and I/O platform of the nine-PE MP3 decoder,
// in both of its interconnect variants.
//
// The decoder is split into nine processing elements (PEs): Manager, Sync,
// Get Scale, Huffman, Dequantization, Stereo, Antialias, Hybrid and
// Synthesis. They share no memory; all data moves as 16-bit messages over
// the on-chip interconnect. This top holds the two interconnects side by
// side, each with its nine PE attachment points brought out as ports:
//   * noc_*  3x3 mesh network-on-chip, one PE per tile ([x][y] arrays).
//            PE placement used by the decoder: Get Scale (0,0),
//            Manager (1,0), Synthesis (2,0), Huffman (0,1), Sync (1,1),
//            Hybrid (2,1), Dequantization (0,2), Stereo (1,2),
//            Antialias (2,2).
//   * bus_*  nine-port 26-bit shared bus with round-robin arbitration; the
//            port index is the PE's bus address.
// and the parts common to both decoders:
//   * host link: serial receiver/transmitter and message wrapper, storing
//     the MP3 file in a 70,000-byte bitstream RAM read by the Manager
//     (sb_rd_*), with a start-decoding strobe;
//   * sync_header: sync-word search and header fields for the Sync PE;
//   * gain_lut: global-gain-to-float converter for the Dequantization PE;
//   * freq_inversion: sign flips after the IMDCT, for the Hybrid PE;
//   * two-bank PCM buffer fed by Synthesis and played through the AC-link
//     driver to the codec.
// The PEs themselves are not part of this RTL. All logic runs on one clock
// (87.5 MHz on the original board) with an active-low asynchronous reset.
//
// Lint note: the tool reports rst_n as used both asynchronously and
// synchronously; the synchronous use is only the `disable iff` of the
// simulation assertions, the flops themselves all reset asynchronously.
module mp3_soc_top
  import mp3soc_pkg::*;
#(
  parameter int unsigned MESH_X       = 3,
  parameter int unsigned MESH_Y       = 3,
  parameter int unsigned BUF_DEPTH    = 8,
  parameter int unsigned N_BUS_PORTS  = 9,
  parameter int unsigned BUS_TIMEOUT  = 64,
  parameter int unsigned CLKS_PER_BIT = 760,
  parameter int unsigned RAM_BYTES    = 70000,
  parameter int unsigned SAMPLES_PER_GRANULE = 576
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- NoC PE attachment points -------------------------------------
  input  logic              noc_pe_talks     [MESH_X][MESH_Y],
  input  logic [DATA_W-1:0] noc_pe_output    [MESH_X][MESH_Y],
  input  loc_t              noc_pe_dest      [MESH_X][MESH_Y],
  output logic              noc_pe_avail     [MESH_X][MESH_Y],
  output logic              noc_alert_pe     [MESH_X][MESH_Y],
  output logic [DATA_W-1:0] noc_input_to_pe  [MESH_X][MESH_Y],
  output loc_t              noc_origin_to_pe [MESH_X][MESH_Y],
  input  logic              noc_pe_read      [MESH_X][MESH_Y],
  // ---- bus PE attachment points -------------------------------------
  input  logic              bus_tx_valid   [N_BUS_PORTS],
  input  logic [DATA_W-1:0] bus_tx_data    [N_BUS_PORTS],
  input  logic [3:0]        bus_tx_dest    [N_BUS_PORTS],
  output logic              bus_tx_done    [N_BUS_PORTS],
  output logic              bus_tx_timeout [N_BUS_PORTS],
  output logic              bus_rx_valid   [N_BUS_PORTS],
  output logic [DATA_W-1:0] bus_rx_data    [N_BUS_PORTS],
  output logic [3:0]        bus_rx_src     [N_BUS_PORTS],
  input  logic              bus_rx_read    [N_BUS_PORTS],
  output logic              bus_job_req,
  output logic [$clog2(N_BUS_PORTS)-1:0] bus_grant_access,
  // ---- host serial link ---------------------------------------------
  input  logic              uart_rxd,
  output logic              uart_txd,
  output logic              start_decode,
  output logic              uart_frame_err,
  // ---- bitstream RAM read port (Manager) ----------------------------
  input  logic              sb_rd_en,
  output logic [7:0]        sb_rd_data,
  output logic              sb_rd_valid,
  output logic [$clog2(RAM_BYTES+1)-1:0] sb_count,
  // ---- Sync PE: bitstream bytes in, frame header out ----------------
  input  logic              sh_in_valid,
  input  logic [7:0]        sh_in_byte,
  output logic              sh_header_valid,
  output mp3_header_t       sh_header,
  output logic              sh_stereo,
  output logic [15:0]       sh_sync_count,
  // ---- Dequantization PE: global gain -------------------------------
  input  logic [7:0]        dq_global_gain,
  output logic [31:0]       dq_gain_float,
  // ---- Hybrid: frequency inversion of IMDCT output -------------------
  input  logic              hy_in_valid,
  input  logic              hy_in_first,
  input  logic [31:0]       hy_in_data,
  output logic              hy_out_valid,
  output logic [31:0]       hy_out_data,
  // ---- Synthesis PE: PCM out -----------------------------------------
  input  logic              pcm_wr_en,
  input  logic [19:0]       pcm_wr_data,
  output logic              pcm_wr_ready,
  output logic              pcm_underrun,
  output logic [15:0]       pcm_banks_played,
  // ---- AC-link -------------------------------------------------------
  input  logic              ac97_bit_clk,
  output logic              ac97_sync,
  output logic              ac97_sdata_out,
  output logic              ac97_reset_n,
  input  logic              codec_cmd_valid,
  input  logic              codec_cmd_read,
  input  logic [6:0]        codec_cmd_addr,
  input  logic [15:0]       codec_cmd_data,
  output logic              codec_cmd_taken,
  output logic [15:0]       ac97_frame_count
);
  // ================= NoC =================
  noc_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .BUF_DEPTH(BUF_DEPTH)) u_noc (
    .clk, .rst_n,
    .pe_talks(noc_pe_talks), .pe_output(noc_pe_output), .pe_dest(noc_pe_dest),
    .pe_avail(noc_pe_avail), .alert_pe(noc_alert_pe), .input_to_pe(noc_input_to_pe),
    .origin_to_pe(noc_origin_to_pe), .pe_read(noc_pe_read)
  );

  // ================= shared bus =================
  logic [N_BUS_PORTS-1:0] bp_req, bp_ack, bp_grant;
  bus_word_t              bp_word [N_BUS_PORTS];
  bus_word_t              bus;

  shared_bus #(.N_PORTS(N_BUS_PORTS)) u_bus (
    .clk, .rst_n, .port_req(bp_req), .port_word(bp_word), .port_ack(bp_ack),
    .grant(bp_grant), .grant_access(bus_grant_access), .job_req(bus_job_req), .bus(bus)
  );

  for (genvar i = 0; i < N_BUS_PORTS; i++) begin : g_bus_port
    bus_port #(.MY_ID(i), .TIMEOUT(BUS_TIMEOUT)) u_port (
      .clk, .rst_n,
      .tx_valid(bus_tx_valid[i]), .tx_data(bus_tx_data[i]), .tx_dest(bus_tx_dest[i]),
      .tx_done(bus_tx_done[i]), .tx_timeout(bus_tx_timeout[i]),
      .rx_valid(bus_rx_valid[i]), .rx_data(bus_rx_data[i]), .rx_src(bus_rx_src[i]),
      .rx_read(bus_rx_read[i]),
      .port_req(bp_req[i]), .port_word(bp_word[i]), .port_ack(bp_ack[i]),
      .grant(bp_grant[i]), .bus(bus)
    );
  end

  // ================= host link and bitstream RAM =================
  localparam int unsigned CW = $clog2(RAM_BYTES + 1);
  logic       rx_valid, tx_start, tx_busy, mem_wr;
  logic [7:0] rx_byte, tx_byte, mem_data;
  logic [CW-1:0] sb_free;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_urx (
    .clk, .rst_n, .rxd(uart_rxd), .valid(rx_valid), .data(rx_byte), .frame_err(uart_frame_err)
  );
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_utx (
    .clk, .rst_n, .start(tx_start), .data(tx_byte), .busy(tx_busy), .txd(uart_txd)
  );
  comm_wrapper #(.FREE_W(CW)) u_wrap (
    .clk, .rst_n, .rx_valid, .rx_byte, .tx_start, .tx_byte, .tx_busy,
    .mem_wr, .mem_data, .mem_free(sb_free), .start_decode
  );
  mp3_stream_buffer #(.DEPTH(RAM_BYTES)) u_sbuf (
    .clk, .rst_n, .wr_en(mem_wr), .wr_data(mem_data),
    .rd_en(sb_rd_en), .rd_data(sb_rd_data), .rd_valid(sb_rd_valid),
    .count(sb_count), .free(sb_free)
  );

  // ================= Sync header and global gain =================
  sync_header u_sync (
    .clk, .rst_n, .in_valid(sh_in_valid), .in_byte(sh_in_byte),
    .header_valid(sh_header_valid), .header(sh_header), .stereo(sh_stereo),
    .sync_count(sh_sync_count)
  );

  gain_lut u_gain (.global_gain(dq_global_gain), .gain_float(dq_gain_float));

  freq_inversion #(.SUBBANDS(32), .SAMPLES(SAMPLES_PER_GRANULE / 32)) u_finv (
    .clk, .rst_n, .in_valid(hy_in_valid), .in_first(hy_in_first), .in_data(hy_in_data),
    .out_valid(hy_out_valid), .out_data(hy_out_data)
  );

  // ================= PCM buffer and AC-link =================
  logic        pcm_rd_req, pcm_rd_avail, pcm_rd_valid;
  logic [19:0] pcm_left, pcm_right;

  pcm_bank_buffer #(.SAMPLES_PER_GRANULE(SAMPLES_PER_GRANULE), .PCM_W(20)) u_pcm (
    .clk, .rst_n, .wr_en(pcm_wr_en), .wr_data(pcm_wr_data), .wr_ready(pcm_wr_ready),
    .rd_req(pcm_rd_req), .rd_avail(pcm_rd_avail), .rd_valid(pcm_rd_valid),
    .rd_left(pcm_left), .rd_right(pcm_right), .underrun(pcm_underrun),
    .banks_played(pcm_banks_played)
  );

  ac97_link #(.PCM_W(20)) u_ac97 (
    .clk, .rst_n, .bit_clk(ac97_bit_clk), .sync(ac97_sync), .sdata_out(ac97_sdata_out),
    .ac97_reset_n(ac97_reset_n),
    .cmd_valid(codec_cmd_valid), .cmd_read(codec_cmd_read), .cmd_addr(codec_cmd_addr),
    .cmd_data(codec_cmd_data), .cmd_taken(codec_cmd_taken),
    .pcm_avail(pcm_rd_avail), .pcm_req(pcm_rd_req), .pcm_valid(pcm_rd_valid),
    .pcm_left(pcm_left), .pcm_right(pcm_right), .frame_count(ac97_frame_count)
  );
endmodule
