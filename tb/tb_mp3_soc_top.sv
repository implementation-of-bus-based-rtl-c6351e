// tb_mp3_soc_top: end-to-end run of the platform at its default parameters
// (3x3 NoC, 9-port bus, 760 clocks per serial bit, 70,000-byte RAM,
// 576-sample granules). The nine PEs are stood in for by small models that
// only move data the way the decoder does:
//  * Host: sends a 40-byte MP3 block (two frame headers inside) over the
//    serial line, asks for the free-slot count and checks the reply, then
//    sends the start command.
//  * Manager (tile (1,0), bus port 0): after start, reads the bitstream RAM
//    and forwards every byte to Sync over the NoC and over the bus.
//  * Sync (tile (1,1), bus port 1): feeds the NoC bytes to the sync/header
//    unit (two headers must be found, fields checked) and stops reading the
//    bus for a while, so the Manager's bus port times out and retries.
//  * Huffman (bus port 3) sends words to Dequantization (bus port 4) at the
//    same time, so the arbiter has two masters to choose from.
//  * Hybrid (tile (2,1)) streams three granules (3 x 1152 samples) to
//    Synthesis (tile (2,0)), which writes them to the PCM buffer; the
//    third granule finds both banks full, Synthesis stalls and the NoC pushes back on Hybrid.
//  * Codec: drives BIT_CLK, rebuilds AC-link frames and checks that the
//    PCM pairs come out in order (left = first half of each granule, right
//    = second half) and that one codec register write goes out.
//  * Hybrid: one granule of IMDCT output through the frequency-inversion
//    unit; every value and the 144 sign flips are checked.
// Each mechanism is counted and must happen at least once: NoC
// back-pressure, bus time-out, bus burst, bus arbitration between two
// masters, PCM writer stall, PCM bank switch, end-of-stream underrun,
// header detection, free-slot reply, start command, codec command,
// frequency-inversion sign flip.
module tb_mp3_soc_top;
  import mp3soc_pkg::*;
  localparam int CPB = 760, NGRAN = 3, NS = 576;
  logic clk = 0, rst_n = 0;
  logic              noc_pe_talks [3][3], noc_pe_avail [3][3], noc_alert_pe [3][3], noc_pe_read [3][3];
  logic [DATA_W-1:0] noc_pe_output [3][3], noc_input_to_pe [3][3];
  loc_t              noc_pe_dest [3][3], noc_origin_to_pe [3][3];
  logic              bus_tx_valid [9], bus_tx_done [9], bus_tx_timeout [9], bus_rx_valid [9], bus_rx_read [9];
  logic [DATA_W-1:0] bus_tx_data [9], bus_rx_data [9];
  logic [3:0]        bus_tx_dest [9], bus_rx_src [9];
  logic              bus_job_req;
  logic [3:0]        bus_grant_access;
  logic uart_rxd, uart_txd, start_decode, uart_frame_err;
  logic sb_rd_en, sb_rd_valid;
  logic [7:0] sb_rd_data;
  logic [16:0] sb_count;
  logic sh_in_valid, sh_header_valid, sh_stereo;
  logic [7:0] sh_in_byte;
  mp3_header_t sh_header;
  logic [15:0] sh_sync_count;
  logic [7:0] dq_global_gain;
  logic [31:0] dq_gain_float;
  logic hy_in_valid = 0, hy_in_first = 0, hy_out_valid;
  logic [31:0] hy_in_data = 0, hy_out_data;
  logic pcm_wr_en, pcm_wr_ready, pcm_underrun;
  logic [19:0] pcm_wr_data;
  logic [15:0] pcm_banks_played, ac97_frame_count;
  logic ac97_bit_clk = 0, ac97_sync, ac97_sdata_out, ac97_reset_n;
  logic codec_cmd_valid, codec_cmd_read, codec_cmd_taken;
  logic [6:0] codec_cmd_addr;
  logic [15:0] codec_cmd_data;

  mp3_soc_top dut (.*);

  // Hybrid model: one granule (32 sub-bands x 18) of IMDCT output through
  // the frequency-inversion unit; odd samples of odd sub-bands flip sign.
  logic [31:0] finv_exp[$];
  int m_inverted = 0, finv_out = 0;
  initial begin : hybrid_finv
    wait (rst_n);
    for (int i = 0; i < 576; i++) begin
      logic [31:0] v;
      v = $urandom;
      @(negedge clk);
      hy_in_valid = 1; hy_in_first = (i == 0); hy_in_data = v;
      if (((i / 18) % 2 == 1) && ((i % 18) % 2 == 1)) begin
        finv_exp.push_back({~v[31], v[30:0]});
        m_inverted++;
      end else finv_exp.push_back(v);
    end
    @(negedge clk);
    hy_in_valid = 0; hy_in_first = 0;
  end

  always #5 clk = ~clk;               // 100 MHz in simulation time
  always #40 ac97_bit_clk = ~ac97_bit_clk;

  int checks = 0, failures = 0;
  always @(posedge clk) if (rst_n && hy_out_valid) begin
    finv_out++;
    if (finv_exp.size() == 0) check(0, "unexpected frequency-inversion output");
    else check(hy_out_data == finv_exp.pop_front(), "frequency inversion value");
  end
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // mechanism counters
  int m_noc_bp = 0, m_bus_timeout = 0, m_bus_burst = 0, m_bus_arb = 0, m_pcm_stall = 0,
      m_bank_switch = 0, m_underrun = 0, m_headers = 0, m_free_reply = 0, m_start = 0, m_codec_cmd = 0;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host ----------------
  task automatic host_byte(logic [7:0] b);
    uart_rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(posedge clk); end
    uart_rxd = 1; repeat (CPB) @(posedge clk);
  endtask

  logic [7:0] host_rx[$];
  initial begin : host_receiver
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin b[i] = uart_txd; repeat (CPB) @(posedge clk); end
      host_rx.push_back(b);
    end
  end

  logic [7:0] stream[$];
  logic [31:0] hdr0 = 32'hFFFB9064, hdr1 = 32'hFFFB92C4;
  initial begin : host
    uart_rxd = 1;
    // 40-byte block: filler, header 0, filler, header 1, filler
    for (int i = 0; i < 5; i++) stream.push_back(8'(i + 1));
    for (int i = 3; i >= 0; i--) stream.push_back(hdr0[8*i +: 8]);
    for (int i = 0; i < 15; i++) stream.push_back(8'(8'h20 + i));
    for (int i = 3; i >= 0; i--) stream.push_back(hdr1[8*i +: 8]);
    while (stream.size() < 40) stream.push_back(8'h11);
    wait (rst_n);
    repeat (100) @(posedge clk);
    host_byte(0); host_byte(0); host_byte(40); host_byte(MSG_MP3_DATA);
    foreach (stream[i]) host_byte(stream[i]);
    host_byte(0); host_byte(0); host_byte(0); host_byte(MSG_FREE_REQ);
    wait (host_rx.size() == 7);
    check(host_rx[0] == 0 && host_rx[1] == 0 && host_rx[2] == 3 && host_rx[3] == MSG_FREE_RESP, "free reply header");
    check({host_rx[4], host_rx[5], host_rx[6]} == 24'(70000 - 40), "free slots 69,960");
    m_free_reply++;
    host_byte(0); host_byte(0); host_byte(0); host_byte(MSG_START);
  end
  always @(posedge clk) if (rst_n && start_decode) m_start++;

  // ---------------- Manager: RAM -> Sync over NoC and bus ----------------
  logic [7:0] mgr_bytes[$];
  logic [19:0] btxq [9][$];           // {dest, data} per bus port
  initial begin : manager
    noc_pe_talks[1][0] = 0;
    sb_rd_en = 0;
    wait (m_start > 0);
    while (sb_count != 0) begin
      @(negedge clk); sb_rd_en = 1;
      @(negedge clk); sb_rd_en = 0;
      check(sb_rd_valid, "RAM read valid");
      mgr_bytes.push_back(sb_rd_data);
      while (!noc_pe_avail[1][0]) @(negedge clk);
      noc_pe_talks[1][0] = 1; noc_pe_output[1][0] = {8'h00, sb_rd_data}; noc_pe_dest[1][0] = '{x:1, y:1};
      @(negedge clk); noc_pe_talks[1][0] = 0;
      btxq[0].push_back({4'd1, 8'h00, sb_rd_data});
    end
  end

  // bus PE transmit models
  always_comb for (int i = 0; i < 9; i++) begin
    bus_tx_valid[i] = btxq[i].size() > 0;
    {bus_tx_dest[i], bus_tx_data[i]} = bus_tx_valid[i] ? btxq[i][0] : 20'd0;
  end
  int words_this_grant = 0, last_owner = -1;
  always @(posedge clk) if (rst_n) begin
    int nreq;
    nreq = 0;
    for (int i = 0; i < 9; i++) begin
      if (bus_tx_done[i]) void'(btxq[i].pop_front());
      if (bus_tx_timeout[i]) m_bus_timeout++;
      if (bus_tx_valid[i] && !(bus_job_req && int'(bus_grant_access) == i)) nreq++;
    end
    if (bus_job_req && nreq > 0) m_bus_arb++;
    if (bus_job_req && int'(bus_grant_access) == last_owner) begin
      if (bus_tx_done[last_owner]) begin words_this_grant++; if (words_this_grant == 2) m_bus_burst++; end
    end else begin
      last_owner = bus_job_req ? int'(bus_grant_access) : -1;
      words_this_grant = 0;
    end
  end

  // ---------------- Sync: NoC bytes into the header unit, bus bytes logged ----------------
  logic [7:0] sync_noc_bytes[$], sync_bus_bytes[$];
  logic [15:0] deq_words[$];
  bit sync_bus_pause = 0;
  always @(negedge clk) begin
    for (int x = 0; x < 3; x++) for (int y = 0; y < 3; y++) if (!(x == 2 && y == 0)) noc_pe_read[x][y] = 0;
    sh_in_valid = 0;
    if (rst_n && noc_alert_pe[1][1]) begin
      noc_pe_read[1][1] = 1;
      check(noc_origin_to_pe[1][1] == '{x:1, y:0}, "Sync: origin is the Manager");
      sh_in_valid = 1; sh_in_byte = noc_input_to_pe[1][1][7:0];
      sync_noc_bytes.push_back(noc_input_to_pe[1][1][7:0]);
    end
    for (int i = 0; i < 9; i++) bus_rx_read[i] = 0;
    if (rst_n && bus_rx_valid[1] && !sync_bus_pause) begin
      bus_rx_read[1] = 1;
      check(bus_rx_src[1] == 4'd0, "Sync: bus source is the Manager");
      sync_bus_bytes.push_back(bus_rx_data[1][7:0]);
    end
    if (rst_n && bus_rx_valid[4]) begin
      bus_rx_read[4] = 1;
      check(bus_rx_src[4] == 4'd3, "Dequantization: bus source is Huffman");
      deq_words.push_back(bus_rx_data[4]);
    end
  end
  initial begin : sync_pause
    wait (mgr_bytes.size() == 10);
    sync_bus_pause = 1;
    repeat (600) @(posedge clk);
    sync_bus_pause = 0;
  end
  initial begin : huffman
    wait (mgr_bytes.size() == 5);
    for (int k = 0; k < 30; k++) btxq[3].push_back({4'd4, 16'hD000 + 16'(k)});
  end

  always @(posedge clk) if (rst_n && sh_header_valid) begin
    m_headers++;
    check(sh_header == (m_headers == 1 ? hdr0 : hdr1), "header fields");
    check(sh_header.layer == 2'b01 && sh_header.channel_mode == (m_headers == 1 ? 2'b01 : 2'b11), "layer/channel mode");
  end

  // ---------------- Hybrid -> Synthesis -> PCM buffer ----------------
  function automatic logic [15:0] sample(int k);
    return 16'(k * 37 + 5);
  endfunction
  initial begin : hybrid
    noc_pe_talks[2][1] = 0;
    for (int x = 0; x < 3; x++) for (int y = 0; y < 3; y++)
      if (!(x == 1 && y == 0) && !(x == 2 && y == 1)) begin noc_pe_talks[x][y] = 0; noc_pe_output[x][y] = '0; noc_pe_dest[x][y] = '0; end
    wait (rst_n);
    for (int k = 0; k < NGRAN * 2 * NS; k++) begin
      @(negedge clk);
      while (!noc_pe_avail[2][1]) begin m_noc_bp++; @(negedge clk); end
      noc_pe_talks[2][1] = 1; noc_pe_output[2][1] = sample(k); noc_pe_dest[2][1] = '{x:2, y:0};
      @(negedge clk); noc_pe_talks[2][1] = 0;
    end
  end
  int synth_rcvd = 0;
  always @(negedge clk) begin
    noc_pe_read[2][0] = 0; pcm_wr_en = 0;
    if (rst_n && noc_alert_pe[2][0] && pcm_wr_ready) begin
      noc_pe_read[2][0] = 1;
      check(noc_input_to_pe[2][0] == sample(synth_rcvd) && noc_origin_to_pe[2][0] == '{x:2, y:1}, "Synthesis input");
      pcm_wr_en = 1; pcm_wr_data = {noc_input_to_pe[2][0], 4'd0};
      synth_rcvd++;
    end
    if (rst_n && noc_alert_pe[2][0] && !pcm_wr_ready) m_pcm_stall++;
  end
  logic [15:0] prev_banks = 0;
  always @(posedge clk) if (rst_n) begin
    if (pcm_banks_played != prev_banks) m_bank_switch++;
    prev_banks <= pcm_banks_played;
    if (pcm_underrun) begin
      m_underrun++;
      check(pcm_banks_played == 16'(NGRAN), "underrun only after the last granule");
    end
  end

  // ---------------- codec model ----------------
  logic [39:0] pcm_exp[$];
  initial for (int g = 0; g < NGRAN; g++) for (int i = 0; i < NS; i++)
    pcm_exp.push_back({sample(g * 2 * NS + i), 4'd0, sample(g * 2 * NS + NS + i), 4'd0});
  logic [255:0] frame;
  int bitn = -1, pcm_frames = 0;
  logic prev_sync = 0;
  always @(negedge ac97_bit_clk) if (ac97_reset_n) begin
    if (ac97_sync && !prev_sync) bitn = 0;
    prev_sync = ac97_sync;
    if (bitn >= 0) begin
      frame[255 - bitn] = ac97_sdata_out;
      bitn++;
      if (bitn == 256) begin
        bitn = -1;
        check(frame[255], "frame valid");
        if (frame[254]) begin
          m_codec_cmd++;
          check(frame[239:200] == {1'b0, 7'h2C, 12'd0, 16'hAC44, 4'd0}, "codec register write");
        end
        if (frame[252]) begin
          pcm_frames++;
          if (pcm_exp.size() == 0) check(0, "extra PCM frame");
          else check(frame[199:160] == pcm_exp.pop_front(), "PCM pair order");
        end
      end
    end
  end
  always @(posedge clk) if (rst_n && codec_cmd_taken) codec_cmd_valid <= 0;

  initial begin : main
    codec_cmd_valid = 1; codec_cmd_read = 0; codec_cmd_addr = 7'h2C; codec_cmd_data = 16'hAC44;
    dq_global_gain = 8'd210;
    sh_in_byte = 0; pcm_wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1 check(dq_gain_float == 32'h3F800000, "global gain 210 -> 1.0");
    dq_global_gain = 8'd212;
    #1 check(dq_gain_float == 32'h3FB504F3, "global gain 212 -> sqrt(2)");
    wait (m_underrun > 0 && mgr_bytes.size() == 40 && sync_bus_bytes.size() == 40);
    repeat (4000) @(posedge clk);   // the last pair is still on its way to the codec
    check(pcm_frames == NGRAN * NS && pcm_exp.size() == 0, $sformatf("PCM frames %0d", pcm_frames));
    check(sync_noc_bytes == stream && sync_bus_bytes == stream && mgr_bytes == stream, "bitstream via RAM, NoC and bus");
    check(deq_words.size() == 30, "Huffman -> Dequantization words");
    check(sh_sync_count == 16'd2, "two frames found");
    check(!uart_frame_err, "no serial framing error");
    $display("mechanisms: noc_backpressure=%0d bus_timeout=%0d bus_burst=%0d bus_arbitration=%0d pcm_stall=%0d bank_switch=%0d underrun=%0d headers=%0d free_reply=%0d start=%0d codec_cmd=%0d inverted=%0d",
             m_noc_bp, m_bus_timeout, m_bus_burst, m_bus_arb, m_pcm_stall, m_bank_switch, m_underrun, m_headers, m_free_reply, m_start, m_codec_cmd, m_inverted);
    check(m_noc_bp > 0, "NoC back-pressure happened");
    check(m_bus_timeout > 0, "bus time-out happened");
    check(m_bus_burst > 0, "bus burst happened");
    check(m_bus_arb > 0, "bus arbitration between masters happened");
    check(m_pcm_stall > 0, "PCM writer stall happened");
    check(m_bank_switch >= NGRAN, "PCM bank switches");
    check(m_underrun > 0, "end-of-stream underrun flagged");
    check(m_headers == 2, "headers found");
    check(m_free_reply == 1 && m_start == 1, "host commands");
    check(m_codec_cmd == 1, "codec command sent once");
    check(finv_out == 576 && finv_exp.size() == 0, "frequency inversion: one granule out");
    check(m_inverted == 16 * 9, "frequency inversion: sign flips happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
