// noc_ni: network interface ("wrapper") between a PE and its router.
//
// Sending: when the PE sees `pe_avail` high it puts 16 data bits on
// `pe_output`, the destination location on `pe_dest`, and pulses `pe_talks`.
// The NI wraps them with its own location as origin into a body flit and
// stores the flit in an 8-entry transmit buffer. Whenever that buffer holds
// a flit and the router's PE input buffer is available, the NI puts the flit
// on `data_to_noc` and pulses `tell_noc` (combinational from the buffer head).
//
// Receiving: the router pulses `tell_pe` with a flit while `ni_avail` is
// high. The NI strips the routing fields, keeps data and origin in an
// 8-entry receive buffer, and raises `alert_pe` with `input_to_pe` and
// `origin_to_pe` while it holds an element; the PE pulses `pe_read` to take it.
// The wrap/unwrap and flag names follow the document; the buffer depths and
// the pe_read strobe are this design's choice.
//
// Lint note: the tool reports rst_n as used both asynchronously and
// synchronously; the synchronous use is only the `disable iff` of the
// simulation assertions, the flops themselves all reset asynchronously.
// The two flit-type bits of received flits are not used: only body flits
// exist, so the type carries no information for the PE.
// The type and origin fields of outgoing flits are constants of the tile,
// so synthesis finds those bits of data_to_noc constant; this is intended.
// The buffers' population outputs are not needed and left unconnected.
module noc_ni
  import mp3soc_pkg::*;
#(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // PE -> network
  input  logic              pe_talks,
  input  logic [DATA_W-1:0] pe_output,
  input  loc_t              pe_dest,
  output logic              pe_avail,
  // network -> PE
  output logic              alert_pe,
  output logic [DATA_W-1:0] input_to_pe,
  output loc_t              origin_to_pe,
  input  logic              pe_read,
  // NI -> router PE input
  output logic              tell_noc,
  output flit_t             data_to_noc,
  input  logic              noc_avail,
  // router PE output -> NI
  input  logic              tell_pe,
  input  flit_t             data_to_pe,
  output logic              ni_avail
);
  localparam loc_t HERE = '{x: COORD_W'(X), y: COORD_W'(Y)};
  localparam int unsigned RX_W = DATA_W + LOC_W;

  flit_t wrapped;
  logic  tx_has;

  always_comb begin
    wrapped.data   = pe_output;
    wrapped.origin = HERE;
    wrapped.dest   = pe_dest;
    wrapped.ftype  = FLIT_BODY;
  end

  noc_input_buffer #(.DEPTH(BUF_DEPTH), .WIDTH(FLIT_W)) u_tx (
    .clk, .rst_n,
    .push(pe_talks), .din(wrapped), .avail(pe_avail),
    .pop(tell_noc), .dout(data_to_noc), .has_data(tx_has), .population()
  );
  assign tell_noc = tx_has && noc_avail;

  logic [RX_W-1:0] rx_din, rx_dout;
  logic            rx_has;
  assign rx_din = {data_to_pe.origin, data_to_pe.data};

  noc_input_buffer #(.DEPTH(BUF_DEPTH), .WIDTH(RX_W)) u_rx (
    .clk, .rst_n,
    .push(tell_pe), .din(rx_din), .avail(ni_avail),
    .pop(pe_read), .dout(rx_dout), .has_data(rx_has), .population()
  );
  assign alert_pe     = rx_has;
  assign input_to_pe  = rx_dout[DATA_W-1:0];
  assign origin_to_pe = rx_dout[RX_W-1:DATA_W];

  a_for_me: assert property (@(posedge clk) disable iff (!rst_n)
                             tell_pe |-> data_to_pe.dest == HERE);
endmodule
