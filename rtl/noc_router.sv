// noc_router: five-port mesh router (PE, N, E, W, S).
//
// Each input port has an 8-entry circular input buffer. A single round-robin
// arbiter picks, each cycle, one buffer that holds data and whose one-element
// holding register in the switch box is free (or is being emptied this
// cycle); the head element moves into that holding register. The
// destination field of the held flit is decoded with XY routing (x first,
// then y). The held flit leaves as soon as the neighbour on its output port
// shows its availability flag; if it is not available the switch box tries
// again next clock. While one holding register waits for a busy output, the
// other inputs keep using the switch box. When several holding registers
// want the same output in one cycle, a round-robin arbiter per output picks
// one.
//
// Link interface, per port: tell (one-cycle strobe) with the flit, and an
// availability flag from the receiver that must be high before a flit is
// sent. Outgoing tell/flit are driven combinationally from the holding
// registers, and availability flags come straight from registers, so chained
// routers form no combinational loop. Minimum latency: one cycle in the
// input buffer, one in the holding register.
// From the document: five ports, 8-deep circular buffers, one arbiter with
// round-robin order, per-input holding registers, XY routing. This design's
// choice: the strobe/availability link protocol, the per-output arbiters and
// the N direction pointing to larger y.
//
// Lint note: the tool reports rst_n as used both asynchronously and
// synchronously; the synchronous use is only the `disable iff` of the
// simulation assertions, the flops themselves all reset asynchronously.
// Outputs of sub-blocks that are not needed here (buffer population,
// arbiter index) are left unconnected on purpose.
module noc_router
  import mp3soc_pkg::*;
#(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // input side of each port
  input  logic  in_tell  [NPORTS],
  input  flit_t in_flit  [NPORTS],
  output logic  in_avail [NPORTS],
  // output side of each port
  output logic  out_tell  [NPORTS],
  output flit_t out_flit  [NPORTS],
  input  logic  out_avail [NPORTS]
);
  localparam loc_t HERE = '{x: COORD_W'(X), y: COORD_W'(Y)};

  flit_t       buf_dout [NPORTS];
  logic [NPORTS-1:0] buf_has, buf_pop;

  for (genvar p = 0; p < NPORTS; p++) begin : g_buf
    noc_input_buffer #(.DEPTH(BUF_DEPTH), .WIDTH(FLIT_W)) u_buf (
      .clk, .rst_n,
      .push(in_tell[p]), .din(in_flit[p]), .avail(in_avail[p]),
      .pop(buf_pop[p]), .dout(buf_dout[p]), .has_data(buf_has[p]),
      .population()
    );
  end

  // switch box holding registers
  logic [NPORTS-1:0] hold_valid;
  flit_t             hold_flit [NPORTS];
  logic [2:0]        hold_dir  [NPORTS];
  logic [NPORTS-1:0] hold_sent;

  // output arbitration: one arbiter per output port
  logic [NPORTS-1:0] oreq  [NPORTS];
  logic [NPORTS-1:0] ogrant[NPORTS];
  logic [2:0]        ogidx [NPORTS];
  logic [NPORTS-1:0] oany;

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int p = 0; p < NPORTS; p++)
        oreq[o][p] = hold_valid[p] && (hold_dir[p] == 3'(o)) && out_avail[o];
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_oarb
    rr_arbiter #(.N(NPORTS)) u_oarb (
      .clk, .rst_n, .req(oreq[o]), .advance(1'b1),
      .grant(ogrant[o]), .grant_idx(ogidx[o]), .any_grant(oany[o])
    );
    assign out_tell[o] = oany[o];
    assign out_flit[o] = hold_flit[ogidx[o]];
  end

  always_comb begin
    hold_sent = '0;
    for (int o = 0; o < NPORTS; o++) hold_sent |= ogrant[o];
  end

  // retrieval arbiter: which input buffer may load its holding register
  logic [NPORTS-1:0] rreq, rgrant;
  assign rreq = buf_has & (~hold_valid | hold_sent);

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk, .rst_n, .req(rreq), .advance(1'b1),
    .grant(rgrant), .grant_idx(), .any_grant()
  );
  assign buf_pop = rgrant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_valid <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        hold_flit[p] <= '0;
        hold_dir[p]  <= '0;
      end
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        if (rgrant[p]) begin
          hold_valid[p] <= 1'b1;
          hold_flit[p]  <= buf_dout[p];
          hold_dir[p]   <= xy_route(HERE, buf_dout[p].dest);
        end else if (hold_sent[p]) begin
          hold_valid[p] <= 1'b0;
        end
      end
    end
  end

  // a flit never goes back out of the port it came in on (XY routing)
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    a_no_uturn: assert property (@(posedge clk) disable iff (!rst_n)
                                 hold_valid[p] && p != P_PE |-> hold_dir[p] != 3'(p));
  end
endmodule
