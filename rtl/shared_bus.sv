// shared_bus: 26-bit shared system bus for N_PORTS processing elements.
//
// The bus word is 16 data bits, 8 address bits ({source port, destination
// port}) and 2 control bits (BUS_Control[0] request from the master,
// BUS_Control[1] acknowledge from the addressed slave). Each port raises its
// request flag to ask for the bus. While the bus is idle (job_req low) a
// round-robin arbiter picks one requesting port and grants it
// (grant[i], grant_access = i); the bus then stays with that port for as
// long as it keeps its request flag high, so a master can send a string of
// words without asking again. When the flag drops, the bus is released one
// cycle later and the arbiter moves on.
//
// On the FPGA each port reaches the bus through a 26-bit tri-state buffer
// enabled by its grant. Here the same selection is an AND-OR multiplexer
// (grant-enabled drivers ORed together), which is what FPGA tools turn
// internal tri-states into; with no owner the bus reads as zero. The
// acknowledge line is the OR of the slaves' ack outputs.
// From the document: widths, round-robin arbitration, the request/grant
// flags, the 4-phase handshake on BUS_Control and holding the bus while the
// request flag stays high. This design's choice: active-high grant and the
// one-cycle gap between owners.
//
// Lint note: the tool reports rst_n as used both asynchronously and
// synchronously; the synchronous use is only the `disable iff` of the
// simulation assertions, the flops themselves all reset asynchronously.
// The arbiter's one-hot grant is not needed (the owner index is used) and
// is left unconnected.
module shared_bus
  import mp3soc_pkg::*;
#(
  parameter int unsigned N_PORTS = 9
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_PORTS-1:0]         port_req,   // PORTn_Req flags
  input  bus_word_t                  port_word [N_PORTS],  // what each port would drive
  input  logic [N_PORTS-1:0]         port_ack,   // slave acknowledge outputs
  output logic [N_PORTS-1:0]         grant,      // Grant_PORT_Master[n]
  output logic [$clog2(N_PORTS)-1:0] grant_access,
  output logic                       job_req,    // bus in use
  output bus_word_t                  bus
);
  localparam int unsigned IW = $clog2(N_PORTS);

  logic [IW-1:0]      arb_idx;
  logic               arb_any;
  logic [IW-1:0]      owner;

  rr_arbiter #(.N(N_PORTS)) u_arb (
    .clk, .rst_n, .req(port_req), .advance(!job_req),
    .grant(), .grant_idx(arb_idx), .any_grant(arb_any)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      job_req <= 1'b0;
      owner   <= '0;
    end else if (!job_req) begin
      if (arb_any) begin
        job_req <= 1'b1;
        owner   <= arb_idx;
      end
    end else if (!port_req[owner]) begin
      job_req <= 1'b0;
    end
  end

  assign grant_access = owner;

  always_comb begin
    grant = '0;
    if (job_req) grant[owner] = 1'b1;
  end

  // grant-enabled drivers (the tri-state switches)
  always_comb begin
    bus = '0;
    for (int i = 0; i < N_PORTS; i++) begin
      if (grant[i]) begin
        bus.data = bus.data | port_word[i].data;
        bus.addr = bus.addr | port_word[i].addr;
        bus.req  = bus.req  | port_word[i].req;
      end
    end
    bus.ack = |port_ack;
  end

  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
