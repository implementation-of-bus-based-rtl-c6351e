// bus_port: the bus side of one processing element.
//
// Master part. The PE offers a word with tx_valid, tx_data and tx_dest and
// keeps them steady until tx_done pulses. The port raises its request flag,
// waits for its grant, then drives data and address {MY_ID, tx_dest} and
// runs a 4-phase handshake on BUS_Control: (1) raise request,
// (2) slave raises acknowledge, (3) drop request, (4) slave drops
// acknowledge. tx_done pulses at step 2. If the PE offers another word
// before step 4 ends, the port keeps the bus and repeats the handshake
// without asking the arbiter again; otherwise it drops its request flag and
// the bus is released. If no acknowledge arrives within TIMEOUT cycles (the
// slave is busy) the port gives the bus up, waits TIMEOUT cycles and asks
// again, so a busy slave cannot lock the bus.
//
// Slave part. When the bus carries a request addressed to MY_ID and the
// one-word receive register is free, the port stores data and source and
// acknowledges, holding the acknowledge until the master drops its request.
// rx_valid/rx_data/rx_src show the stored word until the PE pulses rx_read.
// The handshake order and the time-out idea follow the document; the
// TIMEOUT value and the receive register depth are this design's choice.
//
// Lint note: the tool reports rst_n as used both asynchronously and
// synchronously; the synchronous use is only the `disable iff` of the
// simulation assertions, the flops themselves all reset asynchronously.
// port_word passes tx_data and tx_dest straight through, and its source
// field (MY_ID) and acknowledge bit are constants, so synthesis sees those
// outputs as plain wires or constants; this is intended.
module bus_port
  import mp3soc_pkg::*;
#(
  parameter int unsigned MY_ID   = 0,
  parameter int unsigned TIMEOUT = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // PE transmit side
  input  logic              tx_valid,
  input  logic [DATA_W-1:0] tx_data,
  input  logic [3:0]        tx_dest,
  output logic              tx_done,
  output logic              tx_timeout,   // pulses when the bus is given up
  // PE receive side
  output logic              rx_valid,
  output logic [DATA_W-1:0] rx_data,
  output logic [3:0]        rx_src,
  input  logic              rx_read,
  // bus side
  output logic              port_req,
  output bus_word_t         port_word,
  output logic              port_ack,
  input  logic              grant,
  input  bus_word_t         bus
);
  typedef enum logic [2:0] {M_IDLE, M_WAIT_GRANT, M_WAIT_ACK, M_WAIT_ACK_LOW, M_BACKOFF} mstate_e;
  mstate_e mstate;
  logic [$clog2(TIMEOUT+1)-1:0] tcnt;
  logic ctl_req;

  assign port_word.data = tx_data;
  assign port_word.addr = {4'(MY_ID), tx_dest};
  assign port_word.req  = ctl_req;
  assign port_word.ack  = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mstate     <= M_IDLE;
      port_req   <= 1'b0;
      ctl_req    <= 1'b0;
      tcnt       <= '0;
      tx_done    <= 1'b0;
      tx_timeout <= 1'b0;
    end else begin
      tx_done    <= 1'b0;
      tx_timeout <= 1'b0;
      case (mstate)
        M_IDLE: if (tx_valid) begin
          port_req <= 1'b1;
          mstate   <= M_WAIT_GRANT;
        end
        M_WAIT_GRANT: if (grant) begin
          ctl_req <= 1'b1;             // step 1, data already on the bus
          tcnt    <= '0;
          mstate  <= M_WAIT_ACK;
        end
        M_WAIT_ACK: begin
          if (bus.ack) begin           // step 2 seen
            ctl_req <= 1'b0;           // step 3
            tx_done <= 1'b1;
            mstate  <= M_WAIT_ACK_LOW;
          end else if (tcnt == ($bits(tcnt))'(TIMEOUT)) begin
            ctl_req    <= 1'b0;
            port_req   <= 1'b0;        // release the bus
            tx_timeout <= 1'b1;
            tcnt       <= '0;
            mstate     <= M_BACKOFF;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        M_WAIT_ACK_LOW: if (!bus.ack) begin   // step 4 seen
          if (tx_valid) begin
            ctl_req <= 1'b1;           // next word of the string
            tcnt    <= '0;
            mstate  <= M_WAIT_ACK;
          end else begin
            port_req <= 1'b0;
            mstate   <= M_IDLE;
          end
        end
        M_BACKOFF: begin
          if (tcnt == ($bits(tcnt))'(TIMEOUT)) mstate <= M_IDLE;
          else tcnt <= tcnt + 1'b1;
        end
        default: mstate <= M_IDLE;
      endcase
    end
  end

  // slave part
  logic addressed;
  assign addressed = bus.req && (bus.addr[3:0] == 4'(MY_ID));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_ack <= 1'b0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
      rx_src   <= '0;
    end else begin
      if (rx_read) rx_valid <= 1'b0;
      if (!port_ack) begin
        if (addressed && (!rx_valid || rx_read)) begin
          port_ack <= 1'b1;
          rx_valid <= 1'b1;
          rx_data  <= bus.data;
          rx_src   <= bus.addr[7:4];
        end
      end else if (!bus.req) begin
        port_ack <= 1'b0;
      end
    end
  end

  a_req_needs_grant: assert property (@(posedge clk) disable iff (!rst_n)
                                      ctl_req && mstate == M_WAIT_ACK |-> grant);
endmodule
