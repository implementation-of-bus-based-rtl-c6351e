// noc_input_buffer: router/NI input buffer, a circular FIFO.
//
// Two pointers mark where the next incoming element is written and which
// element leaves next, so nothing is shifted inside the buffer and the array
// maps onto FPGA RAM. `avail` is high while the population is below DEPTH:
// a writer must see it high before pushing. `has_data` is high when the
// population is one or more and flags the router's arbiter.
//
// Interface: push/din store one element per cycle; pop removes the head,
// which is always visible on dout (first-word-fall-through). Push and pop
// may happen in the same cycle. Pushing while full or popping while empty is
// ignored (and flagged by an assertion).
// DEPTH 8 and the 26-bit width follow the document; the rest is this
// design's choice.
//
// Lint note: the tool reports rst_n as used both asynchronously and
// synchronously; the synchronous use is only the `disable iff` of the
// simulation assertions, the flops themselves all reset asynchronously.
module noc_input_buffer #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 26
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic             avail,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             has_data,
  output logic [$clog2(DEPTH+1)-1:0] population
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_idx, rd_idx;
  logic             do_push, do_pop;

  assign avail    = population < ($bits(population))'(DEPTH);
  assign has_data = population != '0;
  assign do_push  = push && avail;
  assign do_pop   = pop && has_data;
  assign dout     = mem[rd_idx];

  function automatic logic [AW-1:0] next_idx(logic [AW-1:0] i);
    return (i == AW'(DEPTH - 1)) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_idx     <= '0;
      rd_idx     <= '0;
      population <= '0;
    end else begin
      if (do_push) wr_idx <= next_idx(wr_idx);
      if (do_pop)  rd_idx <= next_idx(rd_idx);
      case ({do_push, do_pop})
        2'b10:   population <= population + 1'b1;
        2'b01:   population <= population - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_idx] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> avail);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> has_data);
endmodule
