// noc_mesh: MESH_X x MESH_Y homogeneous mesh (3x3 in the decoder), one
// router and one network interface per tile.
//
// Tile (x,y) sits in column x (left to right) and row y (top to bottom). Its
// router's E port links to the W port of (x+1,y); its N port links to the S
// port of (x,y+1). Ports on the mesh border have no neighbour: their input
// is tied idle and their output shows "not available", so XY routing never
// uses them for a destination inside the mesh.
//
// PE-side signals are arrays indexed [x][y]; see noc_ni for their protocol.
// The topology, size and coordinate numbering follow the document.
//
// Lint note: the tool reports rst_n as used both asynchronously and
// synchronously; the synchronous use is only the `disable iff` of the
// simulation assertions, the flops themselves all reset asynchronously.
module noc_mesh
  import mp3soc_pkg::*;
#(
  parameter int unsigned MESH_X = 3,
  parameter int unsigned MESH_Y = 3,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pe_talks     [MESH_X][MESH_Y],
  input  logic [DATA_W-1:0] pe_output    [MESH_X][MESH_Y],
  input  loc_t              pe_dest      [MESH_X][MESH_Y],
  output logic              pe_avail     [MESH_X][MESH_Y],
  output logic              alert_pe     [MESH_X][MESH_Y],
  output logic [DATA_W-1:0] input_to_pe  [MESH_X][MESH_Y],
  output loc_t              origin_to_pe [MESH_X][MESH_Y],
  input  logic              pe_read      [MESH_X][MESH_Y]
);
  // per-router link signals
  logic  r_in_tell  [MESH_X][MESH_Y][NPORTS];
  flit_t r_in_flit  [MESH_X][MESH_Y][NPORTS];
  logic  r_in_avail [MESH_X][MESH_Y][NPORTS];
  logic  r_out_tell [MESH_X][MESH_Y][NPORTS];
  flit_t r_out_flit [MESH_X][MESH_Y][NPORTS];
  logic  r_out_avail[MESH_X][MESH_Y][NPORTS];

  for (genvar x = 0; x < MESH_X; x++) begin : g_x
    for (genvar y = 0; y < MESH_Y; y++) begin : g_y

      noc_router #(.X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH)) u_router (
        .clk, .rst_n,
        .in_tell  (r_in_tell[x][y]),  .in_flit (r_in_flit[x][y]),  .in_avail (r_in_avail[x][y]),
        .out_tell (r_out_tell[x][y]), .out_flit(r_out_flit[x][y]), .out_avail(r_out_avail[x][y])
      );

      noc_ni #(.X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH)) u_ni (
        .clk, .rst_n,
        .pe_talks(pe_talks[x][y]), .pe_output(pe_output[x][y]), .pe_dest(pe_dest[x][y]),
        .pe_avail(pe_avail[x][y]),
        .alert_pe(alert_pe[x][y]), .input_to_pe(input_to_pe[x][y]),
        .origin_to_pe(origin_to_pe[x][y]), .pe_read(pe_read[x][y]),
        .tell_noc(r_in_tell[x][y][P_PE]), .data_to_noc(r_in_flit[x][y][P_PE]),
        .noc_avail(r_in_avail[x][y][P_PE]),
        .tell_pe(r_out_tell[x][y][P_PE]), .data_to_pe(r_out_flit[x][y][P_PE]),
        .ni_avail(r_out_avail[x][y][P_PE])
      );

      // east/west links
      if (x + 1 < MESH_X) begin : g_e
        assign r_in_tell [x][y][P_E]  = r_out_tell[x+1][y][P_W];
        assign r_in_flit [x][y][P_E]  = r_out_flit[x+1][y][P_W];
        assign r_out_avail[x][y][P_E] = r_in_avail[x+1][y][P_W];
      end else begin : g_e_edge
        assign r_in_tell [x][y][P_E]  = 1'b0;
        assign r_in_flit [x][y][P_E]  = '0;
        assign r_out_avail[x][y][P_E] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign r_in_tell [x][y][P_W]  = r_out_tell[x-1][y][P_E];
        assign r_in_flit [x][y][P_W]  = r_out_flit[x-1][y][P_E];
        assign r_out_avail[x][y][P_W] = r_in_avail[x-1][y][P_E];
      end else begin : g_w_edge
        assign r_in_tell [x][y][P_W]  = 1'b0;
        assign r_in_flit [x][y][P_W]  = '0;
        assign r_out_avail[x][y][P_W] = 1'b0;
      end
      // north (towards larger y) / south links
      if (y + 1 < MESH_Y) begin : g_n
        assign r_in_tell [x][y][P_N]  = r_out_tell[x][y+1][P_S];
        assign r_in_flit [x][y][P_N]  = r_out_flit[x][y+1][P_S];
        assign r_out_avail[x][y][P_N] = r_in_avail[x][y+1][P_S];
      end else begin : g_n_edge
        assign r_in_tell [x][y][P_N]  = 1'b0;
        assign r_in_flit [x][y][P_N]  = '0;
        assign r_out_avail[x][y][P_N] = 1'b0;
      end
      if (y > 0) begin : g_s
        assign r_in_tell [x][y][P_S]  = r_out_tell[x][y-1][P_N];
        assign r_in_flit [x][y][P_S]  = r_out_flit[x][y-1][P_N];
        assign r_out_avail[x][y][P_S] = r_in_avail[x][y-1][P_N];
      end else begin : g_s_edge
        assign r_in_tell [x][y][P_S]  = 1'b0;
        assign r_in_flit [x][y][P_S]  = '0;
        assign r_out_avail[x][y][P_S] = 1'b0;
      end
    end
  end
endmodule
