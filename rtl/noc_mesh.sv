// noc_mesh: a MESH_X x MESH_Y mesh network-on-chip built from routers.
//
// Router (x, y) gets the coordinates (x, y); its east port is linked to the
// west port of router (x+1, y) and its north port to the south port of
// router (x, y+1), so a packet first travels along X to its column and then
// along Y to its row, as in the XY routing example. Links at the mesh edge
// are left idle (no request, no acknowledge); XY routing never sends a packet
// to a destination inside the mesh through them. The default 4 x 4 size is
// this design's own choice, taken from the mesh drawn in the routing example.
//
// The local port of router r = y*MESH_X + x is brought out as the core
// interface: loc_in_* is the core's packet injection link (core drives req
// and data, router answers ack) and loc_out_* the ejection link (router
// drives req and data, core answers ack). The first flit of a packet is the
// header {dst_x[3:0], dst_y[3:0]}. err_inject and the ecc flags of every
// router are brought out for testing (see router); tie err_inject to zero.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter int unsigned DEPTH  = noc_pkg::FIFO_DEPTH
) (
  input  logic clk,
  input  logic rst,
  input  logic [MESH_X*MESH_Y-1:0]             loc_in_req,
  input  logic [MESH_X*MESH_Y-1:0][FLIT_W-1:0] loc_in_data,
  output logic [MESH_X*MESH_Y-1:0]             loc_in_ack,
  output logic [MESH_X*MESH_Y-1:0]             loc_out_req,
  output logic [MESH_X*MESH_Y-1:0][FLIT_W-1:0] loc_out_data,
  input  logic [MESH_X*MESH_Y-1:0]             loc_out_ack,
  input  logic [MESH_X*MESH_Y-1:0][NPORTS-1:0][CODE_W-1:0] err_inject,
  output logic [MESH_X*MESH_Y-1:0][NPORTS-1:0] ecc_single,
  output logic [MESH_X*MESH_Y-1:0][NPORTS-1:0] ecc_double
);

  localparam int unsigned NR = MESH_X * MESH_Y;

  logic [NR-1:0][NPORTS-1:0]             in_req, in_ack, out_req, out_ack;
  logic [NR-1:0][NPORTS-1:0][FLIT_W-1:0] in_data, out_data;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned R = y * MESH_X + x;

      router #(.DEPTH(DEPTH)) u_router (
        .clk, .rst,
        .xr(COORD_W'(x)), .yr(COORD_W'(y)),
        .in_req(in_req[R]), .in_data(in_data[R]), .in_ack(in_ack[R]),
        .out_req(out_req[R]), .out_data(out_data[R]), .out_ack(out_ack[R]),
        .err_inject(err_inject[R]),
        .ecc_single(ecc_single[R]), .ecc_double(ecc_double[R])
      );

      // local port
      assign in_req[R][PORT_L]  = loc_in_req[R];
      assign in_data[R][PORT_L] = loc_in_data[R];
      assign loc_in_ack[R]      = in_ack[R][PORT_L];
      assign loc_out_req[R]     = out_req[R][PORT_L];
      assign loc_out_data[R]    = out_data[R][PORT_L];
      assign out_ack[R][PORT_L] = loc_out_ack[R];

      // west input <- east output of (x-1, y); east output ack <- west input ack of (x+1, y)
      if (x > 0) begin : g_w
        assign in_req[R][PORT_W]  = out_req[R-1][PORT_E];
        assign in_data[R][PORT_W] = out_data[R-1][PORT_E];
        assign out_ack[R][PORT_W] = in_ack[R-1][PORT_E];
      end else begin : g_w_edge
        assign in_req[R][PORT_W]  = 1'b0;
        assign in_data[R][PORT_W] = '0;
        assign out_ack[R][PORT_W] = 1'b0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign in_req[R][PORT_E]  = out_req[R+1][PORT_W];
        assign in_data[R][PORT_E] = out_data[R+1][PORT_W];
        assign out_ack[R][PORT_E] = in_ack[R+1][PORT_W];
      end else begin : g_e_edge
        assign in_req[R][PORT_E]  = 1'b0;
        assign in_data[R][PORT_E] = '0;
        assign out_ack[R][PORT_E] = 1'b0;
      end
      if (y > 0) begin : g_s
        assign in_req[R][PORT_S]  = out_req[R-MESH_X][PORT_N];
        assign in_data[R][PORT_S] = out_data[R-MESH_X][PORT_N];
        assign out_ack[R][PORT_S] = in_ack[R-MESH_X][PORT_N];
      end else begin : g_s_edge
        assign in_req[R][PORT_S]  = 1'b0;
        assign in_data[R][PORT_S] = '0;
        assign out_ack[R][PORT_S] = 1'b0;
      end
      if (y < MESH_Y - 1) begin : g_n
        assign in_req[R][PORT_N]  = out_req[R+MESH_X][PORT_S];
        assign in_data[R][PORT_N] = out_data[R+MESH_X][PORT_S];
        assign out_ack[R][PORT_N] = in_ack[R+MESH_X][PORT_S];
      end else begin : g_n_edge
        assign in_req[R][PORT_N]  = 1'b0;
        assign in_data[R][PORT_N] = '0;
        assign out_ack[R][PORT_N] = 1'b0;
      end
    end
  end

endmodule
