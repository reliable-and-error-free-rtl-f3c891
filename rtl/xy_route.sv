// xy_route: dimension-order (XY) routing decision for one packet.
//
// The destination coordinates of the header (dst_x, dst_y) are compared with
// the router's own coordinates (xr, yr). X is resolved first: a larger
// destination X leaves by the east port, a smaller one by the west port. Only
// when X matches is Y compared: larger goes north, smaller goes south, and
// equal means the packet has arrived and leaves by the local port. This is
// the rule the design follows exactly; north being +Y and east being +X is
// also its convention. Purely combinational: out_port is valid in the same
// cycle as the inputs. out_onehot is the same decision as a 5-bit request
// vector indexed by the port codes of noc_pkg.
module xy_route
  import noc_pkg::*;
#(
  parameter int unsigned CW = noc_pkg::COORD_W
) (
  input  logic [CW-1:0]     xr,
  input  logic [CW-1:0]     yr,
  input  logic [CW-1:0]     dst_x,
  input  logic [CW-1:0]     dst_y,
  output port_e             out_port,
  output logic [NPORTS-1:0] out_onehot
);

  always_comb begin
    if (dst_x > xr)      out_port = PORT_E;
    else if (dst_x < xr) out_port = PORT_W;
    else if (dst_y > yr) out_port = PORT_N;
    else if (dst_y < yr) out_port = PORT_S;
    else                 out_port = PORT_L;
    out_onehot = NPORTS'(1) << out_port;
  end

endmodule
