// noc_pkg: types and constants shared by the router blocks.
//
// The router has five ports. Their 3-bit codes follow the order in which the
// crossbar's inputs and outputs are drawn (local, north, east, south, west);
// the 3-bit width of a port code is the crossbar's select width. A flit is
// 8 bits wide. The header flit carries the destination router's X coordinate
// in its upper nibble and its Y coordinate in the lower nibble; that header
// layout is this design's own choice. Flits cross the crossbar as 13-bit
// Hamming SECDED code words (8 data bits, 4 Hamming parity bits, 1 overall
// parity bit).
package noc_pkg;

  localparam int unsigned NPORTS   = 5;
  localparam int unsigned PORT_BITS = 3;
  localparam int unsigned FLIT_W   = 8;
  localparam int unsigned COORD_W  = 4;
  localparam int unsigned FIFO_DEPTH = 16;

  typedef enum logic [PORT_BITS-1:0] {
    PORT_L = 3'd0,
    PORT_N = 3'd1,
    PORT_E = 3'd2,
    PORT_S = 3'd3,
    PORT_W = 3'd4
  } port_e;

  // Number of Hamming parity bits for a given data width (smallest r with
  // 2**r >= k + r + 1).
  function automatic int unsigned ham_parity_bits(int unsigned k);
    int unsigned r;
    r = 0;
    while ((1 << r) < (k + r + 1)) r++;
    return r;
  endfunction

  localparam int unsigned HAM_R  = ham_parity_bits(FLIT_W);   // 4
  localparam int unsigned CODE_W = FLIT_W + HAM_R + 1;        // 13

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [CODE_W-1:0] code_t;

  // Output ports an input port may request under XY routing. Packets turn
  // from X to Y at most once, so inputs from north or south never ask for
  // east or west. A packet never leaves through the port it came in by,
  // except the local port, which may loop a packet back to its own core.
  // Bit q of the result is set when output q is reachable from input p.
  function automatic logic [NPORTS-1:0] xy_legal_outputs(logic [PORT_BITS-1:0] p);
    logic [NPORTS-1:0] m;
    case (p)
      PORT_L:  m = 5'b11111;
      PORT_N:  m = (5'b1 << PORT_L) | (5'b1 << PORT_S);
      PORT_S:  m = (5'b1 << PORT_L) | (5'b1 << PORT_N);
      PORT_E:  m = (5'b1 << PORT_L) | (5'b1 << PORT_N) | (5'b1 << PORT_S) | (5'b1 << PORT_W);
      PORT_W:  m = (5'b1 << PORT_L) | (5'b1 << PORT_N) | (5'b1 << PORT_S) | (5'b1 << PORT_E);
      default: m = '0;
    endcase
    return m;
  endfunction

  // Input ports that output q has to serve: the transpose of the table above.
  function automatic logic [NPORTS-1:0] xy_served_inputs(logic [PORT_BITS-1:0] q);
    logic [NPORTS-1:0] m;
    for (int unsigned p = 0; p < NPORTS; p++) m[p] = xy_legal_outputs(PORT_BITS'(p))[q];
    return m;
  endfunction

endpackage
