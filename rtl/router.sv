// router: five-port store-and-forward NoC router (local, north, east, south,
// west) with XY routing, round-robin output arbitration and Hamming-protected
// crossbar transfers.
//
// Each port has an input_channel and an output_channel; between them sits the
// crossbar. An input channel that has received a whole packet requests the
// output chosen by XY routing; that output channel's round-robin arbiter
// grants one requester at a time and sets its own crossbar multiplexer; the
// packet then moves flit by flit, one per cycle, into the output FIFO and from
// there to the neighbour. All five input channels run independent FSMs, so up
// to five transfers can proceed in parallel. The grant seen by an input is the
// OR of the grants of all outputs towards it, and its crossbar demultiplexer
// select the OR of the select contributions of all outputs (only the
// granting output contributes a non-zero code), as the grant and DEMUXSEL
// lines are drawn ORed. Flits are Hamming SECDED encoded
// at the input channel and decoded and corrected at the output channel.
//
// err_inject is XORed onto each input's crossbar code word. It is a test
// hook of this design, not part of the described router: tie it to zero in
// use. It lets a test show that single errors on the crossbar path are
// corrected and double errors are flagged (ecc_single / ecc_double, one bit
// per output port, pulsing per affected flit).
//
// Link arrays are indexed by the port codes of noc_pkg (0 L, 1 N, 2 E, 3 S,
// 4 W). A link carries req (sender -> receiver), data (sender -> receiver)
// and ack (receiver -> sender); see input_channel for the handshake.
// xr, yr are this router's mesh coordinates.
module router
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = noc_pkg::FIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [COORD_W-1:0]       xr,
  input  logic [COORD_W-1:0]       yr,
  // incoming links
  input  logic [NPORTS-1:0]        in_req,
  input  logic [NPORTS-1:0][FLIT_W-1:0] in_data,
  output logic [NPORTS-1:0]        in_ack,
  // outgoing links
  output logic [NPORTS-1:0]        out_req,
  output logic [NPORTS-1:0][FLIT_W-1:0] out_data,
  input  logic [NPORTS-1:0]        out_ack,
  // crossbar error injection (test only) and error flags
  input  logic [NPORTS-1:0][CODE_W-1:0] err_inject,
  output logic [NPORTS-1:0]        ecc_single,
  output logic [NPORTS-1:0]        ecc_double
);

  // req_m[p][q]: input p requests output q; gnt_m[q][p]: output q grants input p.
  logic [NPORTS-1:0][NPORTS-1:0] req_m, gnt_m, req_t;
  logic [NPORTS-1:0]             gnt_in;
  logic [NPORTS-1:0][CODE_W-1:0] ic_code, xb_in, xb_out;
  logic [NPORTS-1:0]             ic_valid, xb_valid;
  logic [NPORTS-1:0][PORT_BITS-1:0] mux_sel;
  logic [NPORTS-1:0]             mux_en;
  // dmx_m[q][p]: demultiplexer select contribution of output q for input p
  logic [NPORTS-1:0][NPORTS-1:0][PORT_BITS-1:0] dmx_m;
  logic [NPORTS-1:0][PORT_BITS-1:0] demux_sel;

  always_comb begin
    for (int unsigned q = 0; q < NPORTS; q++)
      for (int unsigned p = 0; p < NPORTS; p++)
        req_t[q][p] = req_m[p][q];
    for (int unsigned p = 0; p < NPORTS; p++) begin
      gnt_in[p] = 1'b0;
      demux_sel[p] = '0;
      for (int unsigned q = 0; q < NPORTS; q++) begin
        gnt_in[p]    |= gnt_m[q][p];
        demux_sel[p] |= dmx_m[q][p];
      end
      xb_in[p] = ic_code[p] ^ err_inject[p];
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    input_channel #(.DEPTH(DEPTH)) u_ic (
      .clk, .rst, .xr, .yr,
      .req_in(in_req[p]), .data_in(in_data[p]), .ack_in(in_ack[p]),
      .req_out(req_m[p]), .gnt_in(gnt_in[p]),
      .xbar_data(ic_code[p]), .xbar_valid(ic_valid[p])
    );
  end

  crossbar #(.W(CODE_W), .P(NPORTS)) u_xbar (
    .in_data(xb_in), .in_valid(ic_valid),
    .mux_sel, .mux_en, .demux_sel, .demux_en(gnt_in),
    .out_data(xb_out), .out_valid(xb_valid)
  );

  for (genvar q = 0; q < NPORTS; q++) begin : g_out
    output_channel #(.PORT(q), .DEPTH(DEPTH)) u_oc (
      .clk, .rst,
      .req_in(req_t[q]), .gnt_out(gnt_m[q]),
      .mux_sel(mux_sel[q]), .mux_en(mux_en[q]), .demux_sel(dmx_m[q]),
      .xbar_data(xb_out[q]), .xbar_valid(xb_valid[q]),
      .req_out(out_req[q]), .data_out(out_data[q]), .ack_out(out_ack[q]),
      .ecc_single(ecc_single[q]), .ecc_double(ecc_double[q])
    );
  end

endmodule
