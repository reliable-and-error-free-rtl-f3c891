// output_channel: send side of one router port.
//
// Holds a 16 x 8 flit FIFO, a round-robin arbiter and an FSM. While idle with
// an empty FIFO it lets the arbiter pick one of the input channels that
// request this output (req_in, one bit per input port). The winner's grant
// (gnt_out) then stays high as long as that input keeps requesting; during
// that time the output drives the crossbar select of its own multiplexer
// (mux_sel = winner's port code, mux_en = 1) and its part of the winner's
// demultiplexer select (demux_sel[p] = this output's port code for the
// granted input p, zero for the others; the router ORs these over all
// outputs, as the drawn DEMUXSEL lines are ORed), and writes every valid flit
// arriving from the crossbar into its FIFO, after Hamming SECDED decoding and
// single-error correction. The input drops its request once its FIFO is
// empty, which ends the transfer and clears the crossbar setting.
// The FSM then sends the packet to the neighbour: req_out is high while the
// FIFO holds flits, one flit (data_out, the FIFO head) is passed at every
// clock edge at which req_out and ack_out are both high, and after the last
// flit the FSM waits for ack_out to fall before it arbitrates again. An empty
// FIFO is what allows the next transfer, as described for the design.
//
// Requests from inputs that XY routing can never send here (set by the
// parameter PORT, see noc_pkg::xy_served_inputs) are masked before the
// arbiter, the reduction described for the east and west outputs.
// ecc_single / ecc_double pulse for a flit with a corrected single error or
// a detected double error. Reset is synchronous, active high. For the local
// output (port code 0) demux_sel is constant zero: lane 0 needs no other code.
module output_channel
  import noc_pkg::*;
#(
  parameter int unsigned PORT  = 0,
  parameter int unsigned DEPTH = noc_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst,
  // from / to the input channels
  input  logic [NPORTS-1:0] req_in,
  output logic [NPORTS-1:0] gnt_out,
  // crossbar control and data for this output
  output logic [PORT_BITS-1:0] mux_sel,
  output logic              mux_en,
  output logic [NPORTS-1:0][PORT_BITS-1:0] demux_sel,
  input  code_t             xbar_data,
  input  logic              xbar_valid,
  // link to the neighbour
  output logic              req_out,
  output flit_t             data_out,
  input  logic              ack_out,
  // error reporting
  output logic              ecc_single,
  output logic              ecc_double
);

  typedef enum logic [1:0] {S_IDLE, S_XFER, S_SEND, S_DONE} state_e;
  state_e state;

  localparam logic [NPORTS-1:0] SERVED = xy_served_inputs(PORT_BITS'(PORT));

  logic [NPORTS-1:0] mreq, grant;
  logic [PORT_BITS-1:0] widx;
  logic              update;
  logic              fifo_empty, fifo_full;
  flit_t             dec_data;
  logic              s_err, d_err;
  logic              wr_en, rd_en;

  assign mreq   = req_in & SERVED;
  assign update = (state == S_IDLE) && fifo_empty && (|mreq);

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk, .rst,
    .req(mreq), .update,
    .grant, .grant_enable(), .winner_idx(widx)
  );

  hamming_dec #(.K(FLIT_W)) u_dec (
    .code(xbar_data), .data(dec_data), .single_err(s_err), .double_err(d_err)
  );

  assign mux_en  = (state == S_XFER) && (|grant);
  assign mux_sel = mux_en ? widx : '0;
  assign gnt_out = (state == S_XFER) ? grant : '0;

  always_comb begin
    for (int unsigned p = 0; p < NPORTS; p++)
      demux_sel[p] = gnt_out[p] ? PORT_BITS'(PORT) : '0;
  end
  assign wr_en   = mux_en && xbar_valid;
  assign req_out = (state == S_SEND) && !fifo_empty;
  assign rd_en   = req_out && ack_out;
  assign ecc_single = wr_en && s_err;
  assign ecc_double = wr_en && d_err;

  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en, .wr_data(dec_data),
    .rd_en, .rd_data(data_out),
    .empty(fifo_empty), .full(fifo_full), .count()
  );

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE: if (update) state <= S_XFER;
        S_XFER: if (!(|grant)) state <= S_SEND;
        S_SEND: if (fifo_empty) state <= S_DONE;
        S_DONE: if (!ack_out) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_gnt_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt_out));
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) wr_en |-> !fifo_full)
    else $error("output_channel: packet longer than the FIFO, flit dropped");

endmodule
