// input_channel: receive side of one router port.
//
// Holds a 16 x 8 flit FIFO and an FSM. A neighbouring router (or the local
// core) raises req_in; if the channel is free (idle, FIFO empty) it answers
// with ack_in and stores one flit from data_in on every clock edge at which
// req_in and ack_in are both high. The sender keeps req_in high until it has
// no flit left, so the packet ends when req_in falls; ack_in then falls one
// cycle later. This store-and-forward reception, the request held for the
// whole packet and the request/acknowledge falling in sequence follow the
// described channel. The first flit is the header: its upper nibble is the
// destination X and its lower nibble the destination Y (own choice).
//
// After reception the FSM routes the header with xy_route against the
// router's coordinates xr, yr, and raises one bit of req_out (indexed by the
// port codes of noc_pkg) towards that output channel. gnt_in is the OR of the
// grants of all output channels towards this input. While granted, one flit
// per cycle leaves the FIFO onto the crossbar (xbar_valid high, xbar_data a
// Hamming SECDED code word of the flit). When the FIFO is empty under grant,
// the request is dropped and the channel is free again.
//
// Timing: ack one cycle after req; route decided one cycle after the packet
// end; request raised the cycle after that. Reset is synchronous, active
// high. A packet longer than the FIFO loses its excess flits; an assertion
// flags it. The described packets (1 to 15 flits) always fit.
module input_channel
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = noc_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [COORD_W-1:0] xr,
  input  logic [COORD_W-1:0] yr,
  // link from the neighbour
  input  logic              req_in,
  input  flit_t             data_in,
  output logic              ack_in,
  // towards the output channels and the crossbar
  output logic [NPORTS-1:0] req_out,
  input  logic              gnt_in,
  output code_t             xbar_data,
  output logic              xbar_valid
);

  typedef enum logic [1:0] {S_IDLE, S_RECV, S_ROUTE, S_REQ} state_e;
  state_e state;

  flit_t             head;
  logic              fifo_empty, fifo_full;
  logic              wr_en, rd_en;
  logic [NPORTS-1:0] route_onehot, route_q;

  assign ack_in     = (state == S_RECV);
  assign wr_en      = (state == S_RECV) && req_in;
  assign xbar_valid = (state == S_REQ) && gnt_in && !fifo_empty;
  assign rd_en      = xbar_valid;
  assign req_out    = (state == S_REQ) ? route_q : '0;

  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en, .wr_data(data_in),
    .rd_en, .rd_data(head),
    .empty(fifo_empty), .full(fifo_full), .count()
  );

  xy_route #(.CW(COORD_W)) u_route (
    .xr, .yr,
    .dst_x(head[FLIT_W-1 -: COORD_W]),
    .dst_y(head[COORD_W-1:0]),
    .out_port(),
    .out_onehot(route_onehot)
  );

  hamming_enc #(.K(FLIT_W)) u_enc (.data(head), .code(xbar_data));

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      route_q <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (req_in) state <= S_RECV;
        S_RECV:  if (!req_in) state <= S_ROUTE;
        S_ROUTE: begin
          if (fifo_empty) state <= S_IDLE;
          else begin
            route_q <= route_onehot;
            state   <= S_REQ;
          end
        end
        S_REQ:   if (gnt_in && fifo_empty) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) wr_en |-> !fifo_full)
    else $error("input_channel: packet longer than the FIFO, flit dropped");
  a_req_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(req_out));

endmodule
