// tb_link_src: testbench packet source for one router link.
//
// Holds a queue of packets and plays them out on a req/data/ack link: req
// rises with the first flit on data, one flit is consumed at every clock edge
// where req and ack are both high, req falls after the last flit, and the
// next packet starts only after ack has fallen. Packets are built by push()
// in the test format {header, src, seq, len, payload...} where
// payload[i] = pkt_byte(src, seq, i) and len is the total flit count.
module tb_link_src (
  input  logic       clk,
  input  logic       rst,
  output logic       req,
  output logic [7:0] data,
  input  logic       ack
);
  typedef logic [7:0] pkt_t [];
  pkt_t q [$];
  pkt_t cur;
  int   idx;
  int   sent;
  typedef enum {IDLE, SEND, WAITACK} st_e;
  st_e st;

  function automatic logic [7:0] pkt_byte(int src, int seq, int i);
    return 8'((src * 37) + (seq * 11) + (i * 5) + 8'h5A);
  endfunction

  function automatic void push(logic [3:0] dx, logic [3:0] dy, int src, int seq, int len);
    pkt_t p;
    p = new[len];
    p[0] = {dx, dy};
    if (len > 1) p[1] = 8'(src);
    if (len > 2) p[2] = 8'(seq);
    if (len > 3) p[3] = 8'(len);
    for (int i = 4; i < len; i++) p[i] = pkt_byte(src, seq, i);
    q.push_back(p);
  endfunction

  function automatic bit busy();
    return (q.size() != 0) || (st != IDLE);
  endfunction

  assign data = (st == SEND) ? cur[idx] : 8'h00;

  initial begin
    st = IDLE; req = 1'b0; idx = 0; sent = 0;
  end

  always @(posedge clk) begin
    if (rst) begin
      st <= IDLE; req <= 1'b0; idx <= 0;
    end else begin
      case (st)
        IDLE: if (q.size() != 0) begin
          cur = q.pop_front();
          idx <= 0;
          req <= 1'b1;
          st  <= SEND;
        end
        SEND: if (ack) begin
          if (idx == cur.size() - 1) begin
            req <= 1'b0;
            st  <= WAITACK;
            sent <= sent + 1;
          end else idx <= idx + 1;
        end
        WAITACK: if (!ack) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
