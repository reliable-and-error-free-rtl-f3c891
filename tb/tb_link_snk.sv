// tb_link_snk: testbench packet sink for one router link.
//
// Acknowledges a request after a random wait of 0..STALL cycles, stores a flit
// at every clock edge where req and ack are high, and when req falls checks
// the packet in the format written by tb_link_src: header equal to
// {EXP_X, EXP_Y}, length flit equal to the flit count, payload bytes equal to
// the formula. Counts good and bad packets and records the source of each
// packet in arrival order. CHECK_HDR = 0 skips the header comparison.
module tb_link_snk #(
  parameter logic [3:0] EXP_X = 0,
  parameter logic [3:0] EXP_Y = 0,
  parameter int         STALL = 0,
  parameter bit         CHECK_HDR = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       req,
  input  logic [7:0] data,
  output logic       ack
);
  logic [7:0] buf_q [$];
  int n_ok, n_bad, n_flits;
  int order [$];
  int last_len;
  int wait_cnt;

  function automatic logic [7:0] pkt_byte(int src, int seq, int i);
    return 8'((src * 37) + (seq * 11) + (i * 5) + 8'h5A);
  endfunction

  function automatic void check_pkt();
    bit ok;
    int len;
    ok  = 1'b1;
    len = buf_q.size();
    if (len == 0) ok = 1'b0;
    else begin
      if (CHECK_HDR && buf_q[0] != {EXP_X, EXP_Y}) ok = 1'b0;
      if (len > 3 && buf_q[3] != 8'(len)) ok = 1'b0;
      for (int i = 4; i < len; i++)
        if (buf_q[i] != pkt_byte(int'(buf_q[1]), int'(buf_q[2]), i)) ok = 1'b0;
    end
    if (ok) n_ok++;
    else begin
      n_bad++;
      $display("tb_link_snk %m: bad packet, %0d flits, header %h", len, len ? buf_q[0] : 8'h0);
    end
    order.push_back(len > 1 ? int'(buf_q[1]) : -1);
    last_len = len;
    buf_q.delete();
  endfunction

  initial begin
    ack = 1'b0; n_ok = 0; n_bad = 0; n_flits = 0; wait_cnt = 0; last_len = 0;
  end

  always @(posedge clk) begin
    if (rst) begin
      ack <= 1'b0;
      buf_q.delete();
    end else if (!ack) begin
      if (req) begin
        if (wait_cnt == 0) begin
          ack <= 1'b1;
          wait_cnt <= (STALL > 0) ? int'($urandom % (STALL + 1)) : 0;
        end else wait_cnt <= wait_cnt - 1;
      end
    end else begin
      if (req) begin
        buf_q.push_back(data);
        n_flits++;
      end else begin
        ack <= 1'b0;
        check_pkt();
      end
    end
  end
endmodule
