// tb_output_channel: test of the output channel of the local port (serves all
// five inputs) plus a check of the east output's request mask.
// Five mock input channels each hold one packet and request the output
// together (the contention row of the port table). The test checks that the
// grants come in round-robin order 0,1,2,3,4, that a new grant is only given
// once the previous packet has left the FIFO, that the crossbar select names
// the granted input, and that a tb_link_snk on the link receives every packet
// intact in grant order. Single-bit errors injected on crossbar code words
// must be corrected and counted on ecc_single; a double error on a header
// flit must be flagged on ecc_double. A second instance (east port) must
// never grant a request from the north or south input, and when it grants the
// local input it must point that input's demultiplexer at the east lane.
module tb_output_channel;
  import noc_pkg::*;
  logic clk = 0, rst = 1;
  logic [4:0] req_in = '0, gnt_out;
  logic [2:0] mux_sel;
  logic mux_en;
  code_t xbar_data;
  logic xbar_valid;
  logic req_out, ack_out, ecc_single, ecc_double;
  flit_t data_out;
  // east-port instance
  logic [4:0] e_req = '0, e_gnt;
  logic [2:0] e_sel; logic e_en, e_req_out, e_s, e_d; flit_t e_dout;
  logic [4:0][2:0] demux_sel, e_dmx;
  int checks = 0, failures = 0;

  output_channel #(.PORT(0)) dut (.*);
  output_channel #(.PORT(2)) dut_e (
    .clk, .rst, .req_in(e_req), .gnt_out(e_gnt), .mux_sel(e_sel), .mux_en(e_en), .demux_sel(e_dmx),
    .xbar_data('0), .xbar_valid(1'b0), .req_out(e_req_out), .data_out(e_dout),
    .ack_out(1'b0), .ecc_single(e_s), .ecc_double(e_d));
  tb_link_snk #(.CHECK_HDR(0), .STALL(3)) snk (.clk, .rst, .req(req_out), .data(data_out), .ack(ack_out));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [12:0] ref_code(logic [7:0] d);
    logic [12:0] c;
    c = '0;
    c[3] = d[0]; c[5] = d[1]; c[6] = d[2]; c[7] = d[3];
    c[9] = d[4]; c[10] = d[5]; c[11] = d[6]; c[12] = d[7];
    c[1] = c[3] ^ c[5] ^ c[7] ^ c[9] ^ c[11];
    c[2] = c[3] ^ c[6] ^ c[7] ^ c[10] ^ c[11];
    c[4] = c[5] ^ c[6] ^ c[7] ^ c[12];
    c[8] = c[9] ^ c[10] ^ c[11] ^ c[12];
    c[0] = ^c[12:1];
    return c;
  endfunction

  function automatic logic [7:0] pkt_byte(int s, int q, int i);
    return 8'((s * 37) + (q * 11) + (i * 5) + 8'h5A);
  endfunction

  // mock input channels
  logic [7:0] pk [5][16];
  int plen [5];
  int pos [5];
  logic [12:0] inj [5][16];
  logic [4:0] in_valid;
  logic [12:0] in_code [5];

  always_comb begin
    for (int p = 0; p < 5; p++) begin
      in_valid[p] = gnt_out[p] && (pos[p] < plen[p]);
      in_code[p]  = (pos[p] < 16) ? (ref_code(pk[p][pos[p]]) ^ inj[p][pos[p]]) : '0;
    end
    xbar_valid = mux_en ? in_valid[mux_sel] : 1'b0;
    xbar_data  = mux_en ? in_code[mux_sel] : '0;
  end

  int grant_order [$];
  int n_single = 0, n_double = 0;
  logic [4:0] gnt_d = '0;
  always @(posedge clk) begin
    gnt_d <= gnt_out;
    if (ecc_single) n_single++;
    if (ecc_double) n_double++;
    if (e_gnt[1] || e_gnt[3]) begin checks++; failures++; $display("FAIL east output granted N/S"); end
    if (e_gnt[0]) begin
      checks++;
      if (e_dmx[0] != 3'd2 || e_dmx[1] != 3'd0 || e_dmx[3] != 3'd0 || e_sel != 3'd0 || !e_en) begin
        failures++; $display("FAIL east output crossbar settings");
      end
    end
    for (int p = 0; p < 5; p++) begin
      if (gnt_out[p] && !gnt_d[p]) begin
        grant_order.push_back(p);
        checks++;
        if (!(mux_en && mux_sel == 3'(p))) begin failures++; $display("FAIL crossbar select"); end
        checks++;
        if (req_out) begin failures++; $display("FAIL grant while still sending"); end
      end
      if (in_valid[p] && mux_en && mux_sel == 3'(p)) pos[p] <= pos[p] + 1;
      if (gnt_out[p] && pos[p] >= plen[p]) req_in[p] <= 1'b0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 5; p++) begin
      plen[p] = 4 + 2 * p;
      pos[p] = 0;
      for (int i = 0; i < 16; i++) begin
        inj[p][i] = '0;
        pk[p][i] = (i == 0) ? 8'h11 : (i == 1) ? 8'(p) : (i == 2) ? 8'd0 : (i == 3) ? 8'(plen[p]) : pkt_byte(p, 0, i);
      end
    end
    inj[1][5] = 13'h0040;   // single error in a payload flit
    inj[3][2] = 13'h0001;   // single error in the overall parity bit
    inj[4][7] = 13'h1000;   // single error in data bit 7
    inj[2][0] = 13'h0006;   // double error in the header flit
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    req_in = 5'b11111;
    e_req  = 5'b01011;      // north, south and local ask the east output
    wait (snk.n_ok + snk.n_bad == 5);
    repeat (5) @(posedge clk);
    check(grant_order.size() == 5, "five grants");
    for (int i = 0; i < 5 && i < grant_order.size(); i++) check(grant_order[i] == i, "round-robin order");
    check(snk.n_ok == 5 && snk.n_bad == 0, "packets intact");
    for (int i = 0; i < 5 && i < snk.order.size(); i++) check(snk.order[i] == i, "link order");
    check(n_single == 3, "three corrected errors");
    check(n_double == 1, "one detected double error");
    check(snk.n_flits == 4 + 6 + 8 + 10 + 12, "flit total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
