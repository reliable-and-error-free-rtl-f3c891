// tb_router: end-to-end test of one router at position (1, 1).
// A tb_link_src drives every input link and a tb_link_snk listens on every
// output link, expecting the header of the neighbour behind it
// (L (1,1), N (1,2), E (2,1), S (1,0), W (0,1)).
//  0. One 15-flit (120-bit) packet local -> east alone: its latency T1 is
//     measured and must equal the cycle count worked out for the pipeline.
//  1. No contention: five 15-flit packets at once on five disjoint paths
//     (N->S, S->N, E->W, W->E, L->L). All five connections run in parallel,
//     so the whole phase must end within T1 + 2 cycles.
//  2. Contention: all five inputs send to the local output at once; the
//     round-robin arbiter must serve them one after another in rotation.
//  3. A single-bit error injected on the east input's crossbar path must be
//     corrected in every flit and counted on ecc_single.
//  4. Random traffic on all legal XY turns with stalling receivers.
module tb_router;
  import noc_pkg::*;
  logic clk = 0, rst = 1;
  logic [4:0] in_req, in_ack, out_req, out_ack;
  logic [4:0][7:0] in_data, out_data;
  logic [4:0][12:0] err_inject = '0;
  logic [4:0] ecc_single, ecc_double;
  int checks = 0, failures = 0;

  router dut (.clk, .rst, .xr(4'd1), .yr(4'd1), .*);

  always #5 clk = ~clk;

  localparam logic [3:0] DX [5] = '{4'd1, 4'd1, 4'd2, 4'd1, 4'd0};
  localparam logic [3:0] DY [5] = '{4'd1, 4'd2, 4'd1, 4'd0, 4'd1};

  for (genvar p = 0; p < 5; p++) begin : g
    tb_link_src src (.clk, .rst, .req(in_req[p]), .data(in_data[p]), .ack(in_ack[p]));
    tb_link_snk #(.EXP_X(DX[p]), .EXP_Y(DY[p]), .STALL(p == 4 ? 2 : 0)) snk (
      .clk, .rst, .req(out_req[p]), .data(out_data[p]), .ack(out_ack[p]));
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int cyc = 0;
  int n_single = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int q = 0; q < 5; q++) if (ecc_single[q]) n_single++;
  end

  function automatic int total_ok();
    return g[0].snk.n_ok + g[1].snk.n_ok + g[2].snk.n_ok + g[3].snk.n_ok + g[4].snk.n_ok;
  endfunction
  function automatic int total_bad();
    return g[0].snk.n_bad + g[1].snk.n_bad + g[2].snk.n_bad + g[3].snk.n_bad + g[4].snk.n_bad;
  endfunction

  task automatic push(int p, int q, int seq, int len);
    case (p)
      0: g[0].src.push(DX[q], DY[q], p, seq, len);
      1: g[1].src.push(DX[q], DY[q], p, seq, len);
      2: g[2].src.push(DX[q], DY[q], p, seq, len);
      3: g[3].src.push(DX[q], DY[q], p, seq, len);
      default: g[4].src.push(DX[q], DY[q], p, seq, len);
    endcase
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, exp_total, seq, l_before;
    seq = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);

    // 0. single packet latency, L -> E, 15 flits
    t0 = cyc;
    push(0, 2, seq++, 15);
    while (!(g[2].snk.n_ok == 1)) @(posedge clk);
    t1 = cyc - t0;
    // edge by edge: source raises req (1), channel acks (1), 15 flits
    // received (15), req low seen (1), route latched (1), arbitration (1),
    // 15 crossbar flits (15), input and output release (2), sink acks (1),
    // 15 flits sent (15), packet end seen by the sink (1): 54 cycles
    check(t1 == 1 + 1 + 15 + 1 + 1 + 1 + 15 + 2 + 1 + 15 + 1, "single-packet latency");
    $display("single 15-flit packet latency: %0d cycles", t1);
    repeat (5) @(posedge clk);

    // 1. no contention, five parallel connections
    t0 = cyc;
    push(1, 3, seq++, 15);  // N -> S
    push(3, 1, seq++, 15);  // S -> N
    push(2, 4, seq++, 15);  // E -> W
    push(4, 2, seq++, 15);  // W -> E
    push(0, 0, seq++, 15);  // L -> L
    while (!(total_ok() + total_bad() == 6)) @(posedge clk);
    check(cyc - t0 <= t1 + 4, "five transfers in parallel");
    $display("five parallel 15-flit packets: %0d cycles", cyc - t0);
    check(g[3].snk.order[0] == 1 && g[1].snk.order[0] == 3 && g[4].snk.order[0] == 2, "permutation");
    repeat (5) @(posedge clk);

    // 2. contention: everybody to the local output
    l_before = g[0].snk.order.size();
    for (int p = 0; p < 5; p++) push(p, 0, seq++, 8);
    while (!(g[0].snk.n_ok + g[0].snk.n_bad == l_before + 5)) @(posedge clk);
    // local output last served input 0 (phase 1), so the rotation starts at 1
    for (int i = 0; i < 5; i++)
      check(g[0].snk.order[l_before + i] == (i + 1) % 5, "round-robin service order");
    repeat (5) @(posedge clk);

    // 3. single-bit error on the east input's crossbar path
    err_inject[2] = 13'h0200;
    n_single = 0;
    push(2, 0, seq++, 12);
    while (!(g[0].snk.n_ok + g[0].snk.n_bad == l_before + 6)) @(posedge clk);
    check(n_single == 12, "every flit corrected");
    err_inject[2] = '0;
    repeat (5) @(posedge clk);

    // 4. random legal traffic
    exp_total = total_ok() + total_bad();
    for (int n = 0; n < 300; n++) begin
      int p, q;
      logic [4:0] legal;
      p = $urandom % 5;
      legal = xy_legal_outputs(3'(p));
      do q = $urandom % 5; while (!legal[q]);
      push(p, q, seq++, 1 + $urandom % 15);
      exp_total++;
    end
    while (!(total_ok() + total_bad() == exp_total)) @(posedge clk);
    check(total_bad() == 0, "no corrupted packet");
    check(total_ok() == exp_total, "all packets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
