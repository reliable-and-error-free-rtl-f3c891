// tb_noc_mesh: end-to-end test of the 4 x 4 mesh at its default parameters.
// Every core (a tb_link_src on the local input link) sends N_PKT packets of
// random length (1 to 15 flits) to random destinations, its own router
// included; a tb_link_snk on every local output link checks that each packet
// arrives intact at the router whose coordinates are in its header. Then a
// single-bit error and a parity-only double-bit error are injected on two
// crossbar paths, and one packet is sent through each.
// Mechanisms counted (each must occur at least once): contention at an
// output channel (two or more requests when it arbitrates), packets turning
// from X to Y, loopback to the own core, two or more simultaneous crossbar
// connections inside one router, receiver stalls, corrected single errors and
// detected double errors.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int MX = 4, MY = 4, NR = MX * MY, N_PKT = 24;
  logic clk = 0, rst = 1;
  logic [NR-1:0] loc_in_req, loc_in_ack, loc_out_req, loc_out_ack;
  logic [NR-1:0][7:0] loc_in_data, loc_out_data;
  logic [NR-1:0][4:0][12:0] err_inject = '0;
  logic [NR-1:0][4:0] ecc_single, ecc_double;
  int checks = 0, failures = 0;

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  int got [NR];
  int bad [NR];
  int n_turn = 0, n_loop = 0, n_cont = 0, n_par = 0, n_stall = 0, n_single = 0, n_double = 0;

  for (genvar r = 0; r < NR; r++) begin : g_c
    localparam logic [3:0] RX = 4'(r % MX), RY = 4'(r / MX);
    tb_link_src src (.clk, .rst, .req(loc_in_req[r]), .data(loc_in_data[r]), .ack(loc_in_ack[r]));
    tb_link_snk #(.EXP_X(RX), .EXP_Y(RY), .STALL(3)) snk (
      .clk, .rst, .req(loc_out_req[r]), .data(loc_out_data[r]), .ack(loc_out_ack[r]));
    always @(posedge clk) begin
      got[r] <= snk.n_ok + snk.n_bad;
      bad[r] <= snk.n_bad;
      if (loc_out_req[r] && !loc_out_ack[r]) n_stall++;
    end
    initial begin
      @(negedge rst);
      for (int i = 0; i < N_PKT; i++) begin
        logic [3:0] dx, dy;
        dx = 4'($urandom % MX);
        dy = 4'($urandom % MY);
        if (dx != RX && dy != RY) n_turn++;
        if (dx == RX && dy == RY) n_loop++;
        src.push(dx, dy, r, i, 1 + $urandom % 15);
      end
    end
  end

  // probes inside the routers
  for (genvar y = 0; y < MY; y++) begin : g_py
    for (genvar x = 0; x < MX; x++) begin : g_px
      logic [4:0] en;
      for (genvar q = 0; q < 5; q++) begin : g_q
        assign en[q] = dut.g_y[y].g_x[x].u_router.g_out[q].u_oc.mux_en;
        always @(posedge clk)
          if (dut.g_y[y].g_x[x].u_router.g_out[q].u_oc.update &&
              $countones(dut.g_y[y].g_x[x].u_router.g_out[q].u_oc.mreq) > 1) n_cont++;
      end
      always @(posedge clk) if ($countones(en) > 1) n_par++;
    end
  end

  always @(posedge clk) begin
    n_single += $countones(ecc_single);
    n_double += $countones(ecc_double);
  end

  function automatic int sum_got();
    int s = 0;
    for (int r = 0; r < NR; r++) s += got[r];
    return s;
  endfunction
  function automatic int sum_bad();
    int s = 0;
    for (int r = 0; r < NR; r++) s += bad[r];
    return s;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    while (sum_got() < NR * N_PKT) @(posedge clk);
    repeat (3) @(posedge clk);
    check(sum_got() == NR * N_PKT, "all random packets delivered");
    check(sum_bad() == 0, "no corrupted or misrouted packet");
    check(n_single == 0 && n_double == 0, "no ECC event without injection");
    // single-bit error on the local input path of router (0,0): data bit 0
    err_inject[0][PORT_L] = 13'h0008;
    g_c[0].src.push(4'd3, 4'd3, 0, 100, 10);
    while (sum_got() < NR * N_PKT + 1) @(posedge clk);
    err_inject[0][PORT_L] = '0;
    // double error on two parity bits of the east input path of router (2,1)
    err_inject[6][PORT_E] = 13'h0006;
    g_c[7].src.push(4'd0, 4'd1, 7, 101, 6);
    while (sum_got() < NR * N_PKT + 2) @(posedge clk);
    err_inject[6][PORT_E] = '0;
    repeat (3) @(posedge clk);
    check(sum_bad() == 0, "packets with injected errors intact");
    check(g_c[15].snk.n_ok >= 1 && g_c[4].snk.n_ok >= 1, "error packets delivered");
    check(n_single == 10, "single errors corrected (one per flit)");
    check(n_double == 6, "double errors detected (one per flit)");
    $display("mechanisms: contention=%0d turns=%0d loopback=%0d parallel=%0d stalls=%0d single=%0d double=%0d",
             n_cont, n_turn, n_loop, n_par, n_stall, n_single, n_double);
    check(n_cont > 0, "contention occurred");
    check(n_turn > 0, "X-to-Y turn occurred");
    check(n_loop > 0, "loopback occurred");
    check(n_par > 0, "parallel connections occurred");
    check(n_stall > 0, "receiver stall occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
