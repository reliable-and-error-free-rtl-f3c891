// tb_input_channel: test of one input channel at router position (5, 7).
// A tb_link_src plays packets of 1 to 16 flits with random destinations. The
// test checks: ack rises exactly one cycle after req and no flit is lost;
// exactly the XY-routed output is requested, at most 3 cycles after the
// packet end; nothing leaves before a grant; under a grant (given after a
// random delay) one flit per cycle appears on the crossbar as a valid
// (13,8) code word, in order and unchanged; the request falls after the last
// flit and the channel then accepts the next packet.
module tb_input_channel;
  import noc_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] xr = 4'd5, yr = 4'd7;
  logic req_in, ack_in;
  flit_t data_in;
  logic [4:0] req_out;
  logic gnt_in = 0;
  code_t xbar_data;
  logic xbar_valid;
  int checks = 0, failures = 0;

  input_channel dut (.*);
  tb_link_src src (.clk, .rst, .req(req_in), .data(data_in), .ack(ack_in));

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

  // ack timing: ack must follow req by exactly one cycle when the channel is idle
  logic req_d, ack_d;
  always @(posedge clk) begin
    req_d <= req_in; ack_d <= ack_in;
    if (!rst && req_in && !req_d && !ack_in) begin
      @(posedge clk); #1;
      check(ack_in, "ack one cycle after req");
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 200; n++) begin
      logic [3:0] dx, dy;
      int len, exp_p, wait_c, got;
      logic [7:0] exp_f [];
      dx  = (n < 5) ? 4'(n == 0 ? 6 : n == 1 ? 4 : 5) : 4'($urandom);
      dy  = (n == 2) ? 4'd8 : (n == 3) ? 4'd6 : (n == 4) ? 4'd7 : 4'($urandom);
      len = (n == 0) ? 16 : (n == 1) ? 1 : 1 + $urandom % 15;
      src.push(dx, dy, n, n, len);
      // expected flits
      exp_f = new[len];
      exp_f[0] = {dx, dy};
      if (len > 1) exp_f[1] = 8'(n);
      if (len > 2) exp_f[2] = 8'(n);
      if (len > 3) exp_f[3] = 8'(len);
      for (int i = 4; i < len; i++) exp_f[i] = pkt_byte(n, n, i);
      if (dx > xr) exp_p = 2; else if (dx < xr) exp_p = 4;
      else if (dy > yr) exp_p = 1; else if (dy < yr) exp_p = 3; else exp_p = 0;
      // wait for the end of reception
      wait (src.st == src.WAITACK);
      wait (req_in == 1'b0);
      for (int c = 0; c < 3 && req_out == '0; c++) @(posedge clk);
      #1;
      check(req_out == 5'(1 << exp_p), "routed request");
      check(xbar_valid == 1'b0, "no transfer before grant");
      wait_c = $urandom % 4;
      repeat (wait_c) begin @(posedge clk); #1; check(req_out == 5'(1 << exp_p) && !xbar_valid, "request held"); end
      @(negedge clk);
      gnt_in = 1;
      #1;
      got = 0;
      while (xbar_valid) begin
        check(got < len && xbar_data == ref_code(exp_f[got]), "flit on crossbar");
        got++;
        @(negedge clk); #1;
      end
      check(got == len, "flit count"); if (got != len) $display("got %0d len %0d", got, len);
      @(posedge clk); #1;
      check(req_out == '0, "request dropped");
      @(negedge clk);
      gnt_in = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
