// tb_rr_arbiter: test of rr_arbiter with five requesters.
// 1. The contention case of the port table: all five request continuously and
//    the grant must rotate 0,1,2,3,4,0,... one requester per round.
// 2. Random requests and random update strobes compared with a reference
//    round-robin model: the requester served last has the lowest priority.
// Also checks that a grant falls as soon as its request is withdrawn.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst = 1;
  logic [N-1:0] req = '0, grant, grant_enable;
  logic update = 0;
  logic [2:0] winner_idx;
  int checks = 0, failures = 0;
  int ptr;   // model: index of the current grant enable

  rr_arbiter dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: req=%b grant=%b ptr=%0d", what, $time, req, grant, ptr);
    end
  endtask

  function automatic int model_next(logic [N-1:0] r, int p);
    for (int k = 1; k <= N; k++)
      if (r[(p + k) % N]) return (p + k) % N;
    return p;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ptr = N - 1;
    repeat (2) @(posedge clk);
    rst <= 0;
    // 1. full contention: rotation order
    @(negedge clk);
    req = '1;
    for (int r = 0; r < 10; r++) begin
      update = 1;
      @(posedge clk); #1;
      update = 0;
      ptr = model_next('1, ptr);
      check(grant == N'(1 << (r % N)), "rotation");
      check(int'(winner_idx) == r % N, "winner index");
      @(negedge clk);
    end
    // grant follows the request down
    req[ptr] = 1'b0; #1;
    check(grant == '0, "grant withdrawn");
    // 2. random
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req = N'($urandom);
      update = ($urandom % 2);
      @(posedge clk);
      if (update) ptr = model_next(req, ptr);
      #1;
      check(grant_enable == N'(1 << ptr), "enable");
      check(grant == (N'(1 << ptr) & req), "grant");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
