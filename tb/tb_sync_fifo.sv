// tb_sync_fifo: self-checking test of sync_fifo at its default 16 x 8 size.
// Random pushes and pops (including while full or empty) are compared with a
// queue model: head data, empty, full and count after every clock edge.
module tb_sync_fifo;
  localparam int W = 8, D = 16;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int saw_full = 0;

  sync_fifo dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      int mode;
      mode = (n / 300) % 3;   // phases biased to fill, to drain, balanced
      @(negedge clk);
      wr_en   = (mode == 0) ? ($urandom % 4 != 0) : (mode == 1) ? ($urandom % 4 == 0) : $urandom % 2;
      rd_en   = (mode == 0) ? ($urandom % 4 == 0) : (mode == 1) ? ($urandom % 4 != 0) : $urandom % 2;
      wr_data = W'($urandom);
      // model update as of the coming edge
      @(posedge clk);
      begin
        bit do_r, do_w;
        do_r = rd_en && model.size() > 0;
        do_w = wr_en && model.size() < D;
        if (do_r) void'(model.pop_front());
        if (do_w) model.push_back(wr_data);
      end
      #1;
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      if (full) saw_full++;
    end
    check(saw_full > 0, "reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
