// tb_xy_route: exhaustive test of the XY routing decision. For every router
// position and destination of a 16 x 16 coordinate space the output port is
// compared with the rule: X first (east if larger, west if smaller), then Y
// (north if larger, south if smaller), local when both match.
module tb_xy_route;
  import noc_pkg::*;
  logic [3:0] xr, yr, dst_x, dst_y;
  port_e out_port;
  logic [4:0] out_onehot;
  int checks = 0, failures = 0;

  xy_route dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 16; c++)
          for (int d = 0; d < 16; d++) begin
            int exp_p;
            xr = 4'(a); yr = 4'(b); dst_x = 4'(c); dst_y = 4'(d);
            #1;
            if (c > a) exp_p = 2;        // east
            else if (c < a) exp_p = 4;   // west
            else if (d > b) exp_p = 1;   // north
            else if (d < b) exp_p = 3;   // south
            else exp_p = 0;              // local
            checks++;
            if (int'(out_port) != exp_p || out_onehot != 5'(1 << exp_p)) begin
              failures++;
              if (failures < 10)
                $display("FAIL xr=%0d yr=%0d dx=%0d dy=%0d got %0d exp %0d", a, b, c, d, out_port, exp_p);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
