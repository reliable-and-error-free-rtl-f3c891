// tb_crossbar: test of the 5x5 multiplexer/demultiplexer crossbar with random
// code words, valid bits, selects and enables (half of the demultiplexer
// settings made to agree with a multiplexer): an output must show the input
// it selects exactly when that input's demultiplexer also points at it, and
// zero with valid low otherwise. A permutation step checks five simultaneous
// connections.
module tb_crossbar;
  import noc_pkg::*;
  logic [4:0][12:0] in_data, out_data;
  logic [4:0]       in_valid, out_valid, mux_en;
  logic [4:0][2:0]  mux_sel, demux_sel;
  logic [4:0]       demux_en;
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int q = 0; q < 5; q++) begin
      checks++;
      if (mux_en[q] && demux_en[mux_sel[q]] && demux_sel[mux_sel[q]] == 3'(q)) begin
        if (out_data[q] != in_data[mux_sel[q]] || out_valid[q] != in_valid[mux_sel[q]]) begin
          failures++; $display("FAIL out %0d sel %0d", q, mux_sel[q]);
        end
      end else if (out_data[q] != '0 || out_valid[q]) begin
        failures++; $display("FAIL idle out %0d", q);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int p = 0; p < 5; p++) begin
        in_data[p] = 13'($urandom);
        mux_sel[p] = 3'($urandom % 5);
      end
      for (int p = 0; p < 5; p++) demux_sel[p] = 3'($urandom % 5);
      for (int q = 0; q < 5; q++) if ($urandom % 2) demux_sel[mux_sel[q]] = 3'(q);
      in_valid = 5'($urandom);
      mux_en = 5'($urandom);
      demux_en = 5'($urandom);
      #1;
      check_all();
    end
    // five parallel connections: out q <- in (q+1)%5
    for (int p = 0; p < 5; p++) begin
      in_data[p] = 13'(100 + p);
      mux_sel[p] = 3'((p + 1) % 5);
      demux_sel[(p + 1) % 5] = 3'(p);
    end
    in_valid = '1; mux_en = '1; demux_en = '1; #1;
    for (int q = 0; q < 5; q++) begin
      checks++;
      if (out_data[q] != 13'(100 + (q + 1) % 5)) begin failures++; $display("FAIL perm %0d", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
