// tb_hamming_dec: test of hamming_dec. Code words are built with the same
// explicit position table as tb_hamming (not with the encoder). For every
// flit value it checks: the clean word decodes with no flag; each of the 13
// single-bit flips is corrected and flagged single; a random double flip is
// flagged double and not single.
module tb_hamming_dec;
  logic [12:0] code;
  logic [7:0]  data;
  logic        single_err, double_err;
  int checks = 0, failures = 0;

  hamming_dec dut (.*);

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

  task automatic check(bit cond, string what, logic [7:0] v);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s data=%h", what, v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [12:0] c;
      c = ref_code(8'(v));
      code = c; #1;
      check(data == 8'(v) && !single_err && !double_err, "clean", 8'(v));
      for (int b = 0; b < 13; b++) begin
        code = c ^ (13'(1) << b); #1;
        check(data == 8'(v) && single_err && !double_err, "single", 8'(v));
      end
      begin
        int b1, b2;
        b1 = $urandom % 13;
        b2 = (b1 + 1 + $urandom % 12) % 13;
        code = c ^ (13'(1) << b1) ^ (13'(1) << b2); #1;
        check(double_err && !single_err, "double", 8'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
