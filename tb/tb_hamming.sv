// tb_hamming: test of hamming_enc for all 256 flit values. The expected
// (13,8) code word is built independently from an explicit position table:
// data bits d0..d7 at positions 3,5,6,7,9,10,11,12; parity 1 over positions
// 3,5,7,9,11; parity 2 over 3,6,7,10,11; parity 4 over 5,6,7,12; parity 8
// over 9,10,11,12; bit 0 the XOR of all other bits.
module tb_hamming;
  logic [7:0]  data;
  logic [12:0] code;
  int checks = 0, failures = 0;

  hamming_enc dut (.data, .code);

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

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      data = 8'(v);
      #1;
      checks++;
      if (code !== ref_code(data)) begin
        failures++;
        $display("FAIL data=%h code=%h exp=%h", data, code, ref_code(data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
