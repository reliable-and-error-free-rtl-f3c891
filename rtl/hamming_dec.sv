// hamming_dec: Hamming SECDED decoder and single-error corrector.
//
// Takes a code word in the layout of hamming_enc. The syndrome is the XOR of
// the position numbers of all set bits in positions 1 .. K+R; with the overall
// parity bit it classifies the word:
//   syndrome 0, parity even  -> no error
//   parity odd               -> single error at position `syndrome` (0 means
//                               the overall parity bit itself), corrected
//   syndrome != 0, parity even -> double error, detected, not corrected
// data is the (corrected) data field. single_err and double_err are the
// classification. Purely combinational.
module hamming_dec #(
  parameter int unsigned K = noc_pkg::FLIT_W,
  parameter int unsigned R = noc_pkg::ham_parity_bits(K),
  parameter int unsigned N = K + R + 1
) (
  input  logic [N-1:0] code,
  output logic [K-1:0] data,
  output logic         single_err,
  output logic         double_err
);

  always_comb begin
    logic [R-1:0] syn;
    logic         par;
    logic [N-1:0] c;
    int unsigned  d;
    syn = '0;
    for (int unsigned p = 1; p < N; p++)
      if (code[p]) syn ^= R'(p);
    par = ^code;
    single_err = par;
    double_err = !par && (syn != '0);
    c = code;
    if (par && (int'(syn) < int'(N))) c[syn] = !c[syn];
    data = '0;
    d = 0;
    for (int unsigned p = 1; p < N; p++) begin
      if ((p & (p - 1)) != 0) begin
        data[d] = c[p];
        d++;
      end
    end
  end

endmodule
