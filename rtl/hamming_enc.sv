// hamming_enc: Hamming SECDED encoder for one flit.
//
// Code-word bit p (p = 1 .. K+R) is Hamming position p. Positions that are
// powers of two (1, 2, 4, 8) hold parity bits; the data bits fill the other
// positions in ascending order, data bit 0 at position 3. Parity bit 2**i is
// the XOR of every position whose binary number has bit i set, so parity 1
// covers positions 1, 3, 5, 7, 9, 11 and parity 2 covers 2, 3, 6, 7, 10, 11.
// Bit 0 is an overall parity bit over positions 1 .. K+R, added so the
// decoder can tell a double error from a single one. For the 8-bit flit this
// is a (13,8) code. Purely combinational.
module hamming_enc #(
  parameter int unsigned K = noc_pkg::FLIT_W,
  parameter int unsigned R = noc_pkg::ham_parity_bits(K),
  parameter int unsigned N = K + R + 1
) (
  input  logic [K-1:0] data,
  output logic [N-1:0] code
);

  always_comb begin
    logic [N-1:0] c;
    int unsigned  d;
    c = '0;
    d = 0;
    // Scatter data bits over the non-power-of-two positions.
    for (int unsigned p = 1; p < N; p++) begin
      if ((p & (p - 1)) != 0) begin
        c[p] = data[d];
        d++;
      end
    end
    // Parity bit at position 2**i covers every position with bit i set.
    for (int unsigned i = 0; i < R; i++) begin
      logic par;
      par = 1'b0;
      for (int unsigned p = 1; p < N; p++)
        if (((p >> i) & 1) != 0) par ^= c[p];
      c[1 << i] = par;
    end
    c[0] = ^c[N-1:1];
    code = c;
  end

endmodule
