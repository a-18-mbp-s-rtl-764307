// sym_interleaver: address generator of the symbol interleaver.
//
// The interleaver permutes 2-bit symbols (information pairs), never the bits
// inside a symbol, so the radix-4 decoders see whole pairs in both orders.
// The permutation is the linear congruential rule
//   pi(j) = (A * j + B) mod NS
// which is a bijection on 0..NS-1 whenever gcd(A, NS) = 1 (checked at
// elaboration). Decoder 2 reads and writes the natural-order memories at
// pi(j) when it works on its j-th symbol. Purely combinational.
// Interleaving whole symbols follows the published design; the published
// random permutation is not available, so the linear rule is this design's.
module sym_interleaver #(
  parameter int unsigned NS = 106,
  parameter int unsigned A  = 31,
  parameter int unsigned B  = 7,
  localparam int unsigned AW = $clog2(NS)
) (
  input  logic [AW-1:0] j,
  output logic [AW-1:0] pi
);
  function automatic int unsigned gcd(input int unsigned x, input int unsigned y);
    int unsigned a, b, t;
    a = x;
    b = y;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  if (gcd(A, NS) != 1) begin : g_bad_a
    $error("sym_interleaver: A must be coprime with NS");
  end

  logic [AW+8:0] prod;
  always_comb begin
    prod = (AW+9)'(j) * (AW+9)'(A) + (AW+9)'(B);
    pi   = AW'(prod % (AW+9)'(NS));
  end
endmodule
