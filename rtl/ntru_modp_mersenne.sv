// ntru_modp_mersenne: last step of decryption for one coefficient, Mersenne
// method. Input a is a coefficient of f*e taken mod q = 2^LOGQ; output m is the
// centre-lifted value of a, reduced mod p, as a residue 0 .. p-1.
//
// The reducer needs p = 2^K - 1 (p = 3, K = 2 by default). Since 2^K = 1 mod p,
// a number can be cut into K-bit sections c_i | ... | c_1 | c_0 whose sum has
// the same residue; the fold is repeated while the value exceeds p. The loop is
// unrolled into a fixed cascade of adders (LOGQ+1 folds always suffice), and a
// final value equal to p is mapped to 0, since the fold only stops once the
// value is <= p.
// Centre-lifting maps a > q/2 to a - q, so those inputs need -q mod p added;
// that constant is added to the folded residue and the fold repeated.
// The block is purely combinational.
module ntru_modp_mersenne #(
  parameter int unsigned LOGQ = 7,
  parameter int unsigned P    = 3,
  parameter int unsigned LOGP = $clog2(P)
) (
  input  logic [LOGQ-1:0] a,
  output logic [LOGP-1:0] m
);

  localparam int unsigned K     = $clog2(P + 1);        // section width
  localparam int unsigned Q     = 1 << LOGQ;
  localparam int unsigned NEG_Q = (P - (Q % P)) % P;    // (-q) mod p
  localparam int unsigned BW    = LOGQ + 2;             // working width
  localparam int unsigned NSEC  = (BW + K - 1) / K;

  initial begin
    assert ((1 << K) == P + 1) else $error("ntru_modp_mersenne: p must be 2^K - 1");
  end

  // One fold: sum of the K-bit sections of x.
  function automatic logic [BW-1:0] fold(input logic [BW-1:0] x);
    logic [BW-1:0] sum;
    logic [BW-1:0] rest;
    sum  = '0;
    rest = x;
    for (int unsigned i = 0; i < NSEC; i++) begin
      sum  = sum + BW'(rest[K-1:0]);
      rest = rest >> K;
    end
    return sum;
  endfunction

  // Reduce x to 0 .. p-1 by folding while x > p.
  function automatic logic [BW-1:0] reduce(input logic [BW-1:0] x);
    logic [BW-1:0] b;
    b = x;
    for (int unsigned it = 0; it <= LOGQ; it++)
      if (b > BW'(P)) b = fold(b);
    if (b == BW'(P)) b = '0;
    return b;
  endfunction

  logic          lifted_neg;
  logic [BW-1:0] r0, r1;

  always_comb begin
    lifted_neg = (a > LOGQ'(Q / 2));
    r0 = reduce(BW'(a));
    r1 = lifted_neg ? reduce(r0 + BW'(NEG_Q)) : r0;
    m  = LOGP'(r1);
  end

endmodule
