// ntru_modp_lut: last step of decryption for one coefficient, look-up method.
// Input a is a coefficient of f*e taken mod q = 2^LOGQ; output m is the
// centre-lifted value of a reduced mod p, as a residue 0 .. p-1.
//
// The whole map is one read-only table of 2^LOGQ words of LOGP bits
// (128 x 2 bits by default), one table per coefficient. Its contents are
//     ROM[a] = ((a > q/2 ? a - q : a) mod p), taken in 0 .. p-1,
// computed at elaboration, so any small p works (the table grows with q).
// The block is purely combinational (an asynchronous ROM read).
module ntru_modp_lut #(
  parameter int unsigned LOGQ = 7,
  parameter int unsigned P    = 3,
  parameter int unsigned LOGP = $clog2(P)
) (
  input  logic [LOGQ-1:0] a,
  output logic [LOGP-1:0] m
);

  localparam int unsigned Q = 1 << LOGQ;

  typedef logic [LOGP-1:0] rom_t [Q];

  function automatic rom_t build_rom();
    rom_t t;
    int   v;
    for (int i = 0; i < int'(Q); i++) begin
      v = (i > int'(Q / 2)) ? i - int'(Q) : i;
      v = v % int'(P);
      if (v < 0) v = v + int'(P);
      t[i] = LOGP'(v);
    end
    return t;
  endfunction

  localparam rom_t ROM = build_rom();

  assign m = ROM[a];

endmodule
