// ntru_pkg: constants and types shared by the NTRUEncrypt engine.
//
// The defaults describe the (N, p, q) = (251, 3, 128) "standard security"
// parameter set that the engine is built for: q is a power of two, so every
// reduction mod q is a plain truncation to LOGQ bits, and p = 3 is a Mersenne
// number (2^2 - 1), which the Mersenne mod-p reducer relies on. The ephemeral
// key r and the private-key part f1 are ternary with d = 36 coefficients equal
// to +1 and 36 equal to -1, i.e. NNZ = 2d = 72 non-zero locations.
// The shift reach S of the (N,s)-shifter is 8; S = 4 is the other configuration
// reported for this architecture and is a parameter change only.
package ntru_pkg;

  localparam int unsigned NTRU_N    = 251;  // ring degree, x^N - 1
  localparam int unsigned NTRU_P    = 3;    // small modulus
  localparam int unsigned NTRU_LOGQ = 7;    // q = 2^LOGQ = 128
  localparam int unsigned NTRU_D    = 36;   // r, f1 in tau(d, d)
  localparam int unsigned NTRU_NNZ  = 2 * NTRU_D;
  localparam int unsigned NTRU_S    = 8;    // maximum shift per clock

  // Bits needed to hold one coefficient of a polynomial in R_p.
  localparam int unsigned NTRU_LOGP = $clog2(NTRU_P);
  // Bits needed to hold one location 0..N-1.
  localparam int unsigned NTRU_LOGN = $clog2(NTRU_N);

  // Mod-p reduction method used on decryption.
  typedef enum logic {
    MODP_MERSENNE = 1'b0,   // fold LOG2(p+1)-bit sections until the value is <= p
    MODP_LUT      = 1'b1    // one 2^LOGQ x LOGP ROM per coefficient
  } modp_method_e;

  // Host commands.
  typedef enum logic [1:0] {
    CMD_LOAD_H = 2'd0,   // public key h: LOGQ bit-planes on din
    CMD_LOAD_F = 2'd1,   // private key f1 (f = 1 + p*f1): LOGN+1 planes on loc_in
    CMD_ENC    = 2'd2,   // r on loc_in, then m on din; e comes out on dout
    CMD_DEC    = 2'd3    // e on din; m comes out on dout
  } ntru_cmd_e;

endpackage
