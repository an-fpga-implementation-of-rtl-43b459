// ntru_engine: NTRUEncrypt encryption/decryption engine for q = 2^LOGQ.
//
// Encryption computes e = p * (r * h) + m mod q and decryption computes
// a = f * e mod q, centre-lifts a and returns m = a mod p. The private key is
// taken in the form f = 1 + p*f1, so that F_p = f^-1 mod p = 1 and decryption
// needs no second polynomial product; then f * e = e + p * (f1 * e), and both
// operations reduce to the same datapath:
//     result = addend + p * (t * b) mod q
// with (t, b, addend) = (r, h, m) for encryption and (f1, e, e) for decryption.
// t is sparse and ternary and is given as its NNZ sorted non-zero locations,
// so t * b is formed by ntru_conv in T_conv(S) = sum ceil(gap/S) clocks
// using the (N,s)-shifter instead of N clocks.
//
// All polynomial traffic is bit-plane parallel: din/dout carry bit j of all N
// coefficients in one clock, least significant plane first; loc_in carries
// bit j of all NNZ locations in one clock, LOGN location planes followed by
// one sign plane (1 = coefficient -1). Plaintext coefficients are residues
// 0, 1, 2 of R_3 (2 meaning -1; encryption adds it as q-1).
//
// Host protocol: issue a command with cmd_valid while ready is high. The data
// planes of that command occupy the clocks right after the accepting clock
// (see ntru_ctrl for the phase lengths); ready stays low until the command's
// last output plane has been sent. Load h once (CMD_LOAD_H) and f1 once
// (CMD_LOAD_F); then any mix of CMD_ENC and CMD_DEC. The output planes appear
// with dout_valid high, LOGQ planes of e after CMD_ENC and LOGP planes of m
// after CMD_DEC.
//
// MODP selects the mod-p reducer built for decryption: section folding for a
// Mersenne p (ntru_modp_mersenne) or one ROM per coefficient (ntru_modp_lut).
//
// The bit-plane transfers and their clock counts, the sparse convolution with
// a limited-reach shifter, f = 1 + p*f1 and the two mod-p methods follow the
// published architecture. The command handshake, the separate location bus,
// LSB-first plane order, sign polarity and the centred reading of plaintext
// residue 2 as -1 are this design's own choices.
module ntru_engine
  import ntru_pkg::*;
#(
  parameter int unsigned  N    = NTRU_N,
  parameter int unsigned  P    = NTRU_P,
  parameter int unsigned  LOGQ = NTRU_LOGQ,
  parameter int unsigned  NNZ  = NTRU_NNZ,
  parameter int unsigned  S    = NTRU_S,
  parameter modp_method_e MODP = MODP_MERSENNE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  input  ntru_cmd_e       cmd,
  output logic            ready,
  input  logic [N-1:0]    din,
  input  logic [NNZ-1:0]  loc_in,
  output logic [N-1:0]    dout,
  output logic            dout_valid
);

  localparam int unsigned LOGP = $clog2(P);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned LW   = LOGN + 1;      // location bits + sign bit

  typedef logic [N-1:0][LOGQ-1:0] polyq_t;

  // ---- control -----------------------------------------------------------
  logic en_h, en_f, en_r, en_m, en_e;
  logic conv_load_b, conv_start, conv_done, conv_busy, mode_dec;
  logic res_load, out_shift;

  ntru_ctrl #(.LOGQ(LOGQ), .LOGP(LOGP), .LOGN(LOGN)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .ready,
    .en_h, .en_f, .en_r, .en_m, .en_e,
    .conv_load_b, .conv_start, .conv_done, .mode_dec,
    .res_load, .out_shift, .dout_valid
  );

  // ---- bit-plane input registers ------------------------------------------
  polyq_t                   h_reg, e_reg;
  logic [N-1:0][LOGP-1:0]   m_reg;
  logic [NNZ-1:0][LW-1:0]   r_list, f_list;

  ntru_plane_sipo #(.LANES(N),   .BITS(LOGQ)) u_h (.clk, .rst_n, .en(en_h), .plane_in(din),    .q(h_reg));
  ntru_plane_sipo #(.LANES(N),   .BITS(LOGQ)) u_e (.clk, .rst_n, .en(en_e), .plane_in(din),    .q(e_reg));
  ntru_plane_sipo #(.LANES(N),   .BITS(LOGP)) u_m (.clk, .rst_n, .en(en_m), .plane_in(din),    .q(m_reg));
  ntru_plane_sipo #(.LANES(NNZ), .BITS(LW))   u_r (.clk, .rst_n, .en(en_r), .plane_in(loc_in), .q(r_list));
  ntru_plane_sipo #(.LANES(NNZ), .BITS(LW))   u_f (.clk, .rst_n, .en(en_f), .plane_in(loc_in), .q(f_list));

  // ---- sparse convolution ------------------------------------------------------
  logic [NNZ-1:0][LOGN-1:0] t_loc;
  logic [NNZ-1:0]           t_neg;
  polyq_t                   b_sel, acc;

  always_comb begin
    for (int unsigned i = 0; i < NNZ; i++) begin
      t_loc[i] = mode_dec ? f_list[i][LOGN-1:0] : r_list[i][LOGN-1:0];
      t_neg[i] = mode_dec ? f_list[i][LOGN]     : r_list[i][LOGN];
    end
    b_sel = mode_dec ? e_reg : h_reg;
  end

  ntru_conv #(.N(N), .W(LOGQ), .S(S), .NNZ(NNZ), .LOGN(LOGN)) u_conv (
    .clk, .rst_n,
    .load_b  (conv_load_b),
    .b_in    (b_sel),
    .start   (conv_start),
    .loc     (t_loc),
    .neg     (t_neg),
    .busy    (conv_busy),
    .done    (conv_done),
    .acc_out (acc)
  );

  // ---- result = addend + p * acc mod q, then mod p for decryption ---------
  polyq_t                 sum, res;
  logic [N-1:0][LOGP-1:0] m_out;

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      logic [LOGQ-1:0] add;
      if (mode_dec)
        add = e_reg[j];
      else if (m_reg[j] == LOGP'(1))
        add = LOGQ'(1);
      else if (m_reg[j] == LOGP'(P - 1))
        add = '1;                               // -1 mod q
      else
        add = '0;
      sum[j] = add + LOGQ'(P * acc[j]);
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_modp
    if (MODP == MODP_LUT) begin : g_lut
      ntru_modp_lut #(.LOGQ(LOGQ), .P(P), .LOGP(LOGP)) u_red (.a(sum[j]), .m(m_out[j]));
    end else begin : g_mers
      ntru_modp_mersenne #(.LOGQ(LOGQ), .P(P), .LOGP(LOGP)) u_red (.a(sum[j]), .m(m_out[j]));
    end
    assign res[j] = mode_dec ? LOGQ'(m_out[j]) : sum[j];
  end

  ntru_plane_piso #(.LANES(N), .BITS(LOGQ)) u_out (
    .clk, .rst_n,
    .load      (res_load),
    .shift     (out_shift),
    .d         (res),
    .plane_out (dout)
  );

  // A new command is only taken while the engine is idle.
  a_idle_when_ready : assert property (@(posedge clk) disable iff (!rst_n)
      ready |-> !conv_busy && !dout_valid)
    else $error("ntru_engine: ready while busy");

endmodule
