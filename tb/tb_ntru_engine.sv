// tb_ntru_engine: end-to-end test of the engine at its default parameters
// (N = 251, p = 3, q = 128, 72 non-zero locations, S = 8, Mersenne mod p).
//
// The testbench generates a real NTRU key pair (f = 1 + 3*f1 with f1 and g in
// tau(36,36), h = f^-1 * g mod q), loads h and f1 through the bit-plane pins,
// and then runs encryptions and decryptions. Every ciphertext is compared with
// e = 3*(r*h) + m mod q computed here, every decryption with centre-lift(f*e)
// mod 3, and every accept-to-first-output latency with
// (LOGN+1) + LOGP + T_conv + 3 (ENC) or LOGQ + T_conv + 3 (DEC).
// Decrypting the engine's own ciphertexts must give m back whenever f*e has
// no coefficient outside the centred range (the testbench checks that too).
// Coverage counters must all be non-zero: key loads, ENC, DEC, full-reach
// shift clocks, partial-shift clocks, a location 0 (no shift), subtractions,
// lifted-negative coefficients, round trips, back-to-back commands and
// commands held while the engine is busy.
module tb_ntru_engine;
  import ntru_pkg::*;
  import ntru_tb_pkg::*;

  localparam int N = 251, P = 3, LOGQ = 7, Q = 128, NNZ = 72, D = 36, S = 8;
  localparam int LOGN = 8, LOGP = 2;

  logic clk = 0, rst_n = 0, cmd_valid = 0;
  ntru_cmd_e cmd = CMD_LOAD_H;
  logic ready, dout_valid;
  logic [N-1:0]   din = '0, dout;
  logic [NNZ-1:0] loc_in = '0;

  ntru_engine dut (.clk, .rst_n, .cmd_valid, .cmd, .ready, .din, .loc_in, .dout, .dout_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_load_h = 0, n_load_f = 0, n_enc = 0, n_dec = 0, n_full_shift = 0, n_part_shift = 0;
  int n_zero_loc = 0, n_sub = 0, n_lift_neg = 0, n_roundtrip = 0, n_back2back = 0, n_held = 0;

  // Clock-level coverage taken from inside the design.
  always @(posedge clk) if (rst_n && dut.u_conv.busy) begin
    if (dut.u_conv.gap_zero) n_zero_loc++;
    else if (dut.u_conv.step == LOGN'(S)) n_full_shift++;
    else n_part_shift++;
    if (dut.u_conv.gap_last && dut.u_conv.neg[dut.u_conv.idx]) n_sub++;
  end
  always @(posedge clk) if (rst_n && !ready && cmd_valid) n_held++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Accept a command; returns with the first data plane due in the next clock.
  bit keep_valid = 0;
  task automatic issue(ntru_cmd_e c);
    @(negedge clk);
    if (ready && keep_valid) n_back2back++;
    while (!ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = keep_valid;        // held high while busy must be ignored
    cmd = CMD_LOAD_H;
  endtask

  // Drive a polynomial with LOGQ or LOGP bit-planes on din (first plane is
  // driven now, right after the accepting clock).
  task automatic send_dense(input poly_t a, int bits);
    for (int b = 0; b < bits; b++) begin
      for (int k = 0; k < N; k++) din[k] = a[k][b];
      @(negedge clk);
    end
    din = '0;
  endtask

  task automatic send_list(input list_t loc, input list_t sgn);
    for (int b = 0; b <= LOGN; b++) begin
      for (int i = 0; i < NNZ; i++)
        loc_in[i] = (b < LOGN) ? loc[i][b] : (sgn[i] < 0);
      @(negedge clk);
    end
    loc_in = '0;
  endtask

  // Collect 'bits' output planes; returns clocks waited before the first.
  task automatic receive(int bits, output poly_t a, output int wait_clks);
    wait_clks = 0;
    for (int k = 0; k < MAXN; k++) a[k] = 0;
    while (!dout_valid) begin wait_clks++; @(negedge clk); end
    for (int b = 0; b < bits; b++) begin
      check("dout_valid held", int'(dout_valid), 1);
      for (int k = 0; k < N; k++) a[k] |= int'(dout[k]) << b;
      @(negedge clk);
    end
    cmd_valid = 0;                 // withdraw a held request before idle
    check("dout_valid drops", int'(dout_valid), 0);
  endtask

  poly_t f1, f, g, fq, h, hq, fl_loc_p;
  list_t f_loc, f_sgn;

  task automatic do_enc(input poly_t m, output poly_t e_out, output poly_t r, input bit force_zero);
    poly_t rh, e_exp;
    list_t r_loc, r_sgn;
    int cnt, lat, tconv;
    rand_ternary(N, D, D, r);
    if (force_zero && r[0] == 0) begin
      // move one non-zero coefficient to location 0
      for (int i = 1; i < N; i++) if (r[i] != 0) begin r[0] = r[i]; r[i] = 0; break; end
    end
    cnt = to_list(N, r, r_loc, r_sgn);
    tconv = t_conv(cnt, r_loc, S);
    conv(N, r, h, rh);
    for (int k = 0; k < N; k++) e_exp[k] = modq(P * rh[k] + ((m[k] == 2) ? -1 : m[k]), Q);
    issue(CMD_ENC);
    send_list(r_loc, r_sgn);
    send_dense(m, LOGP);
    receive(LOGQ, e_out, lat);
    n_enc++;
    // LOGN+1 + LOGP planes have been sent since the accepting clock
    check("enc latency", LOGN + 1 + LOGP + 1 + lat, LOGN + 1 + LOGP + tconv + 3);
    for (int k = 0; k < N; k++) check($sformatf("e[%0d]", k), e_out[k], e_exp[k]);
  endtask

  task automatic do_dec(input poly_t e, output poly_t m_out);
    poly_t a, m_exp;
    int lat, tconv;
    conv(N, f, e, a);
    for (int k = 0; k < N; k++) begin
      m_exp[k] = lift_modp(modq(a[k], Q), Q, P);
      if (modq(a[k], Q) > Q / 2) n_lift_neg++;
    end
    tconv = t_conv(2 * D, f_loc, S);
    issue(CMD_DEC);
    send_dense(e, LOGQ);
    receive(LOGP, m_out, lat);
    n_dec++;
    check("dec latency", LOGQ + 1 + lat, LOGQ + tconv + 3);
    for (int k = 0; k < N; k++) check($sformatf("m[%0d]", k), m_out[k], m_exp[k]);
  endtask

  initial begin
    poly_t m, e, r, mo, e_rand, a_int, tmp1, tmp2;
    bit ok;
    int maxabs, vabs;
    int n_rt_skip;
    n_rt_skip = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---- key generation -------------------------------------------------
    do begin
      rand_ternary(N, D, D, f1);
      for (int k = 0; k < MAXN; k++) f[k] = 3 * f1[k];
      f[0] += 1;
      ok = invert_q(N, LOGQ, f, fq);
    end while (!ok);
    rand_ternary(N, D, D, g);
    conv(N, fq, g, hq);
    for (int k = 0; k < N; k++) h[k] = modq(hq[k], Q);
    // sanity of the reference: f * h == g mod q
    conv(N, f, h, tmp1);
    for (int k = 0; k < N; k++) check("keygen f*h=g", modq(tmp1[k], Q), modq(g[k], Q));
    void'(to_list(N, f1, f_loc, f_sgn));

    issue(CMD_LOAD_H); send_dense(h, LOGQ);   n_load_h++;
    issue(CMD_LOAD_F); send_list(f_loc, f_sgn); n_load_f++;

    // ---- encrypt / decrypt rounds ------------------------------------------
    for (int rep = 0; rep < 10; rep++) begin
      keep_valid = (rep % 2 == 1);
      // even rounds: dense messages; odd rounds: sparse ones (1 in 8
      // coefficients non-zero), which keep f*e inside the centred range
      for (int k = 0; k < MAXN; k++)
        m[k] = (k >= N) ? 0 : (rep % 2 == 0) ? $urandom_range(2, 0)
             : ($urandom_range(7, 0) == 0) ? $urandom_range(2, 1) : 0;
      do_enc(m, e, r, rep == 0);
      do_dec(e, mo);
      // round trip: guaranteed when the exact a = 3*r*g + f*m over Z stays
      // inside the centred range (-q/2, q/2]
      for (int k = 0; k < N; k++) tmp2[k] = (m[k] == 2) ? -1 : m[k];
      conv(N, f, tmp2, tmp1);
      conv(N, r, g, a_int);
      maxabs = 0;
      for (int k = 0; k < N; k++) begin
        vabs = P * a_int[k] + tmp1[k];
        if (vabs < 0) vabs = -vabs;
        if (vabs > maxabs) maxabs = vabs;
      end
      if (maxabs < Q / 2) begin
        n_roundtrip++;
        for (int k = 0; k < N; k++) check("round trip", mo[k], m[k]);
      end else n_rt_skip++;
      // decryption of an arbitrary ciphertext exercises every lift case
      for (int k = 0; k < MAXN; k++) e_rand[k] = (k < N) ? $urandom_range(Q - 1, 0) : 0;
      do_dec(e_rand, mo);
    end
    keep_valid = 0;
    cmd_valid = 0;

    check("cover LOAD_H", int'(n_load_h > 0), 1);
    check("cover LOAD_F", int'(n_load_f > 0), 1);
    check("cover ENC", int'(n_enc > 0), 1);
    check("cover DEC", int'(n_dec > 0), 1);
    check("cover full-reach shift", int'(n_full_shift > 0), 1);
    check("cover partial shift", int'(n_part_shift > 0), 1);
    check("cover location 0", int'(n_zero_loc > 0), 1);
    check("cover subtraction", int'(n_sub > 0), 1);
    check("cover lifted negative", int'(n_lift_neg > 0), 1);
    check("cover round trip", int'(n_roundtrip > 0), 1);
    check("cover back-to-back", int'(n_back2back > 0), 1);
    check("cover command while busy", int'(n_held > 0), 1);
    $display("round trips skipped (f*e outside the centred range): %0d, max |a| last %0d", n_rt_skip, maxabs);
    $display("coverage: loadh=%0d loadf=%0d enc=%0d dec=%0d full=%0d part=%0d zero=%0d sub=%0d liftneg=%0d rt=%0d b2b=%0d held=%0d",
             n_load_h, n_load_f, n_enc, n_dec, n_full_shift, n_part_shift, n_zero_loc, n_sub,
             n_lift_neg, n_roundtrip, n_back2back, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
