// ntru_workload_run: testbench helper (not a testbench of its own). It drives
// one engine instance with shift reach S and mod-p method MODP through NRUNS
// encryptions of random messages under random ephemeral keys r in
// tau(36,36) for (N, p, q) = (251, 3, 128), checks every ciphertext against
// 3*(r*h) + m mod q, and measures T_conv from the accept-to-output latency
// (latency - (LOGN+1) - LOGP - 3). It reports the mean, minimum and maximum of
// T_conv and checks them against the expected statistics passed in
// (mean within +-MEAN_TOL clocks; every sample within [EXP_MIN, EXP_MAX + 1], the +1
// allowing for the extra clock of a location 0). It then decrypts NDEC random
// ciphertexts and checks them against centre-lift(f*e) mod 3.
module ntru_workload_run
  import ntru_pkg::*;
  import ntru_tb_pkg::*;
#(
  parameter int unsigned  S        = 8,
  parameter modp_method_e MODP     = MODP_MERSENNE,
  parameter int           NRUNS    = 1000,
  parameter int           NDEC     = 10,
  parameter real          EXP_MEAN = 76.85,
  parameter real          MEAN_TOL = 0.6,
  parameter int           EXP_MIN  = 72,
  parameter int           EXP_MAX  = 85
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = 251, P = 3, LOGQ = 7, Q = 128, NNZ = 72, D = 36;
  localparam int LOGN = 8, LOGP = 2;

  logic clk = 0, rst_n = 0, cmd_valid = 0;
  ntru_cmd_e cmd = CMD_LOAD_H;
  logic ready, dout_valid;
  logic [N-1:0]   din = '0, dout;
  logic [NNZ-1:0] loc_in = '0;

  ntru_engine #(.S(S), .MODP(MODP)) dut (
    .clk, .rst_n, .cmd_valid, .cmd, .ready, .din, .loc_in, .dout, .dout_valid);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL S=%0d %s: got %0d expected %0d", S, what, got, exp);
    end
  endtask

  task automatic issue(ntru_cmd_e c);
    @(negedge clk);
    while (!ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic send_dense(input poly_t a, int bits);
    for (int b = 0; b < bits; b++) begin
      for (int k = 0; k < N; k++) din[k] = a[k][b];
      @(negedge clk);
    end
    din = '0;
  endtask

  task automatic send_list(input list_t loc, input list_t sgn);
    for (int b = 0; b <= LOGN; b++) begin
      for (int i = 0; i < NNZ; i++) loc_in[i] = (b < LOGN) ? loc[i][b] : (sgn[i] < 0);
      @(negedge clk);
    end
    loc_in = '0;
  endtask

  task automatic receive(int bits, output poly_t a, output int wait_clks);
    wait_clks = 0;
    for (int k = 0; k < MAXN; k++) a[k] = 0;
    while (!dout_valid) begin wait_clks++; @(negedge clk); end
    for (int b = 0; b < bits; b++) begin
      for (int k = 0; k < N; k++) a[k] |= int'(dout[k]) << b;
      @(negedge clk);
    end
  endtask

  initial begin
    poly_t h, f1, f, m, r, rh, e, e_exp, a, mo;
    list_t r_loc, r_sgn, f_loc, f_sgn;
    int lat, tc, tc_formula, tmin, tmax, bad;
    real sum;
    checks = 0; failures = 0; done = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Statistics of T_conv do not depend on h: any h in R_q will do.
    for (int k = 0; k < MAXN; k++) h[k] = (k < N) ? $urandom_range(Q - 1, 0) : 0;
    issue(CMD_LOAD_H); send_dense(h, LOGQ);
    rand_ternary(N, D, D, f1);
    for (int k = 0; k < MAXN; k++) f[k] = 3 * f1[k];
    f[0] += 1;
    void'(to_list(N, f1, f_loc, f_sgn));
    issue(CMD_LOAD_F); send_list(f_loc, f_sgn);

    sum = 0.0; tmin = 1 << 30; tmax = 0;
    for (int run = 0; run < NRUNS; run++) begin
      rand_ternary(N, D, D, r);
      void'(to_list(N, r, r_loc, r_sgn));
      tc_formula = t_conv(NNZ, r_loc, S);
      for (int k = 0; k < MAXN; k++) m[k] = (k < N) ? $urandom_range(2, 0) : 0;
      conv(N, r, h, rh);
      for (int k = 0; k < N; k++) e_exp[k] = modq(P * rh[k] + ((m[k] == 2) ? -1 : m[k]), Q);
      issue(CMD_ENC);
      send_list(r_loc, r_sgn);
      send_dense(m, LOGP);
      receive(LOGQ, e, lat);
      tc = (LOGN + 1 + LOGP + 1 + lat) - (LOGN + 1) - LOGP - 3;
      check("T_conv against formula", tc, tc_formula);
      bad = 0;
      for (int k = 0; k < N; k++) if (e[k] != e_exp[k]) bad++;
      check("ciphertext coefficients wrong", bad, 0);
      sum += real'(tc);
      if (tc < tmin) tmin = tc;
      if (tc > tmax) tmax = tc;
    end
    $display("S=%0d MODP=%s: T_conv over %0d random r in tau(36,36): mean %0.2f min %0d max %0d (expected mean %0.2f, range %0d..%0d)",
             S, MODP.name(), NRUNS, sum / NRUNS, tmin, tmax, EXP_MEAN, EXP_MIN, EXP_MAX);
    check("T_conv mean within tolerance", int'((sum / NRUNS > EXP_MEAN - MEAN_TOL) && (sum / NRUNS < EXP_MEAN + MEAN_TOL)), 1);
    check("T_conv minimum in range", int'(tmin >= EXP_MIN), 1);
    check("T_conv maximum in range", int'(tmax <= EXP_MAX + 1), 1);

    for (int run = 0; run < NDEC; run++) begin
      for (int k = 0; k < MAXN; k++) e[k] = (k < N) ? $urandom_range(Q - 1, 0) : 0;
      conv(N, f, e, a);
      issue(CMD_DEC);
      send_dense(e, LOGQ);
      receive(LOGP, mo, lat);
      check("dec latency", LOGQ + 1 + lat, LOGQ + t_conv(NNZ, f_loc, S) + 3);
      bad = 0;
      for (int k = 0; k < N; k++) if (mo[k] != lift_modp(modq(a[k], Q), Q, P)) bad++;
      check("plaintext coefficients wrong", bad, 0);
    end
    done = 1;
  end
endmodule
