// tb_ntru_conv: random sparse ternary t (NNZ sorted distinct locations, half
// of them -1) times random dense b in R_q, checked coefficient by coefficient
// against the schoolbook convolution c_k = sum_i t_i * b_(k-i mod N) mod q.
// The number of busy clocks is checked against
//     T_conv(S) = sum_i ceil((d_i - d_(i-1)) / S), d_0 = 0,
// plus one clock when d_1 = 0. Cases with d_1 = 0, with adjacent locations
// and with the last location N-1 are forced as well as fully random ones.
module tb_ntru_conv;
  localparam int unsigned N = 251, W = 7, S = 8, NNZ = 72, LOGN = 8;

  logic clk = 0, rst_n = 0;
  logic load_b = 0, start = 0, busy, done;
  logic [N-1:0][W-1:0]      b_in, acc_out;
  logic [NNZ-1:0][LOGN-1:0] loc;
  logic [NNZ-1:0]           neg;
  int checks = 0, failures = 0;
  int n_zero_first = 0, n_adjacent = 0, n_long_gap = 0;

  ntru_conv #(.N(N), .W(W), .S(S), .NNZ(NNZ), .LOGN(LOGN)) dut (
    .clk, .rst_n, .load_b, .b_in, .start, .loc, .neg, .busy, .done, .acc_out);

  always #5 clk = ~clk;

  // Draw NNZ distinct sorted locations; mode 1 forces location 0,
  // mode 2 forces a run of adjacent locations and location N-1.
  task automatic make_t(int mode);
    int perm[N];
    int sel[NNZ];
    int tmp, j;
    for (int i = 0; i < int'(N); i++) perm[i] = i;
    for (int i = int'(N) - 1; i > 0; i--) begin
      j = $urandom_range(i, 0);
      tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
    end
    for (int i = 0; i < int'(NNZ); i++) sel[i] = perm[i];
    if (mode == 1) sel[0] = 0;
    if (mode == 2) for (int i = 0; i < int'(NNZ); i++) sel[i] = (i < 40) ? 100 + i : int'(N) - int'(NNZ) + i;
    // make distinct after forcing, then sort
    for (int i = 0; i < int'(NNZ); i++)
      for (int k = 0; k < i; k++)
        if (sel[k] == sel[i]) begin sel[i] = perm[NNZ + i]; k = -1; end
    sel.sort();
    for (int i = 0; i < int'(NNZ); i++) begin
      loc[i] = LOGN'(sel[i]);
      neg[i] = 1'b0;
    end
    // exactly NNZ/2 entries are -1
    for (int i = 0; i < int'(NNZ) / 2; i++) begin
      do j = $urandom_range(NNZ - 1, 0); while (neg[j]);
      neg[j] = 1'b1;
    end
  endtask

  task automatic run_one(int mode);
    int exp_cycles, cycles, prev, gap;
    logic [W-1:0] exp_c [N];
    make_t(mode);
    for (int k = 0; k < int'(N); k++) b_in[k] = W'($urandom);
    // reference
    for (int k = 0; k < int'(N); k++) exp_c[k] = '0;
    for (int i = 0; i < int'(NNZ); i++)
      for (int k = 0; k < int'(N); k++)
        exp_c[k] = neg[i] ? exp_c[k] - b_in[(k - int'(loc[i]) + int'(N)) % N]
                          : exp_c[k] + b_in[(k - int'(loc[i]) + int'(N)) % N];
    exp_cycles = 0; prev = 0;
    for (int i = 0; i < int'(NNZ); i++) begin
      gap = int'(loc[i]) - prev;
      if (gap == 0) begin exp_cycles += 1; n_zero_first++; end
      else exp_cycles += (gap + int'(S) - 1) / int'(S);
      if (gap == 1) n_adjacent++;
      if (gap > int'(S)) n_long_gap++;
      prev = int'(loc[i]);
    end
    @(negedge clk); load_b = 1; start = 1;
    @(negedge clk); load_b = 0; start = 0; b_in = '0;   // b is held inside
    cycles = 0;
    while (!done) begin
      if (busy) cycles++;
      @(negedge clk);
    end
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("FAIL cycles %0d expected %0d", cycles, exp_cycles);
    end
    for (int k = 0; k < int'(N); k++) begin
      checks++;
      if (acc_out[k] !== exp_c[k]) begin
        failures++;
        if (failures < 10) $display("FAIL c[%0d] = %0d expected %0d", k, acc_out[k], exp_c[k]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_one(1);
    run_one(2);
    for (int rep = 0; rep < 20; rep++) run_one(0);
    checks++;
    if (n_zero_first == 0 || n_adjacent == 0 || n_long_gap == 0) begin
      failures++;
      $display("FAIL coverage: zero-first %0d adjacent %0d long gap %0d",
               n_zero_first, n_adjacent, n_long_gap);
    end
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
