// tb_ntru_ctrl: drives every command into the controller, with a stand-in for
// the convolution unit that answers done a random number of clocks after
// start, and checks the length and order of every phase: the load-enable
// clock counts, PREP (load_b + start in one clock), result capture in the
// done clock, the output-plane count, the accept-to-output latency, and that
// commands are refused while busy.
module tb_ntru_ctrl;
  import ntru_pkg::*;
  localparam int unsigned LOGQ = 7, LOGP = 2, LOGN = 8;

  logic clk = 0, rst_n = 0, cmd_valid = 0;
  ntru_cmd_e cmd = CMD_LOAD_H;
  logic ready, en_h, en_f, en_r, en_m, en_e, conv_load_b, conv_start, conv_done = 0;
  logic mode_dec, res_load, out_shift, dout_valid;
  int checks = 0, failures = 0;

  ntru_ctrl #(.LOGQ(LOGQ), .LOGP(LOGP), .LOGN(LOGN)) dut (.*);

  always #5 clk = ~clk;

  // Stand-in convolution unit: done pulse conv_len clocks after start.
  int conv_len = 5;
  initial forever begin
    @(posedge clk);
    if (conv_start) begin
      repeat (conv_len) @(posedge clk);
      #1 conv_done = 1;
      @(posedge clk);
      #1 conv_done = 0;
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Issue a command and record per-signal clock counts until ready returns.
  task automatic run(ntru_cmd_e c, int clen);
    int n_h = 0, n_f = 0, n_r = 0, n_m = 0, n_e = 0, n_prep = 0, n_res = 0, n_out = 0;
    int t = 0, t_first_out = -1, n_dec = 0;
    conv_len = clen;
    @(negedge clk);
    while (!ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);                 // accepting clock done
    cmd_valid = 1;                  // held high: must be ignored while busy
    cmd = CMD_LOAD_H;
    do begin
      t++;
      n_h += int'(en_h); n_f += int'(en_f); n_r += int'(en_r); n_m += int'(en_m); n_e += int'(en_e);
      n_prep += int'(conv_load_b && conv_start); n_res += int'(res_load); n_out += int'(dout_valid);
      n_dec += int'(mode_dec);
      if (dout_valid && t_first_out < 0) t_first_out = t;
      @(negedge clk);
    end while (!ready && t < 1000);
    cmd_valid = 0;
    check("en_h clocks", n_h, c == CMD_LOAD_H ? LOGQ : 0);
    check("en_f clocks", n_f, c == CMD_LOAD_F ? LOGN + 1 : 0);
    check("en_r clocks", n_r, c == CMD_ENC ? LOGN + 1 : 0);
    check("en_m clocks", n_m, c == CMD_ENC ? LOGP : 0);
    check("en_e clocks", n_e, c == CMD_DEC ? LOGQ : 0);
    check("prep clocks", n_prep, (c == CMD_ENC || c == CMD_DEC) ? 1 : 0);
    check("capture clocks", n_res, (c == CMD_ENC || c == CMD_DEC) ? 1 : 0);
    check("output planes", n_out, c == CMD_ENC ? LOGQ : c == CMD_DEC ? LOGP : 0);
    if (c == CMD_ENC) check("enc latency", t_first_out, LOGN + 1 + LOGP + clen + 3);
    if (c == CMD_DEC) check("dec latency", t_first_out, LOGQ + clen + 3);
    if (c == CMD_DEC) check("dec mode", n_dec, t);
    if (c == CMD_ENC) check("enc mode", n_dec, 0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("ready after reset", int'(ready), 1);
    run(CMD_LOAD_H, 0);
    run(CMD_LOAD_F, 0);
    for (int i = 0; i < 10; i++) begin
      run(CMD_ENC, 1 + $urandom_range(120, 0));
      run(CMD_DEC, 1 + $urandom_range(120, 0));
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
