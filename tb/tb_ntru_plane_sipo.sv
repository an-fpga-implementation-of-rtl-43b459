// tb_ntru_plane_sipo: shifts random words in one bit-plane per clock (LSB
// plane first) and checks every lane holds its word after BITS enables, that
// disabled clocks hold the value, and that reset clears it.
module tb_ntru_plane_sipo;
  localparam int unsigned LANES = 251, BITS = 7;
  logic clk = 0, rst_n = 0, en = 0;
  logic [LANES-1:0] plane_in = '0;
  logic [LANES-1:0][BITS-1:0] q, exp_w;
  int checks = 0, failures = 0;

  ntru_plane_sipo #(.LANES(LANES), .BITS(BITS)) dut (.clk, .rst_n, .en, .plane_in, .q);
  always #5 clk = ~clk;

  task automatic cmp(string what);
    for (int l = 0; l < int'(LANES); l++) begin
      checks++;
      if (q[l] !== exp_w[l]) begin
        failures++;
        if (failures < 10) $display("FAIL %s lane %0d got %0h exp %0h", what, l, q[l], exp_w[l]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp_w = '0; cmp("reset");
    for (int rep = 0; rep < 10; rep++) begin
      for (int l = 0; l < int'(LANES); l++) exp_w[l] = BITS'($urandom);
      for (int b = 0; b < int'(BITS); b++) begin
        @(negedge clk);
        en = 1;
        for (int l = 0; l < int'(LANES); l++) plane_in[l] = exp_w[l][b];
        @(negedge clk);
        en = 0;
        plane_in = '1;                 // must be ignored while en is low
      end
      @(negedge clk);
      cmp("load");
    end
    rst_n = 0; #1; exp_w = '0; cmp("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
