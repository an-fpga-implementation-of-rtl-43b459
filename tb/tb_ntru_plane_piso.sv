// tb_ntru_plane_piso: loads random words in parallel and checks that the
// bit-planes come out LSB first, one per shift clock, that load wins over
// shift and that the register holds while neither is asserted.
module tb_ntru_plane_piso;
  localparam int unsigned LANES = 251, BITS = 7;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [LANES-1:0][BITS-1:0] d, w;
  logic [LANES-1:0] plane_out;
  int checks = 0, failures = 0;

  ntru_plane_piso #(.LANES(LANES), .BITS(BITS)) dut (.clk, .rst_n, .load, .shift, .d, .plane_out);
  always #5 clk = ~clk;

  task automatic cmp_plane(int b);
    for (int l = 0; l < int'(LANES); l++) begin
      checks++;
      if (plane_out[l] !== w[l][b]) begin
        failures++;
        if (failures < 10) $display("FAIL plane %0d lane %0d", b, l);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int rep = 0; rep < 10; rep++) begin
      for (int l = 0; l < int'(LANES); l++) w[l] = BITS'($urandom);
      @(negedge clk); d = w; load = 1; shift = 1;   // load has priority
      @(negedge clk); load = 0; shift = 0; d = '0;
      cmp_plane(0);
      @(negedge clk); cmp_plane(0);                 // hold
      for (int b = 1; b < int'(BITS); b++) begin
        shift = 1; @(negedge clk); shift = 0;
        cmp_plane(b);
      end
    end
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
