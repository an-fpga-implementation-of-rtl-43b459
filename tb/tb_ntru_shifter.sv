// tb_ntru_shifter: checks the (N,s)-shifter against y[k] = x[(k+t) mod N]
// for every shift t = 1..S on random coefficient vectors.
module tb_ntru_shifter;
  localparam int unsigned N = 251, W = 7, S = 8;
  localparam int unsigned SELW = $clog2(S);

  logic [N-1:0][W-1:0] x, y;
  logic [SELW-1:0]     sel;
  int checks = 0, failures = 0;

  ntru_shifter #(.N(N), .W(W), .S(S)) dut (.x, .sel, .y);

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int k = 0; k < int'(N); k++) x[k] = W'($urandom);
      for (int t = 1; t <= int'(S); t++) begin
        sel = SELW'(t - 1);
        #1;
        for (int k = 0; k < int'(N); k++) begin
          checks++;
          if (y[k] !== x[(k + t) % N]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d k=%0d y=%0d exp=%0d", t, k, y[k], x[(k + t) % N]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
