// tb_ntru_modp_lut: exhaustive check of the centre-lift-and-reduce map for
// every input a in 0..q-1: expected ((a > q/2 ? a - q : a) mod p) in 0..p-1,
// for q = 128 with p = 3, and for q = 256 with p = 7 as a second size.
module tb_ntru_modp_lut;
  logic [6:0] a7;  logic [1:0] m7;
  logic [7:0] a8;  logic [2:0] m8;
  int checks = 0, failures = 0;

  ntru_modp_lut #(.LOGQ(7), .P(3)) dut  (.a(a7), .m(m7));
  ntru_modp_lut #(.LOGQ(8), .P(7)) dut2 (.a(a8), .m(m8));

  function automatic int ref_modp(int a, int q, int p);
    int v;
    v = (a > q / 2) ? a - q : a;
    v = v % p;
    if (v < 0) v += p;
    return v;
  endfunction

  initial begin
    for (int a = 0; a < 128; a++) begin
      a7 = 7'(a); #1;
      checks++;
      if (int'(m7) != ref_modp(a, 128, 3)) begin
        failures++;
        $display("FAIL q=128 p=3 a=%0d got %0d exp %0d", a, m7, ref_modp(a, 128, 3));
      end
    end
    for (int a = 0; a < 256; a++) begin
      a8 = 8'(a); #1;
      checks++;
      if (int'(m8) != ref_modp(a, 256, 7)) begin
        failures++;
        $display("FAIL q=256 p=7 a=%0d got %0d exp %0d", a, m8, ref_modp(a, 256, 7));
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
