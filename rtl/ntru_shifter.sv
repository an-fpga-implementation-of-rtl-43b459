// ntru_shifter: the (N,s)-shifter, a circular shifter of N coefficients whose
// reach is limited to S positions per clock.
//
// Each output y[k] is an S-to-1 multiplexer over the inputs x[k+1] .. x[k+S]
// (indices mod N), exactly the arrangement of one mux per output coefficient
// with neighbouring, wrapped-around inputs. A select value sel = t-1 gives
//     y[k] = x[(k + t) mod N],  t = 1 .. S.
// Limiting the reach to S keeps the cost at N S-to-1 muxes of W bits instead
// of a full N-position barrel shifter per bit of the coefficients.
// The block is purely combinational. What shift a zero select would mean is
// not part of the structure: the caller handles "no shift" itself.
module ntru_shifter #(
  parameter int unsigned N = 251,   // number of coefficients
  parameter int unsigned W = 7,     // bits per coefficient (log2 q)
  parameter int unsigned S = 8      // maximum shift per clock
) (
  input  logic [N-1:0][W-1:0]          x,
  input  logic [$clog2(S > 1 ? S : 2)-1:0] sel,   // shift amount minus one
  output logic [N-1:0][W-1:0]          y
);

  localparam int unsigned SELW = $clog2(S > 1 ? S : 2);

  initial begin
    assert (S >= 1 && S < N) else $error("ntru_shifter: need 1 <= S < N");
  end

  for (genvar k = 0; k < N; k++) begin : g_col
    // The S candidate inputs of output k, in select order.
    logic [S-1:0][W-1:0] cand;
    for (genvar t = 1; t <= S; t++) begin : g_in
      assign cand[t-1] = x[(k + t) % N];
    end
    always_comb begin
      y[k] = cand[0];
      for (int unsigned t = 0; t < S; t++)
        if (sel == SELW'(t)) y[k] = cand[t];
    end
  end

endmodule
