// ntru_conv: multiplication-free convolution c = t(x) * b(x) in R_q, where
// b(x) is a dense polynomial with W-bit coefficients (q = 2^W) and t(x) is a
// sparse ternary polynomial given as the list of its NNZ non-zero locations
// d_1 < d_2 < ... < d_NNZ with one sign bit each (0: +1, 1: -1).
//
// How it works. A working register B holds x^D * b(x), where D is the location
// reached so far (D starts at 0). For every list entry the unit rotates B on by
// the gap d_i - D, at most S positions per clock through the (N,s)-shifter,
// and in the clock that completes the gap adds or subtracts the rotated B to
// every coefficient of the accumulator. Entry i thus costs ceil((d_i-d_{i-1})/S)
// clocks (d_0 = 0), so the whole product costs
//     T_conv(S) = sum_i ceil((d_i - d_{i-1}) / S)
// clocks instead of N. Because the coefficients of t are only 0 and +-1 there
// are no multipliers; the sums wrap mod q by truncation.
// B and the accumulator are held in reversed coefficient order (register k
// holds coefficient (N-k) mod N). With that order the shifter's fixed wiring
// y[k] = x[k+t] is exactly a multiplication by x^t. The reversal is pure
// wiring at b_in and acc_out, which are in natural order.
// A location d_1 = 0 has no gap to rotate over; the unit then spends one clock
// adding the unrotated B. This is the only case where an entry costs a clock
// the formula above does not count.
//
// Interface and timing:
//   load_b  : B <= b_in at the rising edge (may coincide with start).
//   start   : clears the accumulator and begins with entry 1 in the next clock.
//             loc/neg must stay stable until done.
//   busy    : high during the T_conv working clocks.
//   done    : one-clock pulse in the clock after the last update; acc_out is
//             valid from then on until the next start.
module ntru_conv #(
  parameter int unsigned N    = 251,
  parameter int unsigned W    = 7,
  parameter int unsigned S    = 8,
  parameter int unsigned NNZ  = 72,
  parameter int unsigned LOGN = $clog2(N)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       load_b,
  input  logic [N-1:0][W-1:0]        b_in,
  input  logic                       start,
  input  logic [NNZ-1:0][LOGN-1:0]   loc,
  input  logic [NNZ-1:0]             neg,
  output logic                       busy,
  output logic                       done,
  output logic [N-1:0][W-1:0]        acc_out
);

  localparam int unsigned SELW = $clog2(S > 1 ? S : 2);
  localparam int unsigned IDXW = $clog2(NNZ > 1 ? NNZ : 2);

  logic [N-1:0][W-1:0] b_rev, acc_rev, shifted, addend;
  logic [IDXW-1:0]     idx;
  logic [LOGN-1:0]     pos;        // D: rotation already applied to B
  logic                running;

  // Remaining gap to the current location, and this clock's step.
  logic [LOGN-1:0]     gap;
  logic                gap_zero, gap_last;
  logic [LOGN-1:0]     step;
  logic [SELW-1:0]     sel;

  always_comb begin
    gap      = loc[idx] - pos;
    gap_zero = (gap == '0);
    gap_last = (gap <= LOGN'(S));
    step     = gap_last ? gap : LOGN'(S);
    sel      = SELW'(step - 1'b1);
  end

  ntru_shifter #(.N(N), .W(W), .S(S)) u_shifter (
    .x   (b_rev),
    .sel (sel),
    .y   (shifted)
  );

  assign addend = gap_zero ? b_rev : shifted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_rev   <= '0;
      acc_rev <= '0;
      idx     <= '0;
      pos     <= '0;
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load_b) begin
        for (int unsigned k = 0; k < N; k++) b_rev[k] <= b_in[(N - k) % N];
      end
      if (start) begin
        acc_rev <= '0;
        idx     <= '0;
        pos     <= '0;
        running <= 1'b1;
      end else if (running) begin
        if (!gap_zero) begin
          b_rev <= shifted;
          pos   <= pos + step;
        end
        if (gap_last) begin
          for (int unsigned k = 0; k < N; k++)
            acc_rev[k] <= neg[idx] ? acc_rev[k] - addend[k] : acc_rev[k] + addend[k];
          if (idx == IDXW'(NNZ - 1)) begin
            running <= 1'b0;
            done    <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
      end
    end
  end

  assign busy = running;

  for (genvar j = 0; j < N; j++) begin : g_out
    assign acc_out[j] = acc_rev[(N - j) % N];
  end

  // The location list must be strictly increasing and inside 0..N-1:
  // the current location may never lie behind the rotation already applied.
  a_sorted : assert property (@(posedge clk) disable iff (!rst_n)
      running |-> (loc[idx] >= pos) && (loc[idx] < LOGN'(N)))
    else $error("ntru_conv: location list not sorted or out of range");

endmodule
