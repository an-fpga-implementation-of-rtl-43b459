// ntru_plane_piso: bit-plane output register.
//
// A result polynomial is captured in parallel (load) and then leaves the chip
// one bit-plane per clock on LANES parallel pins, least significant plane
// first: plane_out[l] is always bit 0 of lane l, and every shift moves the next
// bit down. A ciphertext in R_q therefore takes log2(q) clocks and a plaintext
// in R_p ceil(log2 p) clocks (the caller stops shifting early).
// Timing: load has priority over shift; both act at the rising edge.
module ntru_plane_piso #(
  parameter int unsigned LANES = 251,
  parameter int unsigned BITS  = 7
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         load,
  input  logic                         shift,
  input  logic [LANES-1:0][BITS-1:0]   d,
  output logic [LANES-1:0]             plane_out
);

  logic [LANES-1:0][BITS-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (load) begin
      q <= d;
    end else if (shift) begin
      for (int unsigned l = 0; l < LANES; l++) q[l] <= q[l] >> 1;
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_out
    assign plane_out[l] = q[l][0];
  end

endmodule
