// ntru_plane_sipo: bit-plane input register for a polynomial or a location list.
//
// Data enters the chip one bit-plane per clock: on LANES parallel pins the
// host presents bit j of every coefficient (or of every location) at once,
// least significant plane first. After BITS enabled clocks lane l holds the
// BITS-bit word whose bit j arrived in the j-th enabled clock. This is how a
// polynomial in R_q is loaded in log2(q) clocks and a location list in
// ceil(log2 N)+1 clocks (the last plane being the signs).
// Timing: one plane is taken at every rising edge with en high. Reset clears
// the register.
module ntru_plane_sipo #(
  parameter int unsigned LANES = 251,
  parameter int unsigned BITS  = 7
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic [LANES-1:0]             plane_in,
  output logic [LANES-1:0][BITS-1:0]   q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (en) begin
      for (int unsigned l = 0; l < LANES; l++) begin
        for (int unsigned b = 0; b + 1 < BITS; b++) q[l][b] <= q[l][b+1];
        q[l][BITS-1] <= plane_in[l];
      end
    end
  end

endmodule
