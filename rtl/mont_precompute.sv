// Scaled-modulus precomputation for Orup's Montgomery multiplication.
//
// From an odd K-bit modulus M this block forms m' = -M^-1 mod 2^DW and the
// scaled modulus Mt = M * m'. Mt is congruent to -1 modulo 2^DW, which is what
// lets the multiplier take its quotient digit directly from the lowest digit of
// the partial result. The inverse is found by Newton iteration,
// x <- x * (2 - M*x) mod 2^DW, starting from x = M (correct to 3 bits for any
// odd M), which doubles the number of correct bits on each step; four steps
// reach 48 >= 17 bits.
//
// The need for M' and for Mt = M*(M' mod beta) is part of the algorithm; where
// and how they are computed is not specified for the hardware, so this purely
// combinational block is this design's own. Its output is registered by the
// user once per exponentiation.
module mont_precompute
  import mm_pkg::*;
#(
  parameter int unsigned K = 1024,
  parameter int unsigned N = ndigits(K, DW)
) (
  input  logic [K-1:0]    m,
  output logic [DW-1:0]   m_prime,   // -M^-1 mod 2^DW
  output logic [N*DW-1:0] mt         // M * m_prime
);

  logic [DW-1:0] x [5];
  logic [DW-1:0] m0;

  assign m0   = m[DW-1:0];
  assign x[0] = m0;
  for (genvar i = 0; i < 4; i++) begin : g_newton
    logic [DW-1:0] mx;
    assign mx     = DW'(m0 * x[i]);
    assign x[i+1] = DW'(x[i] * (DW'(2) - mx));
  end

  assign m_prime = DW'(-x[4]);
  assign mt      = (N*DW)'(m) * (N*DW)'(m_prime);

endmodule
