// Processing element (digit cell j) of the semi-systolic Montgomery multiplier.
//
// Cell j holds digit b_j of the multiplicand and digit m_{j+1} of the scaled
// modulus Mt, and owns one DW x DW multiplier that is shared in time. The
// array broadcasts a (the current digit of A) on even cycles (odd_even = 0)
// and the quotient digit q on odd cycles. Each cycle the cell adds the low
// half of its product to the high half coming from cell j-1 (ADD1). ADD2 then
// accumulates:
//   even: W   <= <a*b_j>     + phi_{j-1}   + s_{j+1}     ((ab)_j + s_{j+1})
//   odd : s_j <= <q*m_{j+1}> + theta_j     + W           (+ (qm)_{j+1})
// so that over one iteration s_j = s_{j+1} + (qm)_{j+1} + (ab)_j: the digit
// shifts one place down (the division by beta) while both products are added.
// The high half of the product (phi_j or theta_{j+1}) goes to cell j+1.
//
// Both adders are DW bits wide. Their carry-outs are not passed on: each goes
// into a two-stage loop and re-enters the same adder two cycles later, i.e. in
// the same half of the next iteration. A carry out of cell j has weight
// beta^(j+1); after the next division by beta that is cell j's own weight, so
// feeding it back locally is exact, and no carry ever travels along the array.
// c_out reports how many of these carries are pending (0..4), for the final
// conversion of the carry-save result.
//
// Following the PE block diagram: a single time-multiplexed multiplier, ADD1
// and ADD2 with saved carries, register W, the odd/even multiplexer in front
// of ADD2 and a digit register cleared at the start. Holding m_{j+1} rather
// than m_j is how this design reads that diagram, which has no input for
// (qm)_{j+1} from the neighbour. The multiplier operands and ADD1 inputs are
// not registered here (the diagram's regX/regY/reg1/reg2), so one iteration
// takes exactly two cycles without extra pipeline latency. HAS_MULT = 0 builds
// the top cell, whose b and m digits are always zero, without a multiplier;
// its b_in, m_in and y_in are then unused.
//
// Timing: load (with en low) captures b_in/m_in and clears all state. With en
// high, odd_even selects the half-iteration; registers change on the edge.
module mm_pe
  import mm_pkg::*;
#(
  parameter bit HAS_MULT = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,      // capture b_in/m_in, clear accumulator and carries
  input  logic          en,        // perform the half-iteration selected by odd_even
  input  logic          odd_even,  // 0: a*b_j, 1: q*m_{j+1} and digit update
  input  logic [DW-1:0] b_in,      // b_j
  input  logic [DW-1:0] m_in,      // m_{j+1}
  input  logic [DW-1:0] y_in,      // broadcast multiplier operand: a (even) or q (odd)
  input  logic [DW-1:0] hi_in,     // phi_{j-1} (even) / theta_j (odd) from cell j-1
  output logic [DW-1:0] hi_out,    // phi_j (even) / theta_{j+1} (odd) to cell j+1
  input  logic [DW-1:0] s_in,      // s_{j+1} from cell j+1
  output logic [DW-1:0] s_out,     // s_j
  output logic [CW-1:0] c_out      // pending carries of this cell, weight beta^(j+1)
);

  logic [DW-1:0]   b_q, m_q;
  logic [DW-1:0]   s_q;            // digit register (regS)
  logic [DW-1:0]   w_q;            // intermediate sum (regW)
  logic [1:0]      c1_q, c2_q;     // two-stage carry loops of ADD1 and ADD2
  logic [2*DW-1:0] prod;
  logic [DW:0]     add1, add2;
  logic [DW-1:0]   add2_b;

  // Time-multiplexed multiplier
  if (HAS_MULT) begin : g_mult
    logic [DW-1:0] x;
    always_comb begin
      x    = odd_even ? m_q : b_q;
      prod = {{(DW){1'b0}}, x} * {{(DW){1'b0}}, y_in};
    end
  end else begin : g_nomult
    always_comb prod = '0;
  end

  always_comb begin
    add2_b = odd_even ? w_q : s_in;
    add1   = {1'b0, prod[DW-1:0]} + {1'b0, hi_in} + {{(DW){1'b0}}, c1_q[1]};
    add2   = {1'b0, add1[DW-1:0]} + {1'b0, add2_b} + {{(DW){1'b0}}, c2_q[1]};
    hi_out = prod[2*DW-1:DW];
    s_out  = s_q;
    c_out  = CW'(c1_q[0]) + CW'(c1_q[1]) + CW'(c2_q[0]) + CW'(c2_q[1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q  <= '0;
      m_q  <= '0;
      s_q  <= '0;
      w_q  <= '0;
      c1_q <= '0;
      c2_q <= '0;
    end else if (load) begin
      b_q  <= b_in;
      m_q  <= m_in;
      s_q  <= '0;
      w_q  <= '0;
      c1_q <= '0;
      c2_q <= '0;
    end else if (en) begin
      c1_q <= {c1_q[0], add1[DW]};
      c2_q <= {c2_q[0], add2[DW]};
      if (!odd_even) w_q <= add2[DW-1:0];
      else           s_q <= add2[DW-1:0];
    end
  end

endmodule
