// Final reduction of the exponentiation result modulo M.
//
// The Montgomery multiplier works with the scaled modulus Mt = M*m' and returns
// values that are congruent modulo M but may be as large as 2*Mt < 2^(DW+1)*M.
// This block brings such a value into [0, M) by restoring shift-and-subtract:
// for j = DW down to 0, if X >= M*2^j then X <- X - M*2^j. That takes DW+1
// cycles (18 for DW = 17) with one wide comparator/subtractor.
//
// The original exponentiation flow ends with a Montgomery multiplication by 1
// and leaves open how the result is brought below M; this block is this
// design's own.
//
// Interface: pulse start with x and m valid (captured on that edge); done
// pulses for one cycle DW+1 cycles after the start edge, with r valid until
// the next start.
module mod_reduce
  import mm_pkg::*;
#(
  parameter int unsigned K  = 1024,
  parameter int unsigned XW = ndigits(K, DW) * DW  // width of the input value
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] x,
  input  logic [K-1:0]  m,
  output logic          busy,
  output logic          done,
  output logic [K-1:0]  r,
  output logic          subtracted   // pulses on every cycle that subtracts
);

  localparam int unsigned SW = $clog2(DW + 2);

  logic [XW-1:0] acc;
  logic [XW-1:0] msh;         // M * 2^j
  logic [K-1:0]  m_q;
  logic [SW-1:0] j;
  logic          run;
  logic          ge;

  always_comb begin
    msh = XW'(m_q) << j;
    ge  = (acc >= msh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      m_q  <= '0;
      j    <= '0;
      run  <= 1'b0;
      done <= 1'b0;
      r    <= '0;
      subtracted <= 1'b0;
    end else begin
      done       <= 1'b0;
      subtracted <= 1'b0;
      if (start && !run) begin
        acc <= x;
        m_q <= m;
        j   <= SW'(DW);
        run <= 1'b1;
      end else if (run) begin
        if (ge) begin
          acc        <= acc - msh;
          subtracted <= 1'b1;
        end
        if (j == '0) begin
          run  <= 1'b0;
          done <= 1'b1;
          r    <= ge ? K'(acc - msh) : K'(acc);
        end else begin
          j <= j - 1'b1;
        end
      end
    end
  end

  assign busy = run;

endmodule
