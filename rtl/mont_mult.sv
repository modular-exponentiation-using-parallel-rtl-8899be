// Semi-systolic radix-2^17 Montgomery multiplier (Orup's variant).
//
// Computes S = A * B * R^-1 mod M with R = beta^N, beta = 2^DW, from the scaled
// modulus Mt = M * (M' mod beta), where M' satisfies -M*M' = 1 mod beta. Because
// Mt = -1 mod beta, the quotient digit is simply the lowest digit of S and the
// per-iteration update is
//   q = S mod beta;  z = (q != 0);  S = S/beta + (q*Mt)/beta + z + a_i*B
// for i = 0 .. N (N+1 iterations, a_N = 0). With A, B < 2*Mt and 4*Mt < R the
// result is again below 2*Mt and congruent to A*B*R^-1 modulo M (and Mt), so
// results can be fed back as operands without any final subtraction.
//
// Structure: N+1 cells (mm_pe), cell j holding digits b_j and m_{j+1}. The
// digits of A sit in an (N+1)-digit shift register and are consumed least
// significant first. An odd/even multiplexer broadcasts a_i to every cell on
// even cycles and q on odd cycles (the "semi-systolic" broadcast), so one
// iteration takes two cycles. The high product halves move one cell up (to
// the more significant neighbour), the digits s_j one cell down. Digit m_0 of
// Mt is always beta-1 and needs no multiplier: its contribution,
// theta_0 = q - z plus Orup's correction z, enters cell 0 on the input that
// other cells take from their lower neighbour. Each cell keeps its
// carries locally (carry-save), so the running S is held as digits s_j plus
// pending carries; after the last iteration one wide addition turns it into a
// plain binary number. Cells 0..N-1 have a multiplier; cell N, whose digits
// are always zero, has none.
//
// The array, broadcast and cell equations follow the described architecture;
// parallel loading of B and Mt (instead of a narrow multiplexed input), the
// single-cycle final carry resolution and the handshake are this design's own.
//
// Interface: pulse start for one cycle with a, b, m valid (they are captured on
// that edge). done pulses for one cycle 2*(N+2) cycles after start; s is valid
// from then until the next start. busy is high in between.
module mont_mult
  import mm_pkg::*;
#(
  parameter int unsigned N = 62          // digits; 62 for a 1024-bit modulus
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [N*DW-1:0] a,
  input  logic [N*DW-1:0] b,
  input  logic [N*DW-1:0] m,             // scaled modulus Mt (lowest digit all ones)
  output logic            busy,
  output logic            done,
  output logic [N*DW-1:0] s
);

  localparam int unsigned NC = N + 1;    // cells 0..N
  localparam int unsigned IW = $clog2(NC + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_CONV} state_e;
  state_e state;

  logic [NC*DW-1:0] a_sr;
  logic [IW-1:0]    iter;
  logic             odd_even;

  logic [DW-1:0] y_bcast, q;
  logic          z;
  logic          load, en;

  // Inter-cell wires; index j belongs to cell j, extra entries are boundaries.
  logic [DW-1:0] hi   [NC+1];   // hi[j+1] = hi_out of cell j; hi[0] = theta_0 + z
  logic [DW-1:0] sd   [NC+1];   // sd[j] = s of cell j; sd[NC] = 0
  logic [CW-1:0] cd   [NC];
  logic [DW-1:0] theta0;

  assign sd[NC] = '0;

  assign load = (state == S_IDLE) && start;
  assign en   = (state == S_RUN);
  assign q    = sd[0];
  assign z    = (q != '0);
  assign y_bcast = odd_even ? q : a_sr[DW-1:0];

  // Digit m_0 of Mt is beta-1, so q*m_0 = q*beta - q needs no multiplier: its
  // low half is (beta - q) mod beta, which cancels s_0 = q and carries out z,
  // and its high half is theta_0 = q - z. Both enter cell 0 through its
  // left-hand input on the odd cycle: theta_0 + z.
  assign theta0 = q - DW'(z);
  assign hi[0]  = odd_even ? (theta0 + DW'(z)) : '0;

  for (genvar j = 0; j < NC; j++) begin : g_cell
    logic [DW-1:0] b_j, m_j1;      // b_j and m_{j+1}
    if (j < N) begin : g_b
      assign b_j = b[j*DW +: DW];
    end else begin : g_b0
      assign b_j = '0;
    end
    if (j + 1 < N) begin : g_m
      assign m_j1 = m[(j+1)*DW +: DW];
    end else begin : g_m0
      assign m_j1 = '0;
    end
    mm_pe #(.HAS_MULT(j < N)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (load),
      .en       (en),
      .odd_even (odd_even),
      .b_in     (b_j),
      .m_in     (m_j1),
      .y_in     (y_bcast),
      .hi_in    (hi[j]),
      .hi_out   (hi[j+1]),
      .s_in     (sd[j+1]),
      .s_out    (sd[j]),
      .c_out    (cd[j])
    );
  end

  // Carry resolution: S = sum s_j*beta^j + sum c_j*beta^(j+1)
  logic [(NC+1)*DW-1:0] s_vec, c_vec, s_sum;
  always_comb begin
    s_vec = '0;
    c_vec = '0;
    for (int j = 0; j < NC; j++) begin
      s_vec[j*DW +: DW]     = sd[j];
      c_vec[(j+1)*DW +: CW] = cd[j];
    end
    s_sum = s_vec + c_vec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      a_sr     <= '0;
      iter     <= '0;
      odd_even <= 1'b0;
      done     <= 1'b0;
      s        <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_sr     <= {{DW{1'b0}}, a};
          iter     <= '0;
          odd_even <= 1'b0;
          state    <= S_RUN;
        end
        S_RUN: begin
          odd_even <= ~odd_even;
          if (odd_even) begin
            a_sr <= a_sr >> DW;
            iter <= iter + 1'b1;
            if (iter == IW'(N)) state <= S_CONV;
          end
        end
        S_CONV: begin
          s     <= s_sum[N*DW-1:0];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The result stays below 2*Mt < beta^N, so nothing may reach the top digit,
  // and the top cell never keeps a carry.
  a_top_zero: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_CONV) |-> (s_sum[(NC+1)*DW-1:N*DW] == '0));
  a_top_carry: assert property (@(posedge clk) disable iff (!rst_n)
    (cd[NC-1] == '0));
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !start);
  // Orup's scaling: the lowest digit of Mt must be all ones.
  a_mt_low: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (m[DW-1:0] == '1));

endmodule
