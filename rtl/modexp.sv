// Modular exponentiator: result = C^E mod M for a K-bit odd modulus M.
//
// The host writes four operands over a 64-bit bus: R^2 mod M (with
// R = 2^(DW*N)), the modulus M, the base C (< M) and the exponent E, each as
// ceil(DW*N/64) words, least significant word first, addressed by ld_sel and
// ld_idx. A start pulse then runs the whole exponentiation:
//   * the scaled modulus Mt = M*(-M^-1 mod 2^DW) is formed (mont_precompute);
//   * the control unit (modexp_ctrl) drives the Montgomery multiplier
//     (mont_mult) through CR = MM(R^2,C), P = MM(R^2,1), then for every bit of
//     E, MSB first, P = MM(P,P) and, if the bit is 1, P = MM(P,CR), and finally
//     P = MM(P,1);
//   * P, which is congruent to C^E mod M but may be as large as 2*Mt, is
//     reduced below M (mod_reduce).
// The result is then returned on out_data, one 64-bit word per cycle with
// out_valid, least significant word first, after a one-cycle done pulse.
//
// The operand registers mirror the exponentiator's block diagram: R^2 and P
// feed the multiplier's serial a input, C, CR and P its b input, M (through
// Mt) its m input, and the multiplier's s output is written back into P or CR.
// The constant 1 operand, the precompute and final-reduction blocks and the
// word-addressed host interface are this design's own.
//
// Timing: a multiplication takes 2(N+2) cycles and the control unit adds one
// cycle between multiplications, so from start to done an exponentiation takes
//   2 + (2N+5) * (3 + EBITS + ones(E)) + DW + 3   cycles, EBITS = DW*N,
// about 202,000 cycles for K = 1024 and a random exponent. Loading takes
// 4*ceil(DW*N/64) write cycles plus the start pulse, unloading a done cycle
// plus ceil(DW*N/64) result words.
module modexp
  import mm_pkg::*;
#(
  parameter int unsigned K = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // host load port
  input  logic        ld_valid,
  input  ld_e         ld_sel,
  input  logic [7:0]  ld_idx,      // 64-bit word index
  input  logic [63:0] ld_data,
  // control
  input  logic        start,
  output logic        busy,
  output logic        done,        // one-cycle pulse before the result words
  // result
  output logic        out_valid,
  output logic [63:0] out_data
);

  localparam int unsigned N     = ndigits(K, DW);
  localparam int unsigned NW    = N * DW;
  localparam int unsigned WORDS = nwords(NW);
  localparam int unsigned OW    = WORDS * 64;      // width of host-visible registers

  // ---------------- operand registers ----------------
  logic [OW-1:0] r2_q, c_q, e_q;   // e_q shifts left as the exponent is scanned
  logic [OW-1:0] m_q;
  logic [NW-1:0] p_q, cr_q, mt_q;
  logic [K-1:0]  res_q;

  // ---------------- control unit ----------------
  logic prep, mm_start, mm_wr, e_shift, red_start, red_done, ctrl_busy, ctrl_done;
  opa_e opa;
  opb_e opb;
  dst_e dst;
  logic mm_busy, mm_done;
  logic [NW-1:0] mm_s;

  modexp_ctrl #(.EBITS(NW)) u_ctrl (
    .clk, .rst_n,
    .start     (start && !busy),
    .e_msb     (e_q[NW-1]),
    .mm_done   (mm_done),
    .red_done  (red_done),
    .prep      (prep),
    .mm_start  (mm_start),
    .opa       (opa),
    .opb       (opb),
    .dst       (dst),
    .mm_wr     (mm_wr),
    .e_shift   (e_shift),
    .red_start (red_start),
    .busy      (ctrl_busy),
    .done      (ctrl_done)
  );

  // ---------------- operand selection ----------------
  logic [NW-1:0] a_op, b_op;
  localparam logic [NW-1:0] ONE = NW'(1);

  always_comb begin
    unique case (opa)
      OPA_R2:  a_op = r2_q[NW-1:0];
      OPA_P:   a_op = p_q;
      default: a_op = ONE;
    endcase
    unique case (opb)
      OPB_C:   b_op = c_q[NW-1:0];
      OPB_CR:  b_op = cr_q;
      OPB_P:   b_op = p_q;
      default: b_op = ONE;
    endcase
  end

  // ---------------- datapath blocks ----------------
  logic [NW-1:0] mt_comb;
  logic [DW-1:0] m_prime;

  mont_precompute #(.K(K), .N(N)) u_pre (
    .m       (m_q[K-1:0]),
    .m_prime (m_prime),
    .mt      (mt_comb)
  );

  mont_mult #(.N(N)) u_mm (
    .clk, .rst_n,
    .start (mm_start),
    .a     (a_op),
    .b     (b_op),
    .m     (mt_q),
    .busy  (mm_busy),
    .done  (mm_done),
    .s     (mm_s)
  );

  logic [K-1:0] red_r;
  logic         red_busy, red_sub;

  mod_reduce #(.K(K), .XW(NW)) u_red (
    .clk, .rst_n,
    .start      (red_start),
    .x          (p_q),
    .m          (m_q[K-1:0]),
    .busy       (red_busy),
    .done       (red_done),
    .r          (red_r),
    .subtracted (red_sub)
  );

  // ---------------- registers and host interface ----------------
  localparam int unsigned OCW = $clog2(WORDS + 1);
  logic [OCW-1:0] out_cnt;
  logic [OW-1:0]  out_sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r2_q      <= '0;
      m_q       <= '0;
      c_q       <= '0;
      e_q       <= '0;
      p_q       <= '0;
      cr_q      <= '0;
      mt_q      <= '0;
      res_q     <= '0;
      out_cnt   <= '0;
      out_sr    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (ld_valid && !busy && (32'(ld_idx) < WORDS)) begin
        unique case (ld_sel)
          LD_R2: r2_q[ld_idx*64 +: 64] <= ld_data;
          LD_M:  m_q [ld_idx*64 +: 64] <= ld_data;
          LD_C:  c_q [ld_idx*64 +: 64] <= ld_data;
          LD_E:  e_q [ld_idx*64 +: 64] <= ld_data;
        endcase
      end
      if (prep) mt_q <= mt_comb;
      if (mm_wr) begin
        if (dst == DST_CR) cr_q <= mm_s;
        else               p_q  <= mm_s;
      end
      if (e_shift) e_q <= e_q << 1;
      if (red_done) res_q <= red_r;

      // result unload: done pulse, then WORDS words
      out_valid <= 1'b0;
      if (ctrl_done) begin
        out_sr  <= OW'(res_q);
        out_cnt <= OCW'(WORDS);
      end else if (out_cnt != '0) begin
        out_valid <= 1'b1;
        out_data  <= out_sr[63:0];
        out_sr    <= out_sr >> 64;
        out_cnt   <= out_cnt - 1'b1;
      end
    end
  end

  assign busy = ctrl_busy || (out_cnt != '0);
  assign done = ctrl_done;

  // The control unit never starts a block that is still busy.
  a_mm_idle: assert property (@(posedge clk) disable iff (!rst_n)
    mm_start |-> !mm_busy);
  a_red_idle: assert property (@(posedge clk) disable iff (!rst_n)
    red_start |-> !red_busy);

endmodule
