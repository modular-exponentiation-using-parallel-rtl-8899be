// Control unit of the modular exponentiator.
//
// Sequences one exponentiation P = C^E mod M as a series of Montgomery
// multiplications MM(a, b) = a*b*R^-1, following the left-to-right binary
// method with Montgomery pre- and post-processing:
//   PREP  : register the scaled modulus Mt                  (one cycle)
//   PRE_CR: CR <- MM(R^2, C)        base into Montgomery form
//   PRE_P : P  <- MM(R^2, 1)        Montgomery form of 1, i.e. R mod M
//   for each of the EBITS exponent bits, most significant first:
//     SQ  : P <- MM(P, P)
//     MUL : P <- MM(P, CR)          only if the bit e_i is 1
//   POST  : P  <- MM(P, 1)          leave Montgomery form
//   RED   : final reduction of P below M
// All EBITS bits of the exponent register are scanned, leading zeros included,
// which is what the stated cycle count 2(n+5) x (b - h + 3h/2) implies; the
// squarings of leading zeros keep P at R mod M. The exponent register feeds
// the current bit e_msb and shifts on e_shift.
//
// The algorithm and the three pre/post multiplications follow the original
// architecture.
// Starting from P = R mod M instead of P = 1 and the state encoding are this
// design's own choices.
//
// Interface: start is a one-cycle pulse. For each multiplication the unit
// pulses mm_start, holds opa/opb/dst until mm_done, and the datapath writes the
// result into dst on the mm_done cycle. done pulses when the reduced result is
// ready (one cycle after red_done).
module modexp_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned EBITS = ndigits(1024, DW) * DW
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic e_msb,       // current exponent bit e_i
  input  logic mm_done,
  input  logic red_done,
  output logic prep,        // capture the scaled modulus
  output logic mm_start,
  output opa_e opa,
  output opb_e opb,
  output dst_e dst,
  output logic mm_wr,       // write the multiplier result into dst
  output logic e_shift,     // advance to the next exponent bit
  output logic red_start,
  output logic busy,
  output logic done
);

  typedef enum logic [2:0] {
    C_IDLE, C_PREP, C_PRE_CR, C_PRE_P, C_SQ, C_MUL, C_POST, C_RED
  } cstate_e;

  localparam int unsigned BW = $clog2(EBITS + 1);

  cstate_e       state;
  logic          go;        // first cycle of a multiplication state
  logic [BW-1:0] bits_left;

  always_comb begin
    opa = OPA_P;
    opb = OPB_P;
    dst = DST_P;
    unique case (state)
      C_PRE_CR: begin opa = OPA_R2; opb = OPB_C;   dst = DST_CR; end
      C_PRE_P:  begin opa = OPA_R2; opb = OPB_ONE; dst = DST_P;  end
      C_SQ:     begin opa = OPA_P;  opb = OPB_P;   dst = DST_P;  end
      C_MUL:    begin opa = OPA_P;  opb = OPB_CR;  dst = DST_P;  end
      C_POST:   begin opa = OPA_P;  opb = OPB_ONE; dst = DST_P;  end
      default:  ;
    endcase
  end

  assign prep     = (state == C_PREP);
  assign mm_start = go;
  assign mm_wr    = mm_done && (state inside {C_PRE_CR, C_PRE_P, C_SQ, C_MUL, C_POST});
  assign e_shift  = mm_done && ((state == C_MUL) || (state == C_SQ && !e_msb));
  assign busy     = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      go        <= 1'b0;
      bits_left <= '0;
      red_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      go        <= 1'b0;
      red_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        C_IDLE: if (start) state <= C_PREP;
        C_PREP: begin
          state     <= C_PRE_CR;
          go        <= 1'b1;
          bits_left <= BW'(EBITS);
        end
        C_PRE_CR: if (mm_done) begin state <= C_PRE_P; go <= 1'b1; end
        C_PRE_P:  if (mm_done) begin state <= C_SQ;    go <= 1'b1; end
        C_SQ: if (mm_done) begin
          go <= 1'b1;
          if (e_msb) begin
            state <= C_MUL;
          end else begin
            bits_left <= bits_left - 1'b1;
            state     <= (bits_left == BW'(1)) ? C_POST : C_SQ;
          end
        end
        C_MUL: if (mm_done) begin
          go        <= 1'b1;
          bits_left <= bits_left - 1'b1;
          state     <= (bits_left == BW'(1)) ? C_POST : C_SQ;
        end
        C_POST: if (mm_done) begin
          state     <= C_RED;
          red_start <= 1'b1;
        end
        C_RED: if (red_done) begin
          state <= C_IDLE;
          done  <= 1'b1;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    mm_start |-> !mm_done);

endmodule
