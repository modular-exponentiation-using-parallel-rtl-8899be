// Shared constants and types of the radix-2^17 Montgomery modular exponentiator.
//
// The design works on digits of DW = 17 bits, the width of the dedicated 17x17
// multipliers the architecture is built around. A K-bit modulus is handled with
// N = ndigits(K) digits, chosen so that the Montgomery constant R = 2^(DW*N)
// satisfies 4*Mt < R for the scaled modulus Mt = M * (M' mod 2^DW) < 2^(K+DW).
// That bound lets every multiplication run without a final subtraction. For
// K = 1024 this gives N = 62 digits (1054 "gross" bits) and for K = 512 it
// gives N = 32 digits (544 bits).
package mm_pkg;

  localparam int unsigned DW = 17;        // digit width, radix beta = 2^17
  localparam int unsigned CW = 3;         // width of a cell's pending-carry count (max 4)

  // Number of digits for a K-bit modulus: smallest N with DW*N >= K + DW + 2.
  function automatic int unsigned ndigits(input int unsigned k, input int unsigned dw);
    return (k + dw + 2 + dw - 1) / dw;
  endfunction

  // Number of 64-bit host words needed for an operand of nbits bits.
  function automatic int unsigned nwords(input int unsigned nbits);
    return (nbits + 63) / 64;
  endfunction

  // Operand sources of a modular multiplication.
  typedef enum logic [1:0] {
    OPA_R2  = 2'd0,   // R^2 mod M from the host
    OPA_P   = 2'd1,   // running product P
    OPA_ONE = 2'd2    // the constant 1
  } opa_e;

  typedef enum logic [1:0] {
    OPB_C   = 2'd0,   // base C
    OPB_CR  = 2'd1,   // base in Montgomery form, C*R mod M
    OPB_P   = 2'd2,   // running product P
    OPB_ONE = 2'd3    // the constant 1
  } opb_e;

  // Destination of a multiplication result.
  typedef enum logic {
    DST_P  = 1'b0,
    DST_CR = 1'b1
  } dst_e;

  // Host operand select for loading.
  typedef enum logic [1:0] {
    LD_R2  = 2'd0,
    LD_M   = 2'd1,
    LD_C   = 2'd2,
    LD_E   = 2'd3
  } ld_e;

endpackage
