// Self-checking testbench for mont_mult.
//
// Two instances are tested: a small one (N = 5 digits, a 64-bit modulus) with
// many random operand sets and edge cases, and one at the default size
// (N = 62, a 1024-bit modulus) with a few sets. For every multiplication the
// expected result is computed here in two independent ways:
//   * the exact value of Orup's recurrence, evaluated with wide integers;
//   * the Montgomery property: S*R = A*B (mod Mt) and S < 2*Mt.
// The latency from start to done is checked against 2*(N+2) cycles.
module tb_mont_mult;
  import mm_pkg::*;

  localparam int unsigned KS = 64;
  localparam int unsigned NS = ndigits(KS, DW);
  localparam int unsigned KL = 1024;
  localparam int unsigned NL = ndigits(KL, DW);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ---------------- small instance ----------------
  logic            st_s;
  logic [NS*DW-1:0] a_s, b_s, m_s, s_s;
  logic            busy_s, done_s;
  mont_mult #(.N(NS)) dut_s (.clk, .rst_n, .start(st_s), .a(a_s), .b(b_s), .m(m_s),
                             .busy(busy_s), .done(done_s), .s(s_s));

  // ---------------- default-size instance ----------------
  logic            st_l;
  logic [NL*DW-1:0] a_l, b_l, m_l, s_l;
  logic            busy_l, done_l;
  mont_mult dut_l (.clk, .rst_n, .start(st_l), .a(a_l), .b(b_l), .m(m_l),
                   .busy(busy_l), .done(done_l), .s(s_l));

  // -m^-1 mod 2^DW for odd m, by Newton iteration
  function automatic logic [DW-1:0] neg_inv(input logic [DW-1:0] m0);
    logic [DW-1:0] x;
    x = m0;                                 // correct to 3 bits
    for (int i = 0; i < 4; i++) x = DW'(x * (DW'(2) - DW'(m0 * x)));
    return DW'(-x);
  endfunction

  // Wide integer type for the reference model (big enough for the default size)
  localparam int unsigned XW = 2*NL*DW + 2*DW;
  typedef logic [XW-1:0] wide_t;

  // Exact value of Orup's recurrence for n digits
  function automatic wide_t ref_mm(input int unsigned n, input wide_t aa, input wide_t bb,
                                   input wide_t mt);
    wide_t rs, qmt, ai;
    logic [DW-1:0] qd;
    rs = '0;
    for (int unsigned i = 0; i <= n; i++) begin
      qd  = rs[DW-1:0];
      qmt = XW'(qd) * mt;
      ai  = (i < n) ? XW'(aa[i*DW +: DW]) : '0;
      rs  = (rs >> DW) + (qmt >> DW) + XW'(qd != '0) + ai * bb;
    end
    return rs;
  endfunction

  // Check one result: exact value, Montgomery congruence and range
  task automatic check_mm(input int unsigned n, input wide_t aa, input wide_t bb,
                          input wide_t mt, input wide_t ss, input string tag);
    wide_t exp_s, lhs, rhs;
    exp_s = ref_mm(n, aa, bb, mt);
    checks++;
    if (ss !== exp_s) begin
      failures++;
      $display("FAIL %s: s=%h expected %h", tag, ss[NL*DW-1:0], exp_s[NL*DW-1:0]);
    end
    lhs = (ss << (n*DW)) % mt;
    rhs = (aa * bb) % mt;
    checks++;
    if (lhs !== rhs || ss >= 2*mt) begin
      failures++;
      $display("FAIL %s: Montgomery property violated", tag);
    end
  endtask

  function automatic logic [1023:0] rnd1024();
    logic [1023:0] r;
    for (int i = 0; i < 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic run_small(input logic [KS-1:0] mod, input logic [NS*DW-1:0] av,
                           input logic [NS*DW-1:0] bv, input string tag);
    logic [NS*DW-1:0] mt;
    int cyc;
    mt = (NS*DW)'(mod) * (NS*DW)'(neg_inv(mod[DW-1:0]));
    @(negedge clk);
    a_s = av % (2*mt); b_s = bv % (2*mt); m_s = mt; st_s = 1'b1;
    @(negedge clk); st_s = 1'b0;
    cyc = 1;
    while (!done_s) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2*(NS+2)) begin failures++; $display("FAIL %s latency %0d", tag, cyc); end
    check_mm(NS, XW'(a_s), XW'(b_s), XW'(mt), XW'(s_s), tag);
  endtask

  task automatic run_large(input logic [KL-1:0] mod, input logic [NL*DW-1:0] av,
                           input logic [NL*DW-1:0] bv, input string tag);
    logic [NL*DW-1:0] mt;
    int cyc;
    mt = (NL*DW)'(mod) * (NL*DW)'(neg_inv(mod[DW-1:0]));
    @(negedge clk);
    a_l = av % (2*mt); b_l = bv % (2*mt); m_l = mt; st_l = 1'b1;
    @(negedge clk); st_l = 1'b0;
    cyc = 1;
    while (!done_l) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2*(NL+2)) begin failures++; $display("FAIL %s latency %0d", tag, cyc); end
    check_mm(NL, XW'(a_l), XW'(b_l), XW'(mt), XW'(s_l), tag);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KS-1:0] ms;
    logic [KL-1:0] ml;
    st_s = 0; st_l = 0; a_s = 0; b_s = 0; m_s = 0; a_l = 0; b_l = 0; m_l = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // edge cases on the small instance
    ms = {1'b1, 62'h0, 1'b1};
    run_small(ms, '0, '0, "zero");
    run_small(ms, 1, 1, "one");
    ms = '1;
    run_small(ms, '1, '1, "max");
    for (int t = 0; t < 300; t++) begin
      ms = {$urandom, $urandom} | 64'h8000_0000_0000_0001;
      run_small(ms, {$urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom}, "rand_small");
    end
    // default size
    ml = '1;
    run_large(ml, '1, '1, "max_large");
    for (int t = 0; t < 6; t++) begin
      ml = rnd1024() | {1'b1, 1022'h0, 1'b1};
      run_large(ml, {rnd1024(), rnd1024()}, {rnd1024(), rnd1024()}, "rand_large");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
