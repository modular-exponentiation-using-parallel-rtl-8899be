// End-to-end testbench of the modular exponentiator in its 512-bit
// configuration (K = 512, 32 digits of 17 bits), the smaller of the two key
// sizes the architecture targets and the size of each half of a 1024-bit RSA
// decryption done with the Chinese remainder theorem.
//
// Runs random exponentiations C^E mod M through the host interface (load of
// R^2 mod M, M, C and E, start, unload of the result) and compares each result
// with a square-and-multiply reference computed here with wide integers. Also
// checks the cycle count of the exponentiation against
//   2 + (2N+5) * (3 + EBITS + ones(E)) + (DW+2) + 1
// collects the result words, and counts how often each mechanism of the
// design occurred: pre-processing, squaring, conditional multiplication,
// squaring of leading zero bits, carry-save carries still pending at the end of
// a multiplication, Orup's correction bit z, subtraction in the final
// reduction, and a start pulse and operand write arriving while busy (both
// must be ignored).
module tb_modexp;
  import mm_pkg::*;

  localparam int unsigned K     = 512;
  localparam int unsigned NOPS  = 8;
  localparam int unsigned N     = ndigits(K, DW);
  localparam int unsigned NW    = N * DW;
  localparam int unsigned WORDS = nwords(NW);
  localparam int unsigned XW    = 2 * NW + 2;
  typedef logic [XW-1:0] wide_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ld_valid, start, busy, done, out_valid;
  ld_e         ld_sel;
  logic [7:0]  ld_idx;
  logic [63:0] ld_data, out_data;

  modexp #(.K(K)) dut (.*);

  int checks = 0;
  int failures = 0;
  int n_pre = 0, n_sq = 0, n_mul = 0, n_lead_sq = 0, n_carry = 0, n_z = 0, n_sub = 0;
  int n_out_words = 0;
  int n_ignored = 0;

  // mechanism counters, observed inside the design
  bit seen_one = 1'b0;   // a 1 bit of E has been processed in this run
  always @(posedge clk) if (rst_n) begin
    if (start) seen_one <= 1'b0;
    if (dut.u_mm.done && dut.u_ctrl.opb == OPB_CR) seen_one <= 1'b1;
    if (dut.u_mm.done && dut.u_ctrl.dst == DST_CR) n_pre++;
    if (dut.u_mm.done && dut.u_ctrl.opb == OPB_P) begin
      n_sq++;
      if (!seen_one) n_lead_sq++;
    end
    if (dut.u_mm.done && dut.u_ctrl.opb == OPB_CR) n_mul++;
    if (dut.u_mm.done && dut.u_mm.c_vec != '0) n_carry++;
    if (dut.u_mm.en && dut.u_mm.odd_even && dut.u_mm.z) n_z++;
    if (dut.u_red.subtracted) n_sub++;
    if (out_valid) n_out_words++;
  end

  function automatic wide_t modexp_ref(input wide_t c, input wide_t e, input wide_t m);
    wide_t p;
    p = 1;
    for (int i = NW - 1; i >= 0; i--) begin
      p = (p * p) % m;
      if (e[i]) p = (p * c) % m;
    end
    return p;
  endfunction

  function automatic wide_t rnd(input int unsigned bits);
    wide_t r;
    r = '0;
    for (int i = 0; i < XW / 32 + 1; i++) r = (r << 32) | wide_t'($urandom);
    return r & ((wide_t'(1) << bits) - 1);
  endfunction

  task automatic load_op(input ld_e sel, input wide_t v);
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      ld_valid = 1'b1; ld_sel = sel; ld_idx = 8'(w); ld_data = v[w*64 +: 64];
    end
    @(negedge clk);
    ld_valid = 1'b0;
  endtask

  task automatic run_one(input wide_t m, input wide_t c, input wide_t e);
    wide_t rmod, r2, expv, got;
    int cyc, ones, exp_cyc, words;
    rmod = (wide_t'(1) << NW) % m;
    r2   = (rmod * rmod) % m;
    load_op(LD_R2, r2);
    load_op(LD_M, m);
    load_op(LD_C, c);
    load_op(LD_E, e);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk); cyc++;
      // a second start and a stray operand write while busy must be ignored
      start    = (cyc == 40);
      ld_valid = (cyc == 41);
      ld_sel   = LD_E;
      ld_idx   = 8'd0;
      ld_data  = '1;
      if (cyc == 40 && busy) n_ignored++;
    end
    start = 1'b0; ld_valid = 1'b0;
    ones = 0;
    for (int i = 0; i < NW; i++) ones += int'(e[i]);
    exp_cyc = 2 + (2*N + 5) * (3 + NW + ones) + (DW + 2) + 1;
    checks++;
    if (cyc != exp_cyc) begin
      failures++; $display("FAIL cycles %0d expected %0d", cyc, exp_cyc);
    end
    got = '0; words = 0;
    while (words < WORDS) begin
      @(negedge clk);
      if (out_valid) begin got[words*64 +: 64] = out_data; words++; end
    end
    expv = modexp_ref(c, e, m);
    checks++;
    if (got !== expv) begin
      failures++; $display("FAIL result %h expected %h", got[K-1:0], expv[K-1:0]);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy after unload"); end
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t m, c, e;
    ld_valid = 0; start = 0; ld_sel = LD_R2; ld_idx = 0; ld_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // textbook toy RSA example (P=11, Q=7, N=77, E=13, D=37): 4^13 mod 77 = 53, 53^37 mod 77 = 4
    run_one(77, 4, 13);
    checks++; if (dut.res_q != K'(53)) begin failures++; $display("FAIL 4^13 mod 77"); end
    run_one(77, 53, 37);
    checks++; if (dut.res_q != K'(4)) begin failures++; $display("FAIL 53^37 mod 77"); end
    // exponent zero and one
    m = rnd(K) | (wide_t'(1) << (K-1)) | 1;
    run_one(m, rnd(K) % m, 0);
    run_one(m, rnd(K) % m, 1);
    for (int t = 0; t < NOPS; t++) begin
      m = rnd(K) | (wide_t'(1) << (K-1)) | 1;
      c = rnd(K) % m;
      e = rnd(K);
      run_one(m, c, e);
    end
    // maximal exponent over all scanned bits
    run_one(m, rnd(K) % m, (wide_t'(1) << NW) - 1);
    $display("mechanisms: pre=%0d sq=%0d mul=%0d lead_sq=%0d carry=%0d z=%0d sub=%0d words=%0d ignored=%0d",
             n_pre, n_sq, n_mul, n_lead_sq, n_carry, n_z, n_sub, n_out_words, n_ignored);
    checks++; if (n_pre == 0)     begin failures++; $display("FAIL no pre-processing"); end
    checks++; if (n_sq == 0)      begin failures++; $display("FAIL no squaring"); end
    checks++; if (n_mul == 0)     begin failures++; $display("FAIL no multiplication"); end
    checks++; if (n_lead_sq == 0) begin failures++; $display("FAIL no leading-zero squaring"); end
    checks++; if (n_carry == 0)   begin failures++; $display("FAIL no pending carry"); end
    checks++; if (n_z == 0)       begin failures++; $display("FAIL z never set"); end
    checks++; if (n_sub == 0)     begin failures++; $display("FAIL no reduction step"); end
    checks++; if (n_out_words == 0) begin failures++; $display("FAIL no output"); end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL no start while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
