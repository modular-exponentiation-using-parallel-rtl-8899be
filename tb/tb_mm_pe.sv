// Self-checking testbench for one processing element (mm_pe).
//
// Drives the cell with random digits, broadcast operands and neighbour inputs
// over alternating even and odd cycles and compares every output with a model
// of the cell kept here:
//   even: hi_out = floor(a*b_j / beta)
//         u = <a*b_j> + hi_in + k1e;  W = <u> + s_in + k2e
//   odd : hi_out = floor(q*m_{j+1} / beta)
//         u = <q*m_{j+1}> + hi_in + k1o;  s_j = <u> + W + k2o
// where <x> is x mod beta, each sum's carry-out is saved and fed back into the
// same sum one iteration later (k1e, k2e: even carries, k1o, k2o: odd
// carries), and c_out is the number of saved carries. It also checks that
// load captures the digits and clears the state, that nothing changes while en
// is low, and the key property of the cell: the total value it accounts for,
// s_j + beta * (pending carries), grows per iteration by exactly
// s_in + <a*b_j> + hi_in(even) + <q*m_{j+1}> + hi_in(odd).
module tb_mm_pe;
  import mm_pkg::*;

  localparam int unsigned BETA = 1 << DW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          load, en, odd_even;
  logic [DW-1:0] b_in, m_in, y_in, hi_in, hi_out, s_in, s_out;
  logic [CW-1:0] c_out;

  mm_pe dut (.*);

  int checks = 0;
  int failures = 0;

  // model state
  int unsigned mb, mm, ms, mw, k1e, k2e, k1o, k2o;
  longint unsigned total, added;

  task automatic chk(input longint unsigned got, input longint unsigned expv, input string what);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned p;
    int unsigned u, t;
    load = 0; en = 0; odd_even = 0;
    b_in = 0; m_in = 0; y_in = 0; hi_in = 0; s_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 200; op++) begin
      // load new digits
      @(negedge clk);
      b_in = DW'($urandom); m_in = DW'($urandom);
      if (op == 0) begin b_in = '1; m_in = '1; end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      mb = b_in; mm = m_in; ms = 0; mw = 0; k1e = 0; k2e = 0; k1o = 0; k2o = 0;
      total = 0;
      chk(s_out, 0, "s cleared by load");
      chk(c_out, 0, "carries cleared by load");
      for (int it = 0; it < 8; it++) begin
        // idle cycle: en low, nothing may change
        if (it == 3) begin
          en = 1'b0; y_in = DW'($urandom);
          @(negedge clk);
          chk(s_out, ms, "s held while idle");
        end
        // even half
        en = 1'b1; odd_even = 1'b0;
        y_in = DW'($urandom); hi_in = DW'($urandom % (BETA - 1)); s_in = DW'($urandom);
        if (op == 0) begin y_in = '1; hi_in = DW'(BETA - 2); s_in = '1; end
        #1;
        p = longint'(y_in) * longint'(mb);
        chk(hi_out, p >> DW, "phi_j");
        added = (p % BETA) + hi_in + s_in;
        u = int'(p % BETA) + hi_in + k1e;
        k1e = u / BETA;
        t = (u % BETA) + s_in + k2e;
        k2e = t / BETA;
        mw = t % BETA;
        @(negedge clk);
        // odd half
        odd_even = 1'b1;
        y_in = DW'($urandom); hi_in = DW'($urandom % (BETA - 1));
        if (op == 0) begin y_in = '1; hi_in = DW'(BETA - 2); end
        #1;
        p = longint'(y_in) * longint'(mm);
        chk(hi_out, p >> DW, "theta_{j+1}");
        added += (p % BETA) + hi_in;
        u = int'(p % BETA) + hi_in + k1o;
        k1o = u / BETA;
        t = (u % BETA) + mw + k2o;
        k2o = t / BETA;
        @(negedge clk);
        ms = t % BETA;
        chk(s_out, ms, "s_j");
        chk(c_out, k1e + k2e + k1o + k2o, "pending carries");
        // value conservation: this iteration's s_j + beta*carries equals the
        // previous carries (now at digit weight) plus everything added
        chk(longint'(s_out) + BETA * longint'(c_out), total + added, "value kept");
        total = longint'(c_out);
        en = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
