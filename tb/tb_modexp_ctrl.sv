// Self-checking testbench for the exponentiator's control unit (modexp_ctrl).
//
// The multiplier and the final reduction are replaced by simple responders
// with random latency. For random 12-bit exponents the testbench records the
// operand/destination triple of every multiplication the unit starts and
// compares the sequence with the left-to-right binary method:
//   (R2,C ->CR), (R2,1 ->P), per bit: (P,P ->P) and, for a 1 bit, (P,CR ->P),
//   then (P,1 ->P)
// It also checks the prep pulse, the write strobe on every multiplication,
// the number of exponent shifts, the reduction start and the done pulse.
module tb_modexp_ctrl;
  import mm_pkg::*;

  localparam int unsigned EBITS = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, e_msb, mm_done, red_done;
  logic prep, mm_start, mm_wr, e_shift, red_start, busy, done;
  opa_e opa;
  opb_e opb;
  dst_e dst;

  modexp_ctrl #(.EBITS(EBITS)) dut (.*);

  int checks = 0;
  int failures = 0;

  // exponent register model
  logic [EBITS-1:0] e_reg;
  assign e_msb = e_reg[EBITS-1];
  always @(posedge clk) if (e_shift) e_reg <= e_reg << 1;

  // multiplier responder: done 2..7 cycles after start
  int mm_cnt = -1;
  always @(posedge clk) begin
    mm_done <= 1'b0;
    if (!rst_n) mm_cnt <= -1;
    else if (mm_start) mm_cnt <= 1 + ($urandom % 6);
    else if (mm_cnt > 0) mm_cnt <= mm_cnt - 1;
    else if (mm_cnt == 0) begin mm_done <= 1'b1; mm_cnt <= -1; end
  end
  // reduction responder: done 3 cycles after start
  int red_cnt = -1;
  always @(posedge clk) begin
    red_done <= 1'b0;
    if (!rst_n) red_cnt <= -1;
    else if (red_start) red_cnt <= 2;
    else if (red_cnt > 0) red_cnt <= red_cnt - 1;
    else if (red_cnt == 0) begin red_done <= 1'b1; red_cnt <= -1; end
  end

  // observed operations
  logic [4:0] ops [$];
  int n_prep, n_wr, n_shift, n_red, n_done;
  bit prep_seen;
  always @(posedge clk) if (rst_n) begin
    if (mm_start) begin
      ops.push_back({opa, opb, dst});
      checks++;
      if (!prep_seen) begin failures++; $display("FAIL multiplication before prep"); end
    end
    if (prep) begin n_prep++; prep_seen = 1'b1; end
    if (mm_wr) n_wr++;
    if (mm_done && !mm_wr) begin
      checks++; failures++; $display("FAIL result not written");
    end
    if (e_shift) n_shift++;
    if (red_start) n_red++;
    if (done) n_done++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] expq [$];
    logic [EBITS-1:0] e;
    start = 0; e_reg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      e = EBITS'($urandom);
      if (t == 0) e = '0;
      if (t == 1) e = '1;
      e_reg = e;
      ops.delete(); expq.delete();
      n_prep = 0; n_wr = 0; n_shift = 0; n_red = 0; n_done = 0; prep_seen = 0;
      expq.push_back({OPA_R2, OPB_C, DST_CR});
      expq.push_back({OPA_R2, OPB_ONE, DST_P});
      for (int i = EBITS - 1; i >= 0; i--) begin
        expq.push_back({OPA_P, OPB_P, DST_P});
        if (e[i]) expq.push_back({OPA_P, OPB_CR, DST_P});
      end
      expq.push_back({OPA_P, OPB_ONE, DST_P});
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy after start"); end
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
      checks++;
      if (ops.size() != expq.size()) begin
        failures++; $display("FAIL e=%b: %0d operations, expected %0d", e, ops.size(), expq.size());
      end else begin
        foreach (expq[i]) begin
          checks++;
          if (ops[i] !== expq[i]) begin
            failures++; $display("FAIL e=%b op %0d: %b expected %b", e, i, ops[i], expq[i]);
          end
        end
      end
      checks++; if (n_prep != 1)          begin failures++; $display("FAIL prep count %0d", n_prep); end
      checks++; if (n_wr != expq.size())  begin failures++; $display("FAIL write count %0d", n_wr); end
      checks++; if (n_shift != EBITS)     begin failures++; $display("FAIL shift count %0d", n_shift); end
      checks++; if (n_red != 1)           begin failures++; $display("FAIL reduction count %0d", n_red); end
      checks++; if (n_done != 1)          begin failures++; $display("FAIL done count %0d", n_done); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
