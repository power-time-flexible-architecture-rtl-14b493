// tb_gf2m_dsmul: self-checking test of the digit serial-parallel multiplier.
//
// Random products in GF(2^163) (x^163+x^7+x^6+x^3+1), GF(2^113) (x^113+x^9+1)
// and at a word length that is not a multiple of the digit size, compared with
// an LSB-first bit-serial reference.  Checks the latency from start to done
// (the start cycle plus ceil(m/D) digit cycles), and that a multiplication
// frozen by ce = 0 keeps its state and still finishes correctly.  The digit groups above m are gated as
// in the processor, and the shorter word lengths run after full-length
// products, so values left in the gated groups must not leak into results.
module tb_gf2m_dsmul;
  import gf_ref_pkg::*;

  localparam int unsigned K = 163;
  localparam int unsigned D = 8;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          ce = 1'b1, start = 1'b0;
  logic [K-1:0]  a = '0, b = '0, r = '0;
  logic [7:0]    m = 8'd163;
  logic [(K+D-1)/D-1:0] dig_en;
  logic          busy, done;
  logic [K-1:0]  p;
  int            checks = 0, failures = 0;

  gf2m_dsmul #(.K(K), .D(D)) dut (.*);

  always #5 clk = ~clk;

  // word-length gating as the power management unit drives it
  always_comb
    for (int g = 0; g < (K + D - 1) / D; g++) dig_en[g] = (g * D) < int'(m);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One multiplication; `freeze` cycles of ce = 0 are inserted after 3 digits.
  task automatic run(input int mm, input fe_t rr, input fe_t aa, input fe_t bb, input int freeze);
    int   cyc;
    fe_t  held;
    m = 8'(mm); r = rr; a = aa; b = bb;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin
      if (cyc == 3 && freeze > 0) begin
        ce   = 1'b0;
        held = p;
        repeat (freeze) begin
          @(negedge clk);
          cyc++;
        end
        check("frozen accumulator holds", p == held && busy);
        ce = 1'b1;
      end
      @(negedge clk);
      cyc++;
    end
    check($sformatf("product m=%0d", mm), p == gf_mul(aa, bb, mm, rr));
    check($sformatf("latency m=%0d cyc=%0d", mm, cyc), cyc == (mm + D - 1) / D + 1 + freeze);
  endtask

  initial begin
    fe_t rr;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle after reset", !busy && !done);
    // corner operands
    run(163, R163, fe_t'(1), fe_t'(1), 0);
    run(163, R163, fe_t'(1) << 162, fe_t'(1) << 162, 0);
    run(163, R163, fmask(163), fmask(163), 0);
    for (int i = 0; i < 40; i++) run(163, R163, rand_fe(163), rand_fe(163), 0);
    for (int i = 0; i < 20; i++) run(113, R113, rand_fe(113), rand_fe(113), 0);
    for (int i = 0; i < 10; i++) begin
      rr = rand_fe(100) | fe_t'(1);
      run(100, rr, rand_fe(100), rand_fe(100), 0);
    end
    run(163, R163, rand_fe(163), rand_fe(163), 5);
    run(113, R113, rand_fe(113), rand_fe(113), 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
