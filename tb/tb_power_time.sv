// tb_power_time: the power-time trade-off of the processor, measured.
//
// Runs the same scalar multiplication nP (random 163-bit n, GF(2^163)) once on
// three multipliers and once on one multiplier, and once more at application
// word length 113.  For each run it records the clock cycles and the
// multiplier-active cycles (the sum over the three multipliers of the cycles
// their clock enable is high, a proxy for multiplier switching energy).  It
// checks that both modes give the reference result, that they do the same
// multiplier work within a few percent, that triple mode needs at least 2.4
// times fewer cycles (30 multiplications in 12 instead of 30 steps per
// doubling-and-addition), and that a point doubling plus addition takes 12
// multiplier steps in triple mode.  The fewer cycles are what allows a lower
// clock frequency, and with it a lower supply voltage, for the same latency.
module tb_power_time;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned K = 163;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [7:0]       field_m = 8'd163;
  logic [K-1:0]     field_r = R163;
  logic             cmd_valid = 1'b0, cmd_single = 1'b0;
  logic [1:0]       cmd_op = 2'd0;
  logic [K-1:0]     cmd_scalar = '0;
  logic             cmd_ready, done;
  logic             host_we = 1'b0;
  logic [RA_W-1:0]  host_addr = '0, host_raddr = '0;
  logic [K-1:0]     host_wdata = '0, host_rdata;
  logic [NMUL-1:0]  mult_active;
  int               checks = 0, failures = 0;
  longint           active_cyc, steps;

  ecc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    active_cyc += $countones(mult_active);
    if (dut.wr_go) steps++;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wreg(input reg_e r, input fe_t v);
    @(negedge clk);
    host_we = 1'b1; host_addr = r; host_wdata = v;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic rreg(input reg_e r, output fe_t v);
    host_raddr = r;
    #1;
    v = host_rdata;
  endtask

  task automatic run(input op_e op, input fe_t n, input logic single,
                     output longint cycles, output longint act, output longint nsteps);
    @(negedge clk);
    active_cyc = 0; steps = 0;
    cmd_op = op; cmd_scalar = n; cmd_single = single; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    act = active_cyc;
    nsteps = steps;
  endtask

  task automatic setup(input int m, input fe_t r, output fe_t a, output apt_t p);
    fe_t b;
    field_m = 8'(m); field_r = r;
    rand_curve(m, r, a, b, p);
    wreg(R_A, a);
    wreg(R_C, gf_root4(b, m, r));
    wreg(R_PX, p.x); wreg(R_PY, p.y); wreg(R_PZ, fe_t'(1));
  endtask

  task automatic check_result(input string what, input apt_t exp, input int m, input fe_t r);
    fe_t  x, y, z;
    apt_t res;
    rreg(R_X, x); rreg(R_Y, y); rreg(R_Z, z);
    res = to_affine(x, y, z, m, r);
    check(what, res.inf == exp.inf && res.x == exp.x && res.y == exp.y);
  endtask

  initial begin
    fe_t    a, n;
    apt_t   p, exp;
    longint c3, a3, s3, c1, a1, s1, cw, aw, sw, cd, ad, sd;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    setup(163, R163, a, p);
    n = rand_fe(163);
    n[162] = 1'b1;
    exp = pt_smul(n, p, a, 163, R163);
    run(OP_SMUL, n, 1'b0, c3, a3, s3);
    check_result("nP, three multipliers", exp, 163, R163);
    run(OP_SMUL, n, 1'b1, c1, a1, s1);
    check_result("nP, one multiplier", exp, 163, R163);

    // one doubling followed by one addition (n = 3): INIT + DBL + ADD
    run(OP_SMUL, fe_t'(3), 1'b0, cd, ad, sd);
    check_result("3P", pt_smul(fe_t'(3), p, a, 163, R163), 163, R163);
    check($sformatf("doubling + addition in 12 steps (%0d)", sd - 1), sd - 1 == 12);

    setup(113, R113, a, p);
    n = rand_fe(113);
    n[112] = 1'b1;
    exp = pt_smul(n, p, a, 113, R113);
    run(OP_SMUL, n, 1'b0, cw, aw, sw);
    check_result("nP, GF(2^113)", exp, 113, R113);

    $display("mode                 cycles   mult-active cycles   steps");
    $display("three multipliers  %8d   %18d   %5d", c3, a3, s3);
    $display("one multiplier     %8d   %18d   %5d", c1, a1, s1);
    $display("GF(2^113), three   %8d   %18d   %5d", cw, aw, sw);
    $display("speed-up of three over one multiplier: %0.2f", real'(c1) / real'(c3));
    check("triple mode at least 2.4x fewer cycles", real'(c1) >= 2.4 * real'(c3));
    check("same multiplier work in both modes (within 5%)",
          real'(a1) <= 1.05 * real'(a3) && real'(a3) <= 1.05 * real'(a1));
    check("shorter word length takes fewer cycles", cw < c3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
