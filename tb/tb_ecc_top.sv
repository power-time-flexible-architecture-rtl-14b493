// tb_ecc_top: end-to-end test of the point processor at its default size
// (K = 163, D = 8).
//
// On random curves y^2 + xy = x^3 + a x^2 + b through random points, it runs
//   * a point doubling and a point addition with random projective Z,
//   * scalar multiplications nP with random 163-bit n on three multipliers,
//   * a scalar multiplication on one multiplier (single mode),
//   * a scalar multiplication at application word length m = 113
//     (x^113 + x^9 + 1) on the 163-bit processor,
//   * n = 0 (point at infinity) and n = 1,
// converts each projective result to affine and compares it with affine
// reference arithmetic.  Command latencies are checked against the cycle
// formulas of the design.  It also counts how often each mechanism of the
// architecture acted (steps with all three multipliers, multiply-add writes,
// conditional slots gated off, single-multiplier steps, word-length gating)
// and fails if one never did.
module tb_ecc_top;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned K = 163, D = 8;

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

  ecc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters -------------------------------------------------
  int n_triple, n_madd, n_gated_slot, n_single_steps, n_wordgate, n_single_leak;
  always @(posedge clk) if (rst_n && !cmd_ready) begin
    if (dut.mult_start == 3'b111) n_triple++;
    for (int w = 0; w < NWP; w++)
      if (dut.we[w] && ($countones(dut.uinst.w[w].pmask) + int'(dut.uinst.w[w].add_en) >= 2)
          && dut.uinst.w[w].pmask != 3'b000)
        n_madd++;
    if (dut.wr_go && dut.uinst.m[2].en && !dut.slot_live[2]) n_gated_slot++;
    if (dut.wr_go && dut.mode_single) n_single_steps++;
    if (dut.mode_single && mult_active[2:1] != 2'b00) n_single_leak++;
    if (dut.wr_go && dut.dig_en != '1) n_wordgate++;
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

  task automatic command(input op_e op, input fe_t n, input logic single, output int cycles);
    @(negedge clk);
    cmd_op = op; cmd_scalar = n; cmd_single = single; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // load a point in projective form with the given Z
  task automatic load_point(input reg_e rx, input reg_e ry, input reg_e rz,
                            input apt_t p, input fe_t z, input int m, input fe_t r);
    fe_t z2;
    z2 = gf_sq(z, m, r);
    wreg(rx, gf_mul(p.x, z2, m, r));
    wreg(ry, gf_mul(p.y, gf_mul(z2, z, m, r), m, r));
    wreg(rz, z);
  endtask

  task automatic result(input int m, input fe_t r, output apt_t p);
    fe_t x, y, z;
    rreg(R_X, x); rreg(R_Y, y); rreg(R_Z, z);
    p = to_affine(x, y, z, m, r);
  endtask

  function automatic logic same(input apt_t p, input apt_t q);
    return (p.inf == q.inf) && (p.inf || (p.x == q.x && p.y == q.y));
  endfunction

  // cycle formulas: one accept cycle, one sequencing cycle per program plus
  // one final, and the steps.  Triple mode: a step with multiplications takes
  // M + 2 cycles, INIT/INF 2.  Single mode: l live slots of 3 take
  // l*(M+2) + (3-l) + 2 cycles.
  function automatic int step_cyc(input int live, input int mm, input logic single);
    if (!single) return (live == 0) ? 2 : mm + 2;
    return live * (mm + 2) + (3 - live) + 2;
  endfunction

  function automatic int smul_cycles(input fe_t n, input int mm, input logic single);
    int top, c, nprog;
    int dbl_a[5] = '{3, 2, 3, 3, 1};
    int dbl_n[5] = '{3, 2, 2, 2, 1};
    int add_l[7] = '{3, 2, 3, 3, 3, 3, 1};
    top = 0;
    for (int i = 0; i < KMAX; i++) if (n[i]) top = i;
    c = step_cyc(0, mm, single);                 // INIT
    nprog = 1;
    for (int i = top - 1; i >= 0; i--) begin
      for (int s = 0; s < 5; s++) c += step_cyc(n[i] ? dbl_a[s] : dbl_n[s], mm, single);
      nprog++;
      if (n[i]) begin
        for (int s = 0; s < 7; s++) c += step_cyc(add_l[s], mm, single);
        nprog++;
      end
    end
    return 1 + (nprog + 1) + c;
  endfunction

  function automatic fe_t rand_scalar(input int bits);
    fe_t n;
    n = rand_fe(bits);
    n[bits-1] = 1'b1;
    return n;
  endfunction

  initial begin
    fe_t  a, b, n, zv;
    apt_t p0, q, exp, res;
    int   cyc, mm;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("ready after reset", cmd_ready);

    // ---------------- GF(2^163) -------------------------------------------
    mm = (163 + D - 1) / D;
    rand_curve(163, R163, a, b, p0);
    wreg(R_A, a);
    wreg(R_C, gf_root4(b, 163, R163));

    // doubling of Q = 3P0 with random Z
    q = pt_add(pt_dbl(p0, a, 163, R163), p0, a, 163, R163);
    load_point(R_X, R_Y, R_Z, q, rand_fe(163) | fe_t'(1), 163, R163);
    command(OP_DBL, '0, 1'b0, cyc);
    exp = pt_dbl(q, a, 163, R163);
    result(163, R163, res);
    check("point doubling", same(res, exp));
    check($sformatf("doubling latency %0d", cyc), cyc == 5 * (mm + 2) + 3);

    // addition of P0 given with random Z
    load_point(R_PX, R_PY, R_PZ, p0, rand_fe(163) | fe_t'(1), 163, R163);
    command(OP_ADD, '0, 1'b0, cyc);
    exp = pt_add(exp, p0, a, 163, R163);
    result(163, R163, res);
    check("point addition", same(res, exp));
    check($sformatf("addition latency %0d", cyc), cyc == 9 * (mm + 2) + 4);

    // scalar multiplications, three multipliers
    load_point(R_PX, R_PY, R_PZ, p0, fe_t'(1), 163, R163);
    for (int it = 0; it < 2; it++) begin
      n = rand_scalar(163);
      command(OP_SMUL, n, 1'b0, cyc);
      exp = pt_smul(n, p0, a, 163, R163);
      result(163, R163, res);
      check($sformatf("nP, n=%0h", n), same(res, exp));
      check($sformatf("nP latency %0d", cyc), cyc == smul_cycles(n, mm, 1'b0));
    end

    // single-multiplier mode
    n = rand_scalar(24);
    command(OP_SMUL, n, 1'b1, cyc);
    exp = pt_smul(n, p0, a, 163, R163);
    result(163, R163, res);
    check("nP on one multiplier", same(res, exp));
    check($sformatf("single-mode latency %0d", cyc), cyc == smul_cycles(n, mm, 1'b1));
    check("single mode never enables multipliers 1 and 2", n_single_leak == 0);

    // n = 1 and n = 0
    command(OP_SMUL, fe_t'(1), 1'b0, cyc);
    result(163, R163, res);
    check("1P = P", same(res, p0));
    command(OP_SMUL, '0, 1'b0, cyc);
    rreg(R_Z, zv);
    check("0P = infinity", zv == '0);

    // ---------------- application word length 113 --------------------------
    field_m = 8'd113;
    field_r = R113;
    mm = (113 + D - 1) / D;
    rand_curve(113, R113, a, b, p0);
    wreg(R_A, a);
    wreg(R_C, gf_root4(b, 113, R113));
    load_point(R_PX, R_PY, R_PZ, p0, fe_t'(1), 113, R113);
    n = rand_scalar(113);
    command(OP_SMUL, n, 1'b0, cyc);
    exp = pt_smul(n, p0, a, 113, R113);
    result(113, R113, res);
    check("nP in GF(2^113)", same(res, exp));
    check($sformatf("GF(2^113) latency %0d", cyc), cyc == smul_cycles(n, mm, 1'b0));
    for (int r = 0; r < NREG; r++) begin
      rreg(reg_e'(r), zv);
      check($sformatf("reg %0d has nothing above bit 112", r), (zv >> 113) == '0);
    end

    // ---------------- mechanisms ---------------------------------------------
    $display("steps with three multipliers: %0d", n_triple);
    $display("multiply-add writes:          %0d", n_madd);
    $display("conditional slots gated off:  %0d", n_gated_slot);
    $display("single-multiplier steps:      %0d", n_single_steps);
    $display("steps under word-length gating: %0d", n_wordgate);
    check("three-multiplier steps happened", n_triple > 0);
    check("multiply-add happened", n_madd > 0);
    check("conditional slot gating happened", n_gated_slot > 0);
    check("single-multiplier mode happened", n_single_steps > 0);
    check("word-length gating happened", n_wordgate > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
