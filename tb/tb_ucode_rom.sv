// tb_ucode_rom: self-checking test of the microprograms.
//
// Reads the microprogram store and executes it in the testbench with
// reference field arithmetic (operands read at the start of a step, all
// writes applied at its end), then compares the projective results, mapped
// back to affine, with affine point doubling and addition.  Also checks the
// program lengths (5 and 7 steps), the multiplication counts (10 and 20), the
// multiplier utilisation of a doubling followed by an addition (8 steps with
// three, 2 with two and 2 with one multiplier busy), that no step writes one
// register twice, and the INIT and INF helpers.
module tb_ucode_rom;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int M = 163;

  logic [UA_W-1:0] addr;
  uinst_t          uinst;
  fe_t             rf [NREG];
  int              checks = 0, failures = 0;
  int              util [4];
  int              nmul, nsteps;

  ucode_rom dut (.addr, .uinst);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Execute the program at `entry`; add_next enables conditional work.
  task automatic run_prog(input logic [UA_W-1:0] entry, input logic add_next);
    fe_t  prod [NMUL];
    fe_t  val  [NWP];
    logic live [NWP];
    int   busy;
    addr   = entry;
    nsteps = 0;
    nmul   = 0;
    forever begin
      #1;
      busy = 0;
      for (int s = 0; s < NMUL; s++) begin
        prod[s] = '0;
        if (uinst.m[s].en && (!uinst.m[s].cond || add_next)) begin
          prod[s] = gf_mul(rf[uinst.m[s].a], rf[uinst.m[s].b], M, R163);
          busy++;
        end
      end
      util[busy]++;
      nmul += busy;
      for (int w = 0; w < NWP; w++) begin
        live[w] = uinst.w[w].en && (!uinst.w[w].cond || add_next);
        val[w]  = uinst.w[w].add_en ? rf[uinst.w[w].add] : '0;
        for (int s = 0; s < NMUL; s++)
          if (uinst.w[w].pmask[s]) val[w] ^= prod[s];
      end
      for (int w = 0; w < NWP; w++)
        for (int v = w + 1; v < NWP; v++)
          if (live[w] && live[v])
            check($sformatf("no double write at %0d", addr), uinst.w[w].dst != uinst.w[v].dst);
      for (int w = 0; w < NWP; w++)
        if (live[w]) rf[uinst.w[w].dst] = val[w];
      nsteps++;
      if (uinst.last) break;
      addr = addr + 1'b1;
    end
  endtask

  function automatic logic same(input apt_t p, input apt_t q);
    return (p.inf == q.inf) && (p.inf || (p.x == q.x && p.y == q.y));
  endfunction

  initial begin
    fe_t  a, b, z, z2;
    apt_t p0, q, res, exp;
    for (int i = 0; i < NREG; i++) rf[i] = '0;
    for (int it = 0; it < 4; it++) begin
      rand_curve(M, R163, a, b, p0);
      // Q = projective form of 3*P0 with a random Z; P = P0 with Z = 1 or random
      q = pt_add(pt_dbl(p0, a, M, R163), p0, a, M, R163);
      z = rand_fe(M) | fe_t'(1);
      z2 = gf_sq(z, M, R163);
      rf[R_X] = gf_mul(q.x, z2, M, R163);
      rf[R_Y] = gf_mul(q.y, gf_mul(z2, z, M, R163), M, R163);
      rf[R_Z] = z;
      z = (it % 2 == 0) ? fe_t'(1) : (rand_fe(M) | fe_t'(1));
      z2 = gf_sq(z, M, R163);
      rf[R_PX] = gf_mul(p0.x, z2, M, R163);
      rf[R_PY] = gf_mul(p0.y, gf_mul(z2, z, M, R163), M, R163);
      rf[R_PZ] = z;
      rf[R_A] = a;
      rf[R_C] = gf_root4(b, M, R163);
      check("c^4 = b", gf_sq(gf_sq(rf[R_C], M, R163), M, R163) == b);

      // doubling followed by an addition: 12 steps, 30 multiplications
      for (int u = 0; u < 4; u++) util[u] = 0;
      run_prog(UA_DBL, 1'b1);
      check("doubling has 5 steps", nsteps == DBL_STEPS);
      check("doubling with precomputation: 12 products", nmul == 12);
      res = to_affine(rf[R_X], rf[R_Y], rf[R_Z], M, R163);
      exp = pt_dbl(q, a, M, R163);
      check("2Q", same(res, exp));
      run_prog(UA_ADD, 1'b0);
      check("addition has 7 steps", nsteps == ADD_STEPS);
      check("addition: 18 products in its own steps", nmul == 18);
      res = to_affine(rf[R_X], rf[R_Y], rf[R_Z], M, R163);
      exp = pt_add(exp, p0, a, M, R163);
      check("2Q + P", same(res, exp));
      check("8 steps use three multipliers", util[3] == 8);
      check("2 steps use two multipliers", util[2] == 2);
      check("2 steps use one multiplier", util[1] == 2);

      // doubling alone: 10 multiplications
      run_prog(UA_DBL, 1'b0);
      check("plain doubling: 10 products", nmul == 10);
      res = to_affine(rf[R_X], rf[R_Y], rf[R_Z], M, R163);
      exp = pt_dbl(exp, a, M, R163);
      check("2(2Q+P)", same(res, exp));

      // standalone addition with PRE
      rf[R_U] = '0; rf[R_W] = '0;
      run_prog(UA_PRE, 1'b0);
      check("PRE has 2 steps", nsteps == 2);
      run_prog(UA_ADD, 1'b0);
      res = to_affine(rf[R_X], rf[R_Y], rf[R_Z], M, R163);
      exp = pt_add(exp, p0, a, M, R163);
      check("PRE + ADD", same(res, exp));

      // INIT and INF
      run_prog(UA_INIT, 1'b0);
      check("INIT copies P", rf[R_X] == rf[R_PX] && rf[R_Y] == rf[R_PY] && rf[R_Z] == rf[R_PZ]);
      run_prog(UA_INF, 1'b0);
      check("INF clears Z", rf[R_Z] == '0 && nsteps == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
