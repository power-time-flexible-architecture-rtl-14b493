// ucode_rom: microprogram store of the point processor.
//
// Holds the schedules of the projective point doubling (5 steps) and point
// addition (7 steps) on three parallel multipliers, plus three short helper
// programs.  Coordinates are Jacobian projective, x = X/Z^2, y = Y/Z^3, on
// y^2 + xy = x^3 + a x^2 + b over GF(2^m).  Notation below: Q = (X1,Y1,Z1) in
// registers X,Y,Z; P = (X2,Y2,Z2) in PX,PY,PZ; c = b^(1/4) in C; Pi is the
// product of multiplier i in the current step.
//
// Doubling (10 multiplications, critical path of 5):
//   Z3 = X1 Z1^2,  X3 = (X1 + c Z1^2)^4,  L = Z3 + X1^2 + Y1 Z1,
//   Y3 = X1^4 Z3 + L X3
// Addition (20 multiplications, critical path of 7):
//   l1 = X1 Z2^2, l2 = X2 Z1^2, l3 = l1+l2, l4 = Y1 Z2^3, l5 = Y2 Z1^3,
//   l6 = l4+l5, l7 = Z1 l3, l8 = l6 X2 + l7 Y2, Z3 = l7 Z2, l9 = l6 + Z3,
//   X3 = a Z3^2 + l6 l9 + l3^3,  Y3 = l9 X3 + l8 l7^2
// The two multiplications that depend only on Z2 (Z2^2 into U, Z2^3 into W) are
// moved into the idle slots of doubling steps 3 and 4, marked conditional, so
// a doubling followed by an addition takes 5 + 7 = 12 steps, the length of
// the two critical paths.  Over those 12 steps all three multipliers are busy
// in 8, two are busy in 2 and one is busy in 2.  The four field additions of
// the doubling and the seven of the addition are all absorbed into writes.  A standalone addition first
// runs PRE (U = PZ^2, W = PZ^3).
//
// Interface: combinational read, addr -> uinst.  Some fields are the same in
// every microinstruction (for instance no write port 0 is conditional); they
// are kept so that all slots and ports share one format.  The formulas and the
// three-multiplier, 12-step bound follow the architecture; the register
// allocation and the step-by-step schedule are this design's own.
module ucode_rom
  import ecc_pkg::*;
(
  input  logic [UA_W-1:0] addr,
  output uinst_t          uinst
);

  // Helpers building the fields of a microinstruction.
  function automatic mslot_t mul(input reg_e a, input reg_e b);
    return '{en: 1'b1, cond: 1'b0, a: a, b: b};
  endfunction
  function automatic mslot_t mulc(input reg_e a, input reg_e b);
    return '{en: 1'b1, cond: 1'b1, a: a, b: b};
  endfunction
  function automatic mslot_t nomul();
    return '{en: 1'b0, cond: 1'b0, a: R_X, b: R_X};
  endfunction
  // dst = products(pm)
  function automatic wport_t wr(input reg_e dst, input logic [2:0] pm);
    return '{en: 1'b1, cond: 1'b0, dst: dst, pmask: pm, add_en: 1'b0, add: R_X};
  endfunction
  // dst = products(pm) ^ add
  function automatic wport_t wra(input reg_e dst, input logic [2:0] pm, input reg_e add);
    return '{en: 1'b1, cond: 1'b0, dst: dst, pmask: pm, add_en: 1'b1, add: add};
  endfunction
  function automatic wport_t wrc(input reg_e dst, input logic [2:0] pm);
    return '{en: 1'b1, cond: 1'b1, dst: dst, pmask: pm, add_en: 1'b0, add: R_X};
  endfunction
  function automatic wport_t nowr();
    return '{en: 1'b0, cond: 1'b0, dst: R_X, pmask: 3'b000, add_en: 1'b0, add: R_X};
  endfunction
  function automatic uinst_t ui(input mslot_t m0, input mslot_t m1, input mslot_t m2,
                                input wport_t w0, input wport_t w1, input wport_t w2,
                                input logic last);
    uinst_t u;
    u.m[0] = m0; u.m[1] = m1; u.m[2] = m2;
    u.w[0] = w0; u.w[1] = w1; u.w[2] = w2;
    u.last = last;
    return u;
  endfunction

  always_comb begin
    unique case (addr)
      // ---- point doubling -------------------------------------------------
      // D1: T0 = Z1^2, T1 = X1^2, T2 = X1^2 + Y1 Z1
      4'd0: uinst = ui(mul(R_Z, R_Z), mul(R_X, R_X), mul(R_Y, R_Z),
                       wr(R_T0, 3'b001), wr(R_T1, 3'b010), wr(R_T2, 3'b110), 1'b0);
      // D2: T3 = X1 + c Z1^2, Z = Z3 = X1 Z1^2, T2 = L = Z3 + X1^2 + Y1 Z1
      4'd1: uinst = ui(mul(R_C, R_T0), mul(R_X, R_T0), nomul(),
                       wra(R_T3, 3'b001, R_X), wr(R_Z, 3'b010), wra(R_T2, 3'b010, R_T2), 1'b0);
      // D3: T3 = (X1 + c Z1^2)^2, T1 = X1^4, [U = Z2^2]
      4'd2: uinst = ui(mul(R_T3, R_T3), mul(R_T1, R_T1), mulc(R_PZ, R_PZ),
                       wr(R_T3, 3'b001), wr(R_T1, 3'b010), wrc(R_U, 3'b100), 1'b0);
      // D4: X = X3 = (X1 + c Z1^2)^4, T1 = X1^4 Z3, [W = Z2^3]
      4'd3: uinst = ui(mul(R_T3, R_T3), mul(R_T1, R_Z), mulc(R_PZ, R_U),
                       wr(R_X, 3'b001), wr(R_T1, 3'b010), wrc(R_W, 3'b100), 1'b0);
      // D5: Y = Y3 = L X3 + X1^4 Z3
      4'd4: uinst = ui(mul(R_T2, R_X), nomul(), nomul(),
                       wra(R_Y, 3'b001, R_T1), nowr(), nowr(), 1'b1);
      // ---- point addition -------------------------------------------------
      // A1: T0 = Z1^2, T1 = l1 = X1 Z2^2, T2 = l4 = Y1 Z2^3
      4'd5: uinst = ui(mul(R_Z, R_Z), mul(R_X, R_U), mul(R_Y, R_W),
                       wr(R_T0, 3'b001), wr(R_T1, 3'b010), wr(R_T2, 3'b100), 1'b0);
      // A2: T3 = l3 = X2 Z1^2 + l1, T4 = Z1^3
      4'd6: uinst = ui(mul(R_PX, R_T0), mul(R_Z, R_T0), nomul(),
                       wra(R_T3, 3'b001, R_T1), wr(R_T4, 3'b010), nowr(), 1'b0);
      // A3: T5 = l7 = Z1 l3, T1 = l3^2, T2 = l6 = Y2 Z1^3 + l4
      4'd7: uinst = ui(mul(R_Z, R_T3), mul(R_T3, R_T3), mul(R_PY, R_T4),
                       wr(R_T5, 3'b001), wr(R_T1, 3'b010), wra(R_T2, 3'b100, R_T2), 1'b0);
      // A4: Z = Z3 = l7 Z2, T4 = l8 = l6 X2 + l7 Y2, T6 = l9 = Z3 + l6
      4'd8: uinst = ui(mul(R_T5, R_PZ), mul(R_T2, R_PX), mul(R_T5, R_PY),
                       wr(R_Z, 3'b001), wr(R_T4, 3'b110), wra(R_T6, 3'b001, R_T2), 1'b0);
      // A5: T0 = Z3^2, T5 = l7^2, T3 = l3^3
      4'd9: uinst = ui(mul(R_Z, R_Z), mul(R_T5, R_T5), mul(R_T3, R_T1),
                       wr(R_T0, 3'b001), wr(R_T5, 3'b010), wr(R_T3, 3'b100), 1'b0);
      // A6: X = X3 = a Z3^2 + l6 l9 + l3^3, T7 = l8 l7^2
      4'd10: uinst = ui(mul(R_A, R_T0), mul(R_T2, R_T6), mul(R_T4, R_T5),
                        wra(R_X, 3'b011, R_T3), wr(R_T7, 3'b100), nowr(), 1'b0);
      // A7: Y = Y3 = l9 X3 + l8 l7^2
      4'd11: uinst = ui(mul(R_T6, R_X), nomul(), nomul(),
                        wra(R_Y, 3'b001, R_T7), nowr(), nowr(), 1'b1);
      // ---- PRE: precompute U = Z2^2, W = Z2^3 -----------------------------
      4'd12: uinst = ui(mul(R_PZ, R_PZ), nomul(), nomul(),
                        wr(R_U, 3'b001), nowr(), nowr(), 1'b0);
      4'd13: uinst = ui(mul(R_PZ, R_U), nomul(), nomul(),
                        wr(R_W, 3'b001), nowr(), nowr(), 1'b1);
      // ---- INIT: Q = P ----------------------------------------------------
      4'd14: uinst = ui(nomul(), nomul(), nomul(),
                        wra(R_X, 3'b000, R_PX), wra(R_Y, 3'b000, R_PY), wra(R_Z, 3'b000, R_PZ), 1'b1);
      // ---- INF: Q = point at infinity, (0, 0, 0) ---------------------------
      default: uinst = ui(nomul(), nomul(), nomul(),
                          wr(R_X, 3'b000), wr(R_Y, 3'b000), wr(R_Z, 3'b000), 1'b1);
    endcase
  end

endmodule
