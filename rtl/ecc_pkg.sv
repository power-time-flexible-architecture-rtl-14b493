// ecc_pkg: shared definitions of the GF(2^k) elliptic curve point processor.
//
// The processor keeps every field element of a point operation in one register
// file and runs each point doubling or point addition as a short microprogram.
// Every microprogram step issues up to three multiplications (one per digit
// serial-parallel multiplier) and then up to three register writes, each of
// which is an XOR of any subset of the three products and, optionally, one
// register operand (the multiply-add of the architecture).
//
// This package holds what the modules share: the register map, the
// microinstruction format, the program entry points and the command codes.
// The number of multipliers (three) is the architecture's; the register map,
// the encoding and the program layout are this implementation's choices.
package ecc_pkg;

  // Number of multipliers working in parallel (architecture value).
  localparam int unsigned NMUL = 3;
  // Number of register-file write ports used by one microinstruction.
  localparam int unsigned NWP  = 3;

  // Register map.  Q = (X, Y, Z) is the working point (also the result),
  // P = (PX, PY, PZ) the second operand / base point, A the curve coefficient a,
  // C the fourth root of b, U = PZ^2 and W = PZ^3, T0..T7 intermediates.
  localparam int unsigned NREG = 18;
  localparam int unsigned RA_W = 5;
  typedef enum logic [RA_W-1:0] {
    R_X  = 5'd0,  R_Y  = 5'd1,  R_Z  = 5'd2,
    R_PX = 5'd3,  R_PY = 5'd4,  R_PZ = 5'd5,
    R_A  = 5'd6,  R_C  = 5'd7,  R_U  = 5'd8,  R_W  = 5'd9,
    R_T0 = 5'd10, R_T1 = 5'd11, R_T2 = 5'd12, R_T3 = 5'd13,
    R_T4 = 5'd14, R_T5 = 5'd15, R_T6 = 5'd16, R_T7 = 5'd17
  } reg_e;

  // One multiplier slot of a microinstruction: product a*b.
  // cond = 1 marks work that is only needed when a point addition follows
  // (precomputation of PZ^2, PZ^3); the slot is skipped and its multiplier
  // left idle otherwise.
  typedef struct packed {
    logic             en;
    logic             cond;
    logic [RA_W-1:0]  a;
    logic [RA_W-1:0]  b;
  } mslot_t;

  // One write port of a microinstruction:
  //   reg[dst] <= (XOR of products selected by pmask) ^ (add_en ? reg[add] : 0)
  typedef struct packed {
    logic             en;
    logic             cond;
    logic [RA_W-1:0]  dst;
    logic [NMUL-1:0]  pmask;
    logic             add_en;
    logic [RA_W-1:0]  add;
  } wport_t;

  typedef struct packed {
    mslot_t [NMUL-1:0] m;
    wport_t [NWP-1:0]  w;
    logic              last;   // final step of its program
  } uinst_t;

  // Microprogram store layout.
  localparam int unsigned UA_W   = 4;
  localparam logic [UA_W-1:0] UA_DBL  = 4'd0;   // 5 steps: point doubling
  localparam logic [UA_W-1:0] UA_ADD  = 4'd5;   // 7 steps: point addition
  localparam logic [UA_W-1:0] UA_PRE  = 4'd12;  // 2 steps: U = PZ^2, W = PZ^3
  localparam logic [UA_W-1:0] UA_INIT = 4'd14;  // 1 step : Q = P
  localparam logic [UA_W-1:0] UA_INF  = 4'd15;  // 1 step : Q = point at infinity

  localparam int unsigned DBL_STEPS = 5;
  localparam int unsigned ADD_STEPS = 7;

  // Commands accepted by the processor.
  typedef enum logic [1:0] {
    OP_DBL  = 2'd0,   // Q = 2Q
    OP_ADD  = 2'd1,   // Q = Q + P
    OP_SMUL = 2'd2    // Q = n * P (binary method, most significant bit first)
  } op_e;

endpackage
