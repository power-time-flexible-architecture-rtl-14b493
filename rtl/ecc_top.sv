// ecc_top: power-time flexible GF(2^m) elliptic curve point processor.
//
// Computes point doubling, point addition and scalar multiplication nP on
// y^2 + xy = x^3 + a x^2 + b over GF(2^m), m <= K, in Jacobian projective
// coordinates (x = X/Z^2, y = Y/Z^3), so no field inversion is needed.
// Three digit serial-parallel multipliers work in parallel on the
// microprogrammed schedules of ucode_rom; three bit-parallel multiply-add
// units combine their products (and one register operand each) and write the
// results straight back into the register file.  A doubling followed by an
// addition then takes 12 multiplier steps, the length of the two critical
// paths.  Each command can instead run on one multiplier (cmd_single), and the
// power management unit keeps idle multipliers and register digits above the
// application word length m from switching.  Trading speed for power is then a
// matter of the clock frequency chosen for a given latency.
//
// Use: while cmd_ready is high, load the registers through the host port
// (register map in ecc_pkg: X,Y,Z working point; PX,PY,PZ second point;
// A = a; C = b^(1/4)), set field_m and field_r (f(x) = x^m + field_r), then
// pulse cmd_valid with cmd_op (0 doubling Q=2Q, 1 addition Q=Q+P, 2 scalar
// multiplication Q=nP with n = cmd_scalar).  `done` pulses when the result is
// in X,Y,Z; read it through host_raddr/host_rdata.  field_m and field_r must
// stay stable during a command.  Reset is synchronous, active low.
//
// Timing (triple mode, M = ceil(m/D)): a step takes M + 2 cycles, a doubling
// 5 steps, an addition 7 steps, plus one sequencing cycle per microprogram.
// The special cases of the addition formulas (P = +-Q, an operand at infinity)
// are not detected, as in the formulas themselves.
//
// The three multipliers, the multiply-add, the power management unit, the
// projective formulas and the single-multiplier fallback follow the
// architecture; widths, register map, schedule, command interface and the
// host port are this design's own.
module ecc_top
  import ecc_pkg::*;
#(
  parameter int unsigned K = 163,
  parameter int unsigned D = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // field configuration
  input  logic [$clog2(K+1)-1:0]   field_m,
  input  logic [K-1:0]             field_r,
  // command interface
  input  logic                     cmd_valid,
  input  logic [1:0]               cmd_op,
  input  logic [K-1:0]             cmd_scalar,
  input  logic                     cmd_single,
  output logic                     cmd_ready,
  output logic                     done,
  // host register port (use while cmd_ready)
  input  logic                     host_we,
  input  logic [RA_W-1:0]          host_addr,
  input  logic [K-1:0]             host_wdata,
  input  logic [RA_W-1:0]          host_raddr,
  output logic [K-1:0]             host_rdata,
  // power status: multiplier clock enables
  output logic [NMUL-1:0]          mult_active
);

  localparam int unsigned ND  = (K + D - 1) / D;
  localparam int unsigned NRD = 2 * NMUL + NWP;

  uinst_t                   uinst;
  logic [UA_W-1:0]          uaddr;
  logic                     add_next, mode_single, wr_go;
  logic [1:0]               opsel;
  logic [NMUL-1:0]          slot_live, mult_start, mult_busy, mult_done, mult_ce, cap_en;
  logic [NWP-1:0]           wport_live;
  logic [ND-1:0]            dig_en;
  logic [NRD-1:0][RA_W-1:0] raddr;
  logic [NRD-1:0][K-1:0]    rdata;
  logic [NWP-1:0]           we;
  logic [NWP-1:0][RA_W-1:0] waddr;
  logic [NWP-1:0][K-1:0]    wdata;
  logic [NMUL-1:0][K-1:0]   mop_a, mop_b, mprod, prod;
  logic [NMUL-1:0][K-1:0]   preg;          // product registers, single mode
  logic [K-1:0]             fmask;

  assign fmask = ~({K{1'b1}} << field_m);

  ecc_ctrl #(.K(K)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_op(op_e'(cmd_op)), .cmd_scalar, .cmd_single,
    .cmd_ready, .done,
    .uaddr, .ulast(uinst.last), .slot_live, .add_next, .mode_single,
    .mult_start, .mult_done, .opsel, .cap_en, .wr_go
  );

  ucode_rom u_rom (.addr(uaddr), .uinst);

  power_mgmt #(.K(K), .D(D)) u_pmu (
    .mode_single, .m(field_m), .slots(uinst.m), .wports(uinst.w), .add_next,
    .mult_start, .mult_busy, .slot_live, .wport_live, .mult_ce, .dig_en
  );

  // Register-file read ports: two operands per slot, one addend per write port.
  always_comb begin
    for (int s = 0; s < NMUL; s++) begin
      raddr[2*s]     = uinst.m[s].a;
      raddr[2*s + 1] = uinst.m[s].b;
    end
    for (int w = 0; w < NWP; w++)
      raddr[2*NMUL + w] = uinst.w[w].add;
  end

  ecc_regfile #(.K(K), .D(D), .NREG(NREG), .RA_W(RA_W), .NRD(NRD), .NWP(NWP)) u_rf (
    .clk, .rst_n, .dig_en,
    .raddr, .rdata,
    .we, .waddr, .wdata,
    .host_we(host_we && cmd_ready), .host_addr, .host_wdata(host_wdata & fmask),
    .host_raddr, .host_rdata
  );

  // Multiplier operands: slot j on multiplier j, or slot opsel on multiplier 0.
  always_comb begin
    for (int j = 0; j < NMUL; j++) begin
      mop_a[j] = rdata[2*j];
      mop_b[j] = rdata[2*j + 1];
    end
    if (mode_single) begin
      mop_a[0] = rdata[2*opsel];
      mop_b[0] = rdata[2*opsel + 1];
    end
  end

  for (genvar j = 0; j < NMUL; j++) begin : g_mul
    gf2m_dsmul #(.K(K), .D(D)) u_mul (
      .clk, .rst_n, .ce(mult_ce[j]), .start(mult_start[j]),
      .a(mop_a[j]), .b(mop_b[j]), .m(field_m), .r(field_r), .dig_en,
      .busy(mult_busy[j]), .done(mult_done[j]), .p(mprod[j])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) preg <= '0;
    else
      for (int s = 0; s < NMUL; s++)
        if (cap_en[s]) preg[s] <= mprod[0];
  end

  assign prod = mode_single ? preg : mprod;

  for (genvar w = 0; w < NWP; w++) begin : g_madd
    gf2m_madd #(.K(K), .N(NMUL)) u_madd (
      .p(prod), .sel(uinst.w[w].pmask), .add_en(uinst.w[w].add_en),
      .addend(rdata[2*NMUL + w]), .sum(wdata[w])
    );
    assign we[w]    = wr_go && wport_live[w];
    assign waddr[w] = uinst.w[w].dst;
  end

  assign mult_active = mult_ce;

endmodule
