// power_mgmt: power management unit.
//
// Keeps blocks that a computation does not use from consuming dynamic power,
// in the two situations the architecture names:
//   * not all three multipliers are needed: a multiplier gets its clock enable
//     only in the cycles where it starts or runs a multiplication.  In
//     single-multiplier mode multipliers 1 and 2 are never enabled at all.
//     Microprogram slots marked conditional (work needed only when a point
//     addition follows) are dropped when no addition follows, so their
//     multiplier also stays idle;
//   * the application word length m is below the processor word length K:
//     the register-file digit groups that lie wholly at or above bit m get no
//     write enable, so they are never clocked and hold zero.
// The clock enables are meant to be mapped onto integrated clock-gating
// cells by synthesis; with all registers of an idle block held, its
// combinational logic sees constant inputs and stays static.
//
// Purely combinational.  The gating policy follows the architecture; the
// signal-level form (enables rather than gated clocks, digit-group
// granularity of D bits) is this design's choice.
module power_mgmt
  import ecc_pkg::*;
#(
  parameter int unsigned K = 163,
  parameter int unsigned D = 8
) (
  input  logic                     mode_single,  // 1: only multiplier 0 is used
  input  logic [$clog2(K+1)-1:0]   m,            // application word length
  input  mslot_t [NMUL-1:0]        slots,        // current microinstruction:
  input  wport_t [NWP-1:0]         wports,       //   its slots and write ports
  input  logic                     add_next,     // a point addition follows
  input  logic [NMUL-1:0]          mult_start,
  input  logic [NMUL-1:0]          mult_busy,
  output logic [NMUL-1:0]          slot_live,    // slots that really execute
  output logic [NWP-1:0]           wport_live,   // write ports that really write
  output logic [NMUL-1:0]          mult_ce,      // multiplier clock enables
  output logic [(K+D-1)/D-1:0]     dig_en        // register digit-group enables
);

  localparam int unsigned ND = (K + D - 1) / D;

  always_comb begin
    for (int s = 0; s < NMUL; s++)
      slot_live[s] = slots[s].en && (!slots[s].cond || add_next);
    for (int w = 0; w < NWP; w++)
      wport_live[w] = wports[w].en && (!wports[w].cond || add_next);
    for (int j = 0; j < NMUL; j++)
      mult_ce[j] = (mult_start[j] || mult_busy[j]) && (j == 0 || !mode_single);
    for (int g = 0; g < ND; g++)
      dig_en[g] = (32'(g) * D) < 32'(m);
  end

endmodule
