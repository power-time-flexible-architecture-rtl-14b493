// tb_power_mgmt: self-checking test of the power management unit.
//
// Sweeps the slot and write-port enable/conditional bits against add_next,
// the multiplier start/busy inputs in both modes, and the word length, and
// compares every output with the gating rules worked out in the testbench.
module tb_power_mgmt;
  import ecc_pkg::*;

  localparam int unsigned K = 163, D = 8;
  localparam int unsigned ND = (K + D - 1) / D;

  logic                mode_single;
  logic [7:0]          m;
  mslot_t [NMUL-1:0]   slots;
  wport_t [NWP-1:0]    wports;
  logic                add_next;
  logic [NMUL-1:0]     mult_start, mult_busy;
  logic [NMUL-1:0]     slot_live, mult_ce;
  logic [NWP-1:0]      wport_live;
  logic [ND-1:0]       dig_en;
  int                  checks = 0, failures = 0;

  power_mgmt #(.K(K), .D(D)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    slots = '0; wports = '0; m = 8'd163;
    for (int v = 0; v < 512; v++) begin
      logic [NMUL-1:0] exp_live, exp_wlive, exp_ce;
      for (int s = 0; s < NMUL; s++) begin
        slots[s].en    = $urandom_range(0, 1);
        slots[s].cond  = $urandom_range(0, 1);
        wports[s].en   = $urandom_range(0, 1);
        wports[s].cond = $urandom_range(0, 1);
      end
      add_next    = v[0];
      mode_single = v[1];
      mult_start  = 3'(v >> 2);
      mult_busy   = 3'(v >> 5);
      #1;
      for (int s = 0; s < NMUL; s++) begin
        exp_live[s]  = slots[s].en & ~(slots[s].cond & ~add_next);
        exp_wlive[s] = wports[s].en & ~(wports[s].cond & ~add_next);
        exp_ce[s]    = (mult_start[s] | mult_busy[s]) & ~(mode_single & (s != 0));
      end
      check("slot_live", slot_live == exp_live);
      check("wport_live", wport_live == exp_wlive);
      check("mult_ce", mult_ce == exp_ce);
    end
    foreach (m_list[i]) begin
      m = m_list[i];
      #1;
      for (int g = 0; g < ND; g++)
        check($sformatf("dig_en m=%0d g=%0d", m, g), dig_en[g] == ((g * D) < m));
      // number of enabled digit groups is ceil(m/D)
      check("active digits", $countones(dig_en) == (m + D - 1) / D);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_list[6] = '{163, 160, 113, 9, 8, 1};
endmodule
