// ecc_regfile: register file of the point processor.
//
// NREG registers of K bits hold the working point, the second point, the curve
// constants and the intermediates of the doubling and addition programs.  It
// has NRD combinational read ports (two operands for each of the three
// multipliers plus one addend for each write port), NWP write ports driven by
// the multiply-add units, and one host port for loading operands and reading
// results while the processor is idle.
//
// Each register is split into D-bit digit groups.  A digit group is written
// only when its enable in dig_en is set; the power management unit clears the
// enables of the groups above the application word length, so those flip-flops
// are never clocked; the read ports return zero for them, so whatever they
// held from an earlier, longer word length is never seen.  When two write ports
// name the same register in one cycle the higher-numbered port wins (the
// microprograms never do this; an assertion checks it).  Host writes have the
// lowest priority.  All registers reset to zero.
//
// The register file itself is implied by the architecture; its size, its ports
// and the digit-group gating are this design's choices.
module ecc_regfile #(
  parameter int unsigned K    = 163,
  parameter int unsigned D    = 8,
  parameter int unsigned NREG = 18,
  parameter int unsigned RA_W = 5,
  parameter int unsigned NRD  = 9,
  parameter int unsigned NWP  = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [(K+D-1)/D-1:0]          dig_en,
  // read ports
  input  logic [NRD-1:0][RA_W-1:0]      raddr,
  output logic [NRD-1:0][K-1:0]         rdata,
  // write ports
  input  logic [NWP-1:0]                we,
  input  logic [NWP-1:0][RA_W-1:0]      waddr,
  input  logic [NWP-1:0][K-1:0]         wdata,
  // host port
  input  logic                          host_we,
  input  logic [RA_W-1:0]               host_addr,
  input  logic [K-1:0]                  host_wdata,
  input  logic [RA_W-1:0]               host_raddr,
  output logic [K-1:0]                  host_rdata
);

  localparam int unsigned ND = (K + D - 1) / D;

  logic [K-1:0] regs [NREG];

  // Bits of gated digit groups read as zero, whatever they last held.
  logic [K-1:0] rmask;
  always_comb begin
    for (int bt = 0; bt < K; bt++) rmask[bt] = dig_en[bt / D];
    for (int i = 0; i < NRD; i++)
      rdata[i] = (32'(raddr[i]) < NREG) ? (regs[raddr[i]] & rmask) : '0;
    host_rdata = (32'(host_raddr) < NREG) ? (regs[host_raddr] & rmask) : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < NREG; i++) begin
        logic         hit;
        logic [K-1:0] val;
        hit = host_we && (32'(host_addr) == i);
        val = host_wdata;
        for (int w = 0; w < NWP; w++)
          if (we[w] && (32'(waddr[w]) == i)) begin
            hit = 1'b1;
            val = wdata[w];
          end
        if (hit)
          for (int g = 0; g < ND; g++)
            if (dig_en[g])
              for (int bt = g * D; bt < (g + 1) * D && bt < K; bt++)
                regs[i][bt] <= val[bt];
      end
    end
  end

  // Two write ports never target the same register in one cycle.
  for (genvar x = 0; x < NWP; x++) begin : g_chk
    for (genvar y = x + 1; y < NWP; y++) begin : g_pair
      a_no_collide: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(we[x] && we[y] && waddr[x] == waddr[y]))
        else $error("ecc_regfile: write ports %0d and %0d collide", x, y);
    end
  end

endmodule
