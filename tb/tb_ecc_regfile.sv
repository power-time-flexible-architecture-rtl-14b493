// tb_ecc_regfile: self-checking test of the register file.
//
// Keeps a shadow copy of all registers and checks every read port after
// random writes on the three write ports and the host port, including the
// priority between ports and digit-group enables: gated digits are not written
// and read as zero, and reappear unchanged once enabled again.
module tb_ecc_regfile;
  import gf_ref_pkg::*;

  localparam int unsigned K = 163, D = 8, NREG = 18, RA_W = 5, NRD = 9, NWP = 3;
  localparam int unsigned ND = (K + D - 1) / D;

  logic                     clk = 1'b0, rst_n = 1'b0;
  logic [ND-1:0]            dig_en = '1;
  logic [NRD-1:0][RA_W-1:0] raddr = '0;
  logic [NRD-1:0][K-1:0]    rdata;
  logic [NWP-1:0]           we = '0;
  logic [NWP-1:0][RA_W-1:0] waddr = '0;
  logic [NWP-1:0][K-1:0]    wdata = '0;
  logic                     host_we = 1'b0;
  logic [RA_W-1:0]          host_addr = '0, host_raddr = '0;
  logic [K-1:0]             host_wdata = '0, host_rdata;
  logic [K-1:0]             shadow [NREG];
  int                       checks = 0, failures = 0;

  ecc_regfile #(.K(K), .D(D), .NREG(NREG), .RA_W(RA_W), .NRD(NRD), .NWP(NWP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] digmask(input logic [ND-1:0] en);
    logic [K-1:0] mk;
    for (int b = 0; b < K; b++) mk[b] = en[b / D];
    return mk;
  endfunction

  task automatic check_all();
    for (int base = 0; base < NREG; base += NRD) begin
      for (int i = 0; i < NRD; i++) raddr[i] = RA_W'((base + i) % NREG);
      host_raddr = RA_W'(base);
      #1;
      for (int i = 0; i < NRD; i++) begin
        checks++;
        if (rdata[i] !== (shadow[(base + i) % NREG] & digmask(dig_en))) begin
          failures++;
          $display("FAIL read port %0d reg %0d", i, (base + i) % NREG);
        end
      end
      checks++;
      if (host_rdata !== (shadow[base] & digmask(dig_en))) begin
        failures++;
        $display("FAIL host read reg %0d", base);
      end
    end
  endtask

  initial begin
    logic [K-1:0] mk;
    for (int i = 0; i < NREG; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int it = 0; it < 300; it++) begin
      // random, mostly full, digit enables
      dig_en = (it % 3 == 0) ? ND'($urandom) : '1;
      mk     = digmask(dig_en);
      host_we    = $urandom_range(0, 1);
      host_addr  = RA_W'($urandom_range(0, NREG - 1));
      host_wdata = rand_fe(K);
      for (int w = 0; w < NWP; w++) begin
        we[w]    = $urandom_range(0, 1);
        waddr[w] = RA_W'($urandom_range(0, NREG - 1));
        wdata[w] = rand_fe(K);
      end
      // keep the write ports apart, as the microprograms do
      if (waddr[1] == waddr[0]) we[1] = 1'b0;
      if (waddr[2] == waddr[0] || waddr[2] == waddr[1]) we[2] = 1'b0;
      if (host_we) shadow[host_addr] = (shadow[host_addr] & ~mk) | (host_wdata & mk);
      for (int w = 0; w < NWP; w++)
        if (we[w]) shadow[waddr[w]] = (shadow[waddr[w]] & ~mk) | (wdata[w] & mk);
      @(negedge clk);
      we = '0; host_we = 1'b0;
      check_all();
    end
    // word-length gating: only the low 113 bits writable, upper bits hold
    dig_en = '0;
    for (int g = 0; g < ND; g++) dig_en[g] = (g * D < 113);
    mk = digmask(dig_en);
    we = 3'b001; waddr[0] = RA_W'(3); wdata[0] = '1;
    shadow[3] = (shadow[3] & ~mk) | mk;
    @(negedge clk);
    we = '0;
    check_all();
    dig_en = '1;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
