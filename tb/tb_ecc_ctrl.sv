// tb_ecc_ctrl: self-checking test of the sequencer.
//
// The controller runs against the real microprogram store and simple
// multiplier models that finish L cycles after their start.  For doubling,
// addition and scalar-multiplication commands (random scalars, n = 0, n = 1)
// in both modes, the testbench checks the order of the microprograms against
// the binary method worked out from the bits of n, that the conditional
// precomputation runs exactly before additions, that single mode starts only
// multiplier 0 and captures the products of the live slots in order, and the
// command latency in triple mode.
module tb_ecc_ctrl;
  import ecc_pkg::*;

  localparam int unsigned K = 163;
  localparam int          L = 4;      // model multiplier latency

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                cmd_valid = 1'b0, cmd_single = 1'b0;
  op_e                 cmd_op = OP_DBL;
  logic [K-1:0]        cmd_scalar = '0;
  logic                cmd_ready, done, add_next, mode_single, wr_go, ulast;
  logic [UA_W-1:0]     uaddr;
  logic [NMUL-1:0]     slot_live, mult_start, mult_done, cap_en;
  logic [1:0]          opsel;
  uinst_t              uinst;
  int                  cnt [NMUL];
  int                  checks = 0, failures = 0;
  string               trace;
  int                  cond_runs, cap_errs, start_errs;
  logic [2:0]          caps_seen;

  ecc_ctrl #(.K(K)) dut (.*);
  ucode_rom rom (.addr(uaddr), .uinst);
  assign ulast = uinst.last;

  always_comb
    for (int s = 0; s < NMUL; s++)
      slot_live[s] = uinst.m[s].en & (~uinst.m[s].cond | add_next);

  // multiplier models
  always_ff @(posedge clk) begin
    for (int j = 0; j < NMUL; j++) begin
      if (!rst_n) begin
        cnt[j] <= 0; mult_done[j] <= 1'b0;
      end else if (mult_start[j]) begin
        cnt[j] <= L; mult_done[j] <= 1'b0;
      end else if (cnt[j] > 0) begin
        cnt[j] <= cnt[j] - 1;
        if (cnt[j] == 1) mult_done[j] <= 1'b1;
      end
    end
  end

  // monitor: programs completed, conditional work, single-mode behaviour
  always @(posedge clk) if (rst_n) begin
    if (wr_go && ulast) begin
      unique case (uaddr)
        4'd4:  trace = {trace, "D"};
        4'd11: trace = {trace, "A"};
        4'd13: trace = {trace, "P"};
        4'd14: trace = {trace, "I"};
        default: trace = {trace, "F"};
      endcase
    end
    if ((uaddr == 4'd2 || uaddr == 4'd3) &&
        (mult_start[2] || (mode_single && mult_start[0] && opsel == 2'd2))) cond_runs++;
    if (mode_single) begin
      if (mult_start[2:1] != 2'b00) start_errs++;
      if (cap_en != 3'b000) begin
        if (!slot_live[opsel] || cap_en != (3'b001 << opsel) || caps_seen[opsel]) cap_errs++;
        caps_seen = caps_seen | cap_en;
      end
      if (wr_go) begin
        if (caps_seen != slot_live) cap_errs++;
        caps_seen = '0;
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic command(input op_e op, input logic [K-1:0] n, input logic single,
                         output int cycles);
    trace = ""; cond_runs = 0; cap_errs = 0; start_errs = 0; caps_seen = '0;
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

  function automatic string expected(input op_e op, input logic [K-1:0] n);
    string e;
    int    top;
    if (op == OP_DBL) return "D";
    if (op == OP_ADD) return "PA";
    if (n == '0) return "F";
    top = 0;
    for (int i = 0; i < K; i++) if (n[i]) top = i;
    e = "I";
    for (int i = top - 1; i >= 0; i--) begin
      e = {e, "D"};
      if (n[i]) e = {e, "A"};
    end
    return e;
  endfunction

  function automatic int adds(input logic [K-1:0] n);
    int c, top;
    c = 0; top = 0;
    for (int i = 0; i < K; i++) if (n[i]) top = i;
    for (int i = 0; i < top; i++) if (n[i]) c++;
    return c;
  endfunction

  initial begin
    int            cyc;
    logic [K-1:0]  n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("ready after reset", cmd_ready);

    command(OP_DBL, '0, 1'b0, cyc);
    check("DBL trace", trace == "D");
    check($sformatf("DBL latency %0d", cyc), cyc == DBL_STEPS * (L + 2) + 3);
    check("DBL alone skips conditional work", cond_runs == 0);
    command(OP_ADD, '0, 1'b0, cyc);
    check("ADD trace", trace == "PA");
    check($sformatf("ADD latency %0d", cyc), cyc == (2 + ADD_STEPS) * (L + 2) + 4);
    for (int it = 0; it < 12; it++) begin
      n = '0;
      for (int i = 0; i < K; i += 32) n[i +: 32] = $urandom;
      n = n >> $urandom_range(0, K - 2);
      if (it == 0) n = '0;
      if (it == 1) n = K'(1);
      command(OP_SMUL, n, it[0], cyc);
      check($sformatf("SMUL trace n=%0h: %s", n, trace), trace == expected(OP_SMUL, n));
      check("precomputation before every addition", cond_runs == 2 * adds(n));
      if (it[0]) begin
        check("single mode uses multiplier 0 only", start_errs == 0);
        check("single mode captures live slots in order", cap_errs == 0);
      end
    end
    command(OP_DBL, '0, 1'b1, cyc);
    check("single DBL trace", trace == "D");
    check("single mode captures", cap_errs == 0 && start_errs == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
