// gf2m_dsmul: digit serial-parallel multiplier over GF(2^m), m <= K.
//
// Computes p = a * b mod f(x), with f(x) = x^m + r(x) and deg r < m, in
// ceil(m/D) clock cycles.  Operand a is used in parallel (all K bits every
// cycle); operand b is consumed D bits per cycle, most significant digit
// first.  Per cycle the accumulator is updated D times, bit by bit:
//   acc = acc * x mod f ;  if (b_j) acc = acc ^ a
// so one cycle performs acc = acc * x^D + a * digit (mod f).  Using the whole
// of a in parallel and D bits of b per cycle is what lets the multiplier finish
// in M = ceil(m/D) cycles instead of the M^2 of a serial-serial one.
//
// The field size m and the reduction polynomial r are inputs, so a
// processor built for K bits can run any smaller application word length;
// bits at and above m stay zero and the cycle count shrinks with m.
//
// Interface: a one-cycle `start` captures a and b and clears the accumulator.
// `busy` is high for the ceil(m/D) digit cycles; `done` rises in the cycle
// after the last digit and stays high, with p valid, until the next start.
// `ce` is the clock enable from the power management unit: while it is low no
// register of the multiplier changes, so its logic is static.  `dig_en` (one
// bit per D-bit group) gates the operand and accumulator groups that lie above
// the application word length: they are never clocked, and whatever they
// still hold from a longer word length is masked off where it is read.  m and r must be
// stable while busy.  Operands must be reduced (no bits at or above m).
//
// The architecture asks for a digit serial-parallel multiplier; this MSB-first
// interleaved form and the digit size D are this design's choices.
module gf2m_dsmul #(
  parameter int unsigned K = 163,
  parameter int unsigned D = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ce,
  input  logic                       start,
  input  logic [K-1:0]               a,
  input  logic [K-1:0]               b,
  input  logic [$clog2(K+1)-1:0]     m,
  input  logic [K-1:0]               r,
  input  logic [(K+D-1)/D-1:0]       dig_en,
  output logic                       busy,
  output logic                       done,
  output logic [K-1:0]               p
);

  localparam int unsigned ND   = (K + D - 1) / D;    // digits at m = K
  localparam int unsigned CW   = $clog2(ND + 1);
  localparam int unsigned MW   = $clog2(K + 1);

  logic [K-1:0]    a_r;
  logic [ND*D-1:0] b_r;
  logic [K-1:0]    acc, acc_nxt;
  logic [CW-1:0]   cnt;             // index of the digit being processed
  logic [K-1:0]    fmask;           // bits below m
  logic [K-1:0]    ftop;            // bit m-1
  logic [CW-1:0]   nd_m;            // ceil(m/D)
  logic [D-1:0]    digit;
  logic [K-1:0]    gmask;           // bits of enabled digit groups
  logic [K-1:0]    a_use, acc_use;
  logic [K-1:0]    b_keep;          // b in enabled groups, old b_r elsewhere

  always_comb begin
    fmask = ~({K{1'b1}} << m);
    ftop  = {{(K-1){1'b0}}, 1'b1} << (m - MW'(1));
    nd_m  = CW'((32'(m) + D - 1) / D);
    digit = b_r[cnt*D +: D];
    for (int bt = 0; bt < K; bt++) gmask[bt] = dig_en[bt / D];
    b_keep  = (b & gmask) | (b_r[K-1:0] & ~gmask);
    a_use   = a_r & fmask;
    acc_use = acc & fmask;
  end

  // D interleaved shift-reduce-accumulate steps, most significant bit first.
  always_comb begin
    logic [K-1:0] t;
    logic         top;
    t = acc_use;
    for (int j = D - 1; j >= 0; j--) begin
      top = |(t & ftop);
      t   = (t << 1) & fmask;
      if (top)      t = t ^ r;
      if (digit[j]) t = t ^ a_use;
    end
    acc_nxt = t;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_r  <= '0;
      b_r  <= '0;
      acc  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else if (ce) begin
      if (start) begin
        a_r  <= (a & gmask) | (a_r & ~gmask);
        b_r  <= (ND*D)'(b_keep);
        acc  <= acc & ~gmask;
        cnt  <= nd_m - CW'(1);
        busy <= 1'b1;
        done <= 1'b0;
      end else if (busy) begin
        acc <= (acc_nxt & gmask) | (acc & ~gmask);
        if (cnt == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt <= cnt - CW'(1);
        end
      end
    end
  end

  assign p = acc_use;

  // A new multiplication may only start once the previous one has finished.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 (ce && start) |-> !busy)
    else $error("gf2m_dsmul: start while busy");

endmodule
