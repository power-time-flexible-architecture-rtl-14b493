// ecc_ctrl: sequencer of the point processor.
//
// Accepts one command at a time (point doubling, point addition, or scalar
// multiplication nP) and runs it as a sequence of microprograms from
// ucode_rom.  Scalar multiplication uses the binary method, most significant
// bit first: Q = P at the leading one of n, then for every lower bit a
// doubling, followed by an addition when the bit is one.  While a doubling
// runs, add_next tells whether an addition follows, which enables the
// conditional slots that precompute Z2^2 and Z2^3 for it.  n = 0 gives the
// point at infinity (Z = 0).  A standalone addition runs PRE and then ADD.
//
// Each microprogram step is executed in one of two modes, sampled when the
// command is accepted:
//   triple (mode_single = 0): all live slots start together on their own
//     multiplier (ISSUE), the controller waits until every started multiplier
//     is done and writes back in that same cycle.  A step takes
//     ceil(m/D) + 2 cycles.
//   single (mode_single = 1): the live slots run one after another on
//     multiplier 0 (ISSUE/WAIT per slot); each product is captured into its
//     product register (cap_en) and a final WRITE cycle writes back.  A step
//     with s live slots takes s * (ceil(m/D) + 2) + 1 cycles plus one per
//     skipped slot.
// Between microprograms one SEQ cycle chooses the next.  `done` pulses for one
// cycle when a command finishes; cmd_ready is high while idle.
//
// The binary method, the three-multiplier parallel mode and the switch to a
// single multiplier follow the architecture; the command set, the state
// machine and its cycle timing are this design's own.
module ecc_ctrl
  import ecc_pkg::*;
#(
  parameter int unsigned K = 163
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 cmd_valid,
  input  op_e                  cmd_op,
  input  logic [K-1:0]         cmd_scalar,
  input  logic                 cmd_single,   // run this command on one multiplier
  output logic                 cmd_ready,
  output logic                 done,
  // microprogram
  output logic [UA_W-1:0]      uaddr,
  input  logic                 ulast,
  input  logic [NMUL-1:0]      slot_live,
  output logic                 add_next,
  output logic                 mode_single,
  // datapath
  output logic [NMUL-1:0]      mult_start,
  input  logic [NMUL-1:0]      mult_done,
  output logic [1:0]           opsel,        // slot fed to multiplier 0 (single mode)
  output logic [NMUL-1:0]      cap_en,       // capture multiplier 0 into product register
  output logic                 wr_go         // perform the step's register writes
);

  localparam int unsigned IW = $clog2(K);

  typedef enum logic [2:0] {S_IDLE, S_SEQ, S_ISSUE, S_WAIT, S_WRITE} state_e;
  typedef enum logic [2:0] {P_NONE, P_INF, P_INIT, P_DBL, P_ADD, P_PRE} prog_e;

  state_e         state;
  prog_e          prog;
  op_e            op;
  logic [K-1:0]   n;
  logic [IW-1:0]  idx;        // bit of n being processed
  logic [1:0]     s;          // slot pointer, single mode

  function automatic logic [IW-1:0] msb_index(input logic [K-1:0] v);
    logic [IW-1:0] r;
    r = '0;
    for (int i = 0; i < K; i++)
      if (v[i]) r = IW'(i);
    return r;
  endfunction

  logic all_done;
  assign all_done = &(mult_done | ~slot_live);

  always_comb begin
    cmd_ready  = (state == S_IDLE);
    mult_start = '0;
    cap_en     = '0;
    wr_go      = 1'b0;
    opsel      = mode_single ? s : 2'd0;
    unique case (state)
      S_ISSUE: begin
        if (!mode_single)
          mult_start = slot_live;
        else if (s != 2'd3 && slot_live[s])
          mult_start = 3'b001;
      end
      S_WAIT: begin
        if (!mode_single)
          wr_go = all_done;
        else if (mult_done[0])
          cap_en[s] = 1'b1;
      end
      S_WRITE: wr_go = 1'b1;
      default: ;
    endcase
  end

  // Choice made in S_SEQ: launch the next microprogram or finish.
  logic            seq_launch, seq_finish, seq_step_bit, seq_set_msb;
  prog_e           seq_prog;
  logic [UA_W-1:0] seq_ua;

  always_comb begin
    seq_launch   = 1'b0;
    seq_finish   = 1'b0;
    seq_step_bit = 1'b0;      // move to the next lower bit of n and double
    seq_set_msb  = 1'b0;
    seq_prog     = P_NONE;
    seq_ua       = UA_DBL;
    unique case (op)
      OP_DBL: begin
        if (prog == P_NONE) begin seq_launch = 1'b1; seq_prog = P_DBL; seq_ua = UA_DBL; end
        else seq_finish = 1'b1;
      end
      OP_ADD: begin
        if (prog == P_NONE)     begin seq_launch = 1'b1; seq_prog = P_PRE; seq_ua = UA_PRE; end
        else if (prog == P_PRE) begin seq_launch = 1'b1; seq_prog = P_ADD; seq_ua = UA_ADD; end
        else seq_finish = 1'b1;
      end
      default: begin  // OP_SMUL
        if (prog == P_NONE) begin
          seq_launch = 1'b1;
          if (n == '0) begin seq_prog = P_INF; seq_ua = UA_INF; end
          else begin seq_prog = P_INIT; seq_ua = UA_INIT; seq_set_msb = 1'b1; end
        end else if (prog == P_INF) begin
          seq_finish = 1'b1;
        end else if (prog == P_DBL && add_next) begin
          seq_launch = 1'b1; seq_prog = P_ADD; seq_ua = UA_ADD;
        end else if (idx == '0) begin
          seq_finish = 1'b1;
        end else begin
          seq_launch = 1'b1; seq_prog = P_DBL; seq_ua = UA_DBL; seq_step_bit = 1'b1;
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      prog        <= P_NONE;
      op          <= OP_DBL;
      n           <= '0;
      idx         <= '0;
      s           <= 2'd0;
      uaddr       <= '0;
      add_next    <= 1'b0;
      mode_single <= 1'b0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            op          <= cmd_op;
            n           <= cmd_scalar;
            mode_single <= cmd_single;
            add_next    <= 1'b0;
            prog        <= P_NONE;
            state       <= S_SEQ;
          end
        end
        S_SEQ: begin
          if (seq_set_msb) idx <= msb_index(n);
          if (seq_step_bit) begin
            idx      <= idx - IW'(1);
            add_next <= n[idx - IW'(1)];
          end
          if (seq_launch) begin
            prog  <= seq_prog;
            uaddr <= seq_ua;
            s     <= 2'd0;
            state <= S_ISSUE;
          end else if (seq_finish) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        S_ISSUE: begin
          if (!mode_single) state <= S_WAIT;
          else if (s == 2'd3) state <= S_WRITE;
          else if (slot_live[s]) state <= S_WAIT;
          else s <= s + 2'd1;
        end
        S_WAIT: begin
          if (!mode_single) begin
            if (all_done) begin
              if (ulast) state <= S_SEQ;
              else begin uaddr <= uaddr + UA_W'(1); state <= S_ISSUE; end
            end
          end else if (mult_done[0]) begin
            s     <= s + 2'd1;
            state <= S_ISSUE;
          end
        end
        S_WRITE: begin
          s <= 2'd0;
          if (ulast) state <= S_SEQ;
          else begin uaddr <= uaddr + UA_W'(1); state <= S_ISSUE; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // In S_SEQ exactly one of launch / finish is chosen.
  a_seq_choice: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == S_SEQ) |-> (seq_launch != seq_finish))
    else $error("ecc_ctrl: no sequencing decision");

  // Commands are only taken while idle; a running command is never restarted.
  a_cmd_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               (state != S_IDLE) |-> !cmd_ready)
    else $error("ecc_ctrl: ready while busy");

endmodule
