// gf2m_madd: bit-parallel GF(2^m) adder of the multiply-add path.
//
// Addition in GF(2^m) is a bitwise XOR, so the adder is one level of XOR
// gates, K bits wide, with no carry and no reduction.  It forms
//   sum = (p[0] if sel[0]) ^ (p[1] if sel[1]) ^ (p[2] if sel[2]) ^ (addend if add_en)
// from the outputs of the parallel multipliers and one register operand.  A
// sum of products therefore goes straight to the register file in the same
// step that produced them, without first storing each product and fetching it
// back.  Purely combinational.
//
// The bit-parallel adder and the multiply-add in one instruction follow the
// architecture; the selection mask and the single register addend are this
// design's encoding.
module gf2m_madd #(
  parameter int unsigned K = 163,
  parameter int unsigned N = 3
) (
  input  logic [N-1:0][K-1:0] p,
  input  logic [N-1:0]        sel,
  input  logic                add_en,
  input  logic [K-1:0]        addend,
  output logic [K-1:0]        sum
);

  always_comb begin
    sum = add_en ? addend : '0;
    for (int i = 0; i < N; i++)
      if (sel[i]) sum = sum ^ p[i];
  end

endmodule
