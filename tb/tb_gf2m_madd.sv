// tb_gf2m_madd: self-checking test of the multiply-add adder.
//
// Every selection mask with and without the register addend, on random
// 163-bit operands, against a sum formed term by term in the testbench.
module tb_gf2m_madd;
  import gf_ref_pkg::*;

  localparam int unsigned K = 163;

  logic [2:0][K-1:0] p;
  logic [2:0]        sel;
  logic              add_en;
  logic [K-1:0]      addend, sum;
  int                checks = 0, failures = 0;

  gf2m_madd #(.K(K), .N(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] exp;
    for (int it = 0; it < 50; it++) begin
      for (int s = 0; s < 8; s++) begin
        for (int e = 0; e < 2; e++) begin
          for (int i = 0; i < 3; i++) p[i] = rand_fe(K);
          addend = rand_fe(K);
          sel    = 3'(s);
          add_en = e[0];
          #1;
          exp = '0;
          if (s[0]) exp = exp ^ p[0];
          if (s[1]) exp = exp ^ p[1];
          if (s[2]) exp = exp ^ p[2];
          if (e[0]) exp = exp ^ addend;
          checks++;
          if (sum !== exp) begin
            failures++;
            $display("FAIL sel=%b add_en=%b", sel, add_en);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
