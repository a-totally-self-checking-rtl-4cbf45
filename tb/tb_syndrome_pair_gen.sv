// Self-checking testbench of syndrome_pair_gen (k = 8): every 12-bit word is
// applied; a ^ b must equal the syndrome and a must be the check bits.
module tb_syndrome_pair_gen;
  import tb_ref_pkg::*;
  logic [N-1:0] x;
  logic [R-1:0] a, b;
  int checks = 0, failures = 0;

  syndrome_pair_gen #(.K(8)) dut (.x(x), .a(a), .b(b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      x = N'(v);
      #1;
      checks++;
      if ((a ^ b) !== syndrome(x)) begin
        failures++;
        if (failures < 5) $display("syndrome mismatch x=%h a=%h b=%h", x, a, b);
      end
      checks++;
      if (a !== {x[6], x[3], x[1], x[0]}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
