// Self-checking testbench of syndrome_decoder (k = 8): all 16 syndromes. A
// syndrome equal to a kept position raises exactly that output; zero and the
// removed positions 6, 9 and 15 raise none.
module tb_syndrome_decoder;
  import tb_ref_pkg::*;
  logic [R-1:0] s;
  logic [N-1:0] d, exp_d;
  int checks = 0, failures = 0;

  syndrome_decoder #(.K(8)) dut (.s(s), .d(d));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      s = R'(v);
      exp_d = '0;
      for (int j = 0; j < N; j++) if (POS[j] == v) exp_d[j] = 1'b1;
      #1;
      checks++;
      if (d !== exp_d) begin
        failures++;
        $display("s=%0d d=%b expected %b", v, d, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
