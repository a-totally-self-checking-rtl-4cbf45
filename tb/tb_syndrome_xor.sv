// Self-checking testbench of syndrome_xor: all input pairs for r = 4.
module tb_syndrome_xor;
  logic [3:0] a, b, s;
  int checks = 0, failures = 0;

  syndrome_xor #(.R(4)) dut (.a(a), .b(b), .s(s));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (s[i] !== (a[i] != b[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
