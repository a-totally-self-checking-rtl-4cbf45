// Self-checking testbench of error_corrector: random words with each one-hot
// and the all-zeros correction vector.
module tb_error_corrector;
  logic [11:0] y, d, xc;
  int checks = 0, failures = 0;

  error_corrector #(.N(12)) dut (.y(y), .d(d), .xc(xc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 200; v++) begin
      y = 12'($urandom);
      for (int j = -1; j < 12; j++) begin
        d = (j < 0) ? 12'h000 : 12'(1 << j);
        #1;
        for (int i = 0; i < 12; i++) begin
          checks++;
          if (xc[i] !== ((i == j) ? ~y[i] : y[i])) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
