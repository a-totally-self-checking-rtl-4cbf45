// Self-checking testbench of weight_generator (N = 12): every input word; both
// halves of the check symbol must be the complemented count of ones.
module tb_weight_generator;
  logic [11:0] x;
  logic [3:0]  b1, b2;
  int checks = 0, failures = 0;

  weight_generator #(.N(12)) dut (.x(x), .b1(b1), .b2(b2));

  function automatic logic [3:0] ones(input logic [11:0] v);
    int c = 0;
    for (int i = 0; i < 12; i++) c += int'(v[i]);
    return 4'(c);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      x = 12'(v);
      #1;
      checks++;
      if (b1 !== ~ones(x)) failures++;
      checks++;
      if (b2 !== ~ones(x)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
