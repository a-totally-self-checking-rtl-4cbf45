// Self-checking testbench of two_rail_checker: every input of a 4-pair and a
// 3-pair tree. The output must be a code pair (f0 != f1) exactly when every
// input pair is one, and a 4-pair tree fed code pairs must produce both code
// values (f0 = 1 and f0 = 0).
module tb_two_rail_checker;
  logic [3:0] a0, a1;
  logic [2:0] b0, b1;
  logic       fa0, fa1, fb0, fb1;
  int checks = 0, failures = 0;
  int seen_one = 0, seen_zero = 0;

  two_rail_checker #(.P(4)) dut4 (.r0(a0), .r1(a1), .f0(fa0), .f1(fa1));
  two_rail_checker #(.P(3)) dut3 (.r0(b0), .r1(b1), .f0(fb0), .f1(fb1));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a0, a1} = 8'(v);
      {b0, b1} = 6'(v);
      #1;
      checks++;
      if ((fa0 != fa1) !== ((a0 ^ a1) == 4'hf)) failures++;
      checks++;
      if ((fb0 != fb1) !== ((b0 ^ b1) == 3'h7)) failures++;
      if (fa0 != fa1) begin
        if (fa0) seen_one++;
        else     seen_zero++;
      end
    end
    checks++;
    if (seen_one == 0 || seen_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
