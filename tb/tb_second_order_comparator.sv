// Self-checking testbench of second_order_comparator (8-bit symbols). For
// random symbols, every difference pattern of weight 0, 1 and 2 and random
// heavier ones, and all four (f0, f1) values: the output must be a code pair
// exactly when the symbols are equal, or differ in one bit while f0 != f1.
module tb_second_order_comparator;
  logic [7:0] b, bp, e;
  logic       f0, f1, c0, c1;
  int checks = 0, failures = 0;

  second_order_comparator #(.W(8)) dut (.b(b), .bp(bp), .f0(f0), .f1(f1), .c0(c0), .c1(c1));

  task automatic apply(input logic [7:0] err);
    int  d;
    logic ok;
    d = $countones(err);
    for (int f = 0; f < 4; f++) begin
      {f0, f1} = 2'(f);
      bp = b ^ err;
      #1;
      ok = (d == 0) || (d == 1 && f0 != f1);
      checks++;
      if ((c0 != c1) !== ok) begin
        failures++;
        if (failures < 5) $display("b=%h bp=%h f=%b%b c=%b%b", b, bp, f0, f1, c0, c1);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 40; v++) begin
      b = 8'($urandom);
      apply(8'h00);
      for (int i = 0; i < 8; i++) apply(8'(1 << i));
      for (int i = 0; i < 8; i++)
        for (int j = i + 1; j < 8; j++) apply(8'((1 << i) | (1 << j)));
      for (int i = 0; i < 10; i++) begin
        e = 8'($urandom);
        apply(e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
