// Self-checking testbench of test_pattern_gen (k = 8, 15-stage register).
// Both preset vectors are loaded through the asynchronous inputs and rotated
// through all 15 positions; Y and X are compared with a register model and the
// four XOR trees P1 = Z1^Z9^Z15, P2 = Z2^Z6^Z15, P4 = Z4^Z6^Z15 and
// P8 = Z8^Z9^Z15. The syndrome of X must name the stage that holds the odd
// bit, the register must come back to its preset after exactly 15 clocks, and
// it must hold while t is low.
module tb_test_pattern_gen;
  import tb_ref_pkg::*;
  logic         clk = 1'b0;
  logic         t = 1'b0, load_one = 1'b0, load_many = 1'b0;
  logic [N-1:0] x, y, exp_x, exp_y;
  logic [15:1]  zr, start;
  int checks = 0, failures = 0;

  test_pattern_gen #(.K(8)) dut (
    .clk(clk), .t(t), .load_one(load_one), .load_many(load_many), .x(x), .y(y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input int odd_pos);
    for (int j = 0; j < N; j++) exp_y[j] = zr[POS[j]];
    exp_x = exp_y;
    exp_x[0] = zr[1] ^ zr[9] ^ zr[15];
    exp_x[1] = zr[2] ^ zr[6] ^ zr[15];
    exp_x[3] = zr[4] ^ zr[6] ^ zr[15];
    exp_x[6] = zr[8] ^ zr[9] ^ zr[15];
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("y=%b expected %b", y, exp_y);
    end
    checks++;
    if (x !== exp_x) begin
      failures++;
      $display("x=%b expected %b", x, exp_x);
    end
    checks++;
    if (syndrome(x) !== R'(odd_pos)) failures++;
  endtask

  task automatic run_vector(input logic many);
    int p;
    @(negedge clk);
    if (many) load_many = 1'b1;
    else      load_one = 1'b1;
    #1;
    load_one  = 1'b0;
    load_many = 1'b0;
    zr    = many ? ~15'd1 : 15'd1;
    start = zr;
    p     = 1;
    #1;
    compare(p);
    // t low: no movement
    repeat (2) @(posedge clk);
    #1;
    compare(p);
    @(negedge clk);
    t = 1'b1;
    for (int c = 0; c < 15; c++) begin
      @(posedge clk);
      #1;
      zr = {zr[14:1], zr[15]};
      p  = (p == 15) ? 1 : p + 1;
      compare(p);
      checks++;
      if ((zr == start) !== (c == 14)) failures++;
    end
    @(negedge clk);
    t = 1'b0;
  endtask

  initial begin
    run_vector(1'b0);
    run_vector(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
