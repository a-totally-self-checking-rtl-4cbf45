// Self-checking testbench of tsc_ecd_core (k = 8, 12 + 8 = 20 code bits).
// For every one of the 256 code words it applies: the word itself, every
// single error, every double error and 40 random unidirectional errors of
// multiplicity 3 to 20 (both directions). All outputs are compared with the
// reference decoder; in addition, code words and single errors must give
// q0 != q1 with the original word restored, and double and unidirectional
// errors must give q0 == q1. Test-mode inputs (t = 1, separate Y) are checked
// on random words.
module tb_tsc_ecd_core;
  import tb_ref_pkg::*;
  logic [N-1:0] x, y, xc, exp_xc;
  logic [W-1:0] b, bc, exp_bc;
  logic         t, z0, z1, q0, q1, exp_z, exp_q;
  logic [N+W-1:0] cw, rx, e;
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0, n_uni = 0;

  tsc_ecd_core #(.K(8)) dut (
    .x(x), .y(y), .t(t), .b(b), .xc(xc), .bc(bc), .z0(z0), .z1(z1), .q0(q0), .q1(q1)
  );

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N+W-1:0] word, input int kind);
    {b, x} = word;
    y = N'($urandom);
    t = 1'b0;
    #1;
    decode(x, x, b, exp_xc, exp_bc, exp_z, exp_q);
    checks++;
    if (xc !== exp_xc || bc !== exp_bc || (z0 != z1) !== exp_z || (q0 != q1) !== exp_q) begin
      failures++;
      if (failures < 5) $display("word=%h xc=%h/%h bc=%h/%h z=%b%b q=%b%b exp z=%b q=%b",
                                 word, xc, exp_xc, bc, exp_bc, z0, z1, q0, q1, exp_z, exp_q);
    end
    checks++;
    case (kind)
      0, 1: if (!(q0 != q1) || {bc, xc} !== cw) failures++;
      default: if (q0 != q1) failures++;
    endcase
  endtask

  initial begin
    for (int info = 0; info < 256; info++) begin
      cw[N-1:0]   = encode(8'(info));
      cw[N+W-1:N] = csym(cw[N-1:0]);
      apply(cw, 0);
      for (int i = 0; i < N + W; i++) begin
        apply(cw ^ (1 << i), 1);
        n_single++;
        for (int j = i + 1; j < N + W; j++) begin
          apply(cw ^ (1 << i) ^ (1 << j), 2);
          n_double++;
        end
      end
      for (int u = 0; u < 40; u++) begin
        e  = (N+W)'({$urandom, $urandom});
        rx = (u % 2 == 0) ? (cw & ~e) : (cw | e);
        if ($countones(rx ^ cw) >= 3) begin
          apply(rx, 3);
          n_uni++;
        end
      end
    end
    // test mode: correction applied to Y, syndrome taken from X
    for (int v = 0; v < 2000; v++) begin
      x = N'($urandom);
      y = N'($urandom);
      b = W'($urandom);
      t = 1'b1;
      #1;
      decode(x, y, b, exp_xc, exp_bc, exp_z, exp_q);
      checks++;
      if (xc !== exp_xc || bc !== exp_bc || (z0 != z1) !== exp_z) failures++;
    end
    checks++;
    if (n_uni < 1000) failures++;
    $display("singles=%0d doubles=%0d unidirectional=%0d", n_single, n_double, n_uni);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
