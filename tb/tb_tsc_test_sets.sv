// Checks that normal traffic exercises the checking blocks of tsc_ecd_core
// (k = 8) the way a self-testing design needs:
//   - with code words only, every two-rail cell of C1, C2 and of the output
//     checker receives all four combinations of code-valued input pairs;
//   - every XOR gate of M sees (0,0) and (1,1) from code words and (0,1) and
//     (1,0) from single errors;
//   - every XOR gate of EC sees all four input combinations over code words
//     and single errors;
//   - every output of SD is raised by some single error;
//   - with code words only, every full and half adder cell of the weight
//     generator G receives all its input combinations (8 and 4); this needs
//     the all-ones word to be a code word.
module tb_tsc_test_sets;
  import tb_ref_pkg::*;
  import tb_cov_pkg::*;
  logic [N-1:0] x, xc;
  logic [W-1:0] b, bc;
  logic         z0, z1, q0, q1;
  logic [N+W-1:0] cw;
  int checks = 0, failures = 0;

  // seen[cell][combination of the four rails]
  logic [15:0] seen_c1 [R-1];
  logic [15:0] seen_c2 [R-1];
  logic [15:0] seen_out;
  logic [3:0]  seen_m_cw [R];
  logic [3:0]  seen_m_se [R];
  logic [3:0]  seen_ec [N];
  logic [N-1:0] sd_fired;

  bind full_adder adder_cov #(.NIN(3)) u_cov (.v({a, b, ci}));
  bind half_adder adder_cov #(.NIN(2)) u_cov (.v({1'b0, a, b}));

  tsc_ecd_core #(.K(8)) dut (
    .x(x), .y(x), .t(1'b0), .b(b), .xc(xc), .bc(bc), .z0(z0), .z1(z1), .q0(q0), .q1(q1)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] bit16(input logic [3:0] i);
    return 16'(1) << i;
  endfunction

  // code-valued combinations (x0x1, y0y1) in {01,10} x {01,10}
  localparam logic [15:0] CODE_SET = bit16(4'b0101) | bit16(4'b0110) | bit16(4'b1001) | bit16(4'b1010);

  task automatic sample(input bit is_cw);
    logic [3:0] c;
    for (int i = 0; i < R - 1; i++) begin
      c = {dut.u_c1.n0[2*i+1], dut.u_c1.n1[2*i+1], dut.u_c1.n0[2*i+2], dut.u_c1.n1[2*i+2]};
      if (is_cw) seen_c1[i] |= bit16(c);
      c = {dut.u_c2.n0[2*i+1], dut.u_c2.n1[2*i+1], dut.u_c2.n0[2*i+2], dut.u_c2.n1[2*i+2]};
      if (is_cw) seen_c2[i] |= bit16(c);
    end
    c = {dut.u_out.n0[1], dut.u_out.n1[1], dut.u_out.n0[2], dut.u_out.n1[2]};
    if (is_cw) seen_out |= bit16(c);
    for (int i = 0; i < R; i++) begin
      if (is_cw) seen_m_cw[i] |= 4'(1) << {dut.s1_a[i], dut.s1_b[i]};
      else       seen_m_se[i] |= 4'(1) << {dut.s1_a[i], dut.s1_b[i]};
    end
    for (int j = 0; j < N; j++) seen_ec[j] |= 4'(1) << {dut.y_eff[j], dut.dec[j]};
    sd_fired |= dut.dec;
  endtask

  initial begin
    for (int i = 0; i < R - 1; i++) begin
      seen_c1[i] = '0;
      seen_c2[i] = '0;
    end
    for (int i = 0; i < R; i++) begin
      seen_m_cw[i] = '0;
      seen_m_se[i] = '0;
    end
    for (int j = 0; j < N; j++) seen_ec[j] = '0;
    seen_out = '0;
    sd_fired = '0;
    for (int info = 0; info < 256; info++) begin
      cw[N-1:0]   = encode(8'(info));
      cw[N+W-1:N] = csym(cw[N-1:0]);
      {b, x} = cw;
      tb_cov_pkg::enable = 1'b1;
      #1;
      tb_cov_pkg::enable = 1'b0;
      sample(1'b1);
      for (int e = 0; e < N; e++) begin
        {b, x} = cw ^ ((N+W)'(1) << e);
        #1;
        sample(1'b0);
      end
    end
    for (int i = 0; i < R - 1; i++) begin
      checks++;
      if (seen_c1[i] != CODE_SET) begin
        failures++;
        $display("C1 cell %0d saw %b", i, seen_c1[i]);
      end
      checks++;
      if (seen_c2[i] != CODE_SET) begin
        failures++;
        $display("C2 cell %0d saw %b", i, seen_c2[i]);
      end
    end
    checks++;
    if (seen_out != CODE_SET) begin
      failures++;
      $display("output checker saw %b", seen_out);
    end
    for (int i = 0; i < R; i++) begin
      checks++;
      if (seen_m_cw[i] != 4'b1001 || seen_m_se[i][2:1] != 2'b11) begin
        failures++;
        $display("M gate %0d saw %b / %b", i, seen_m_cw[i], seen_m_se[i]);
      end
    end
    for (int j = 0; j < N; j++) begin
      checks++;
      if (seen_ec[j] != 4'hf) failures++;
    end
    checks++;
    if (sd_fired != '1) failures++;
    checks++;
    if (tb_cov_pkg::seen.num() == 0) failures++;
    foreach (tb_cov_pkg::seen[p]) begin
      checks++;
      if (tb_cov_pkg::seen[p] != tb_cov_pkg::need[p]) begin
        failures++;
        $display("adder cell %s saw %b", p, tb_cov_pkg::seen[p][7:0]);
      end
    end
    $display("adder cells covered: %0d", tb_cov_pkg::seen.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
