// End-to-end testbench of tsc_ecd_top at its default size (k = 8).
//
// Normal mode: every one of the 256 code words is sent clean, with every
// single error (check bits of X, information bits and check symbol), with 20
// random double errors and with 20 random unidirectional errors of
// multiplicity >= 3. Clean words and single errors must come out corrected
// with q0 != q1; the rest must give q0 == q1.
// Test mode: both preset vectors are loaded and rotated; each of the
// 2(2^r - 1) = 30 vectors must give z0 != z1 and a corrected word of all
// zeros (weight-one vector) or all ones (weight-14 vector). Then single
// stuck-at faults are forced, one at a time, on each decoder output line and
// each must be caught (z0 == z1) by some test vector.
// Each mechanism is counted: X correction, check-symbol correction, double
// detection, unidirectional detection, vectors from each preset, vectors whose
// syndrome is a removed column (decoder silent), mode switches, faults caught.
module tb_tsc_ecd_top;
  import tb_ref_pkg::*;
  logic         clk = 1'b0;
  logic         t = 1'b0, load_one = 1'b0, load_many = 1'b0;
  logic [N-1:0] data_x, corr_x;
  logic [W-1:0] data_b, corr_b;
  logic         z0, z1, q0, q1;
  logic [N+W-1:0] cw, rx, e;
  logic [N-1:0] sa0_mask = '0, sa1_mask = '0;
  int checks = 0, failures = 0, cycles = 0;
  int n_corr_x = 0, n_corr_b = 0, n_double = 0, n_uni = 0;
  int n_vec_one = 0, n_vec_many = 0, n_silent = 0, n_switch = 0, n_caught = 0;

  tsc_ecd_top dut (
    .clk(clk), .t(t), .load_one(load_one), .load_many(load_many),
    .data_x(data_x), .data_b(data_b), .corr_x(corr_x), .corr_b(corr_b),
    .z0(z0), .z1(z1), .q0(q0), .q1(q1)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (t) cycles++;  // shifts in test mode

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [N+W-1:0] word, input int kind);
    @(negedge clk);
    {data_b, data_x} = word;
    #1;
    checks++;
    case (kind)
      0, 1, 2: begin
        if (!(q0 != q1) || {corr_b, corr_x} !== cw) begin
          failures++;
          if (failures < 5) $display("word %h not corrected: %h q=%b%b", word, {corr_b, corr_x}, q0, q1);
        end
        if (kind == 1) n_corr_x++;
        if (kind == 2) n_corr_b++;
      end
      3, 4: begin
        if (q0 != q1) begin
          failures++;
          if (failures < 5) $display("word %h (cw %h) not detected", word, cw);
        end else if (kind == 3) n_double++;
        else n_uni++;
      end
      default: ;
    endcase
  endtask

  // Runs both presets through all rotations; returns the number of vectors
  // that gave z0 == z1.
  task automatic self_test(input bit fault_free, output int bad);
    bad = 0;
    @(negedge clk);
    t = 1'b1;
    n_switch++;
    for (int v = 0; v < 2; v++) begin
      if (v == 0) load_one = 1'b1;
      else        load_many = 1'b1;
      #1;
      load_one  = 1'b0;
      load_many = 1'b0;
      for (int c = 0; c < 15; c++) begin
        if (c > 0) begin
          @(posedge clk);
          #1;
        end
        #1;
        if (z0 == z1) bad++;
        if (fault_free) begin
          checks++;
          if (z0 == z1 || corr_x !== ((v == 0) ? '0 : '1)) begin
            failures++;
            $display("test vector %0d/%0d: z=%b%b corr_x=%b", v, c, z0, z1, corr_x);
          end
          if (v == 0) n_vec_one++;
          else        n_vec_many++;
          // rotation c puts the odd bit at position c+1
          if (c + 1 == 6 || c + 1 == 9 || c + 1 == 15) begin
            checks++;
            if (dut.u_core.dec !== '0) failures++;
            n_silent++;
          end
        end
      end
      @(negedge clk);
    end
    t = 1'b0;
    n_switch++;
  endtask

  initial begin
    int bad, start;
    force dut.u_core.u_ec.d = (dut.u_core.dec & ~sa0_mask) | sa1_mask;
    for (int info = 0; info < 256; info++) begin
      cw[N-1:0]   = encode(8'(info));
      cw[N+W-1:N] = csym(cw[N-1:0]);
      send(cw, 0);
      for (int i = 0; i < N + W; i++) send(cw ^ (1 << i), (i < N) ? 1 : 2);
      for (int d = 0; d < 20; d++) begin
        int i, j;
        i = $urandom_range(N + W - 1);
        j = (i + 1 + $urandom_range(N + W - 2)) % (N + W);
        send(cw ^ (1 << i) ^ (1 << j), 3);
      end
      for (int u = 0; u < 20; u++) begin
        e  = (N+W)'({$urandom, $urandom});
        rx = (u % 2 == 0) ? (cw & ~e) : (cw | e);
        if ($countones(rx ^ cw) >= 3) send(rx, 4);
      end
    end
    start = cycles;
    self_test(1'b1, bad);
    checks++;
    // each preset is the first of its 15 vectors: 2 x 14 shifts give all 30
    if (cycles - start != 28) begin
      failures++;
      $display("self test took %0d cycles", cycles - start);
    end
    // stuck-at faults on the decoder outputs
    for (int j = 0; j < N; j++) begin
      for (int sv = 0; sv < 2; sv++) begin
        sa0_mask = (sv == 0) ? N'(1 << j) : '0;
        sa1_mask = (sv == 1) ? N'(1 << j) : '0;
        self_test(1'b0, bad);
        checks++;
        if (bad == 0) begin
          failures++;
          $display("stuck-at-%0d on decoder output %0d not caught", sv, j);
        end else n_caught++;
      end
    end
    sa0_mask = '0;
    sa1_mask = '0;
    // back in normal mode
    cw[N-1:0]   = encode(8'hA5);
    cw[N+W-1:N] = csym(cw[N-1:0]);
    send(cw ^ 1, 1);
    $display("x corrected=%0d b corrected=%0d doubles detected=%0d unidirectional detected=%0d",
             n_corr_x, n_corr_b, n_double, n_uni);
    $display("test vectors: weight-one=%0d weight-14=%0d removed-syndrome=%0d mode switches=%0d faults caught=%0d",
             n_vec_one, n_vec_many, n_silent, n_switch, n_caught);
    checks++;
    if (n_corr_x == 0 || n_corr_b == 0 || n_double == 0 || n_uni == 0 ||
        n_vec_one != 15 || n_vec_many != 15 || n_silent != 6 || n_switch == 0 ||
        n_caught != 2 * N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
