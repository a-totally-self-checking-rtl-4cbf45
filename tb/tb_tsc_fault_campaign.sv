// Single stuck-at fault campaign on tsc_ecd_top (k = 8).
//
// Every line between the blocks of the decoder (each bit of every input port
// of M, C1, SD, EC, S2, G, C2, CC and the output checker) is forced, one at a
// time, to 0 and to 1. For each fault the circuit gets its code input space
// - all 256 code words and every single error of 64 of them - and then the
// full self-exercising test. Two properties of a totally self-checking
// circuit are checked:
//   self-testing: every fault makes q0 == q1 for some code input, or
//                 z0 == z1 for some test pattern;
//   fault secure: no fault ever gives an incorrect code output, i.e. q0 != q1
//                 together with a corrected word X' B1' B2' that is a valid
//                 code word other than the one sent. (A fault in the weight
//                 generator can leave a wrong B1' B2' with q0 != q1; that
//                 output is not a code word, so an output checker sees it.)
// The number of faults whose output was a non-code word that q0/q1 did not
// flag is printed as well.
// The number of faults caught by code words, by single-error words and only
// by the test mode is printed.
// A second set models faults inside the syndrome decoder at gate level: one
// literal of the AND gate of output j stuck at its active value, so that the
// output also fires for the syndrome that differs in that bit. When that
// syndrome is a deleted column, no code word or single error produces it, and
// only the self-exercising test can expose the fault; the testbench fails if
// no such fault occurs or if any fault goes undetected.
// A third set holds the sum or carry output of each full and half adder cell
// of the weight generator at 0 or 1; since every cell sees all its input
// combinations from code words, each of these faults must be caught by code
// words alone.
module tb_tsc_fault_campaign;
  import tb_ref_pkg::*;

  localparam int NS = 17;   // number of fault sites (ports)
  typedef enum int {
    S_M_A, S_M_B, S_C1_R0, S_C1_R1, S_SD_S, S_EC_Y, S_EC_D, S_S2_X, S_G_X,
    S_C2_R0, S_C2_R1, S_CC_B, S_CC_BP, S_CC_F0, S_CC_F1, S_OUT_R0, S_OUT_R1
  } site_e;
  localparam int SITE_W [NS] = '{R, R, R, R, R, N, N, N, N, R, R, W, W, 1, 1, 2, 2};

  logic         clk = 1'b0;
  logic         t = 1'b0, load_one = 1'b0, load_many = 1'b0;
  logic [N-1:0] data_x, corr_x;
  logic [W-1:0] data_b, corr_b;
  logic         z0, z1, q0, q1;
  logic [15:0]  m0 [NS];
  logic [15:0]  m1 [NS];
  int checks = 0, failures = 0;
  // decoder-internal fault: literal lit_i of the AND gate of output lit_j
  // stuck at its active value, so the gate ignores syndrome bit lit_i
  logic         lit_en = 1'b0;
  int           lit_i = 0, lit_j = 0;
  logic [N-1:0] lit_hit;
  int lit_faults = 0, lit_by_cw = 0, lit_by_single = 0, lit_by_test = 0;

  always_comb begin
    lit_hit = '0;
    if (lit_en && ((dut.u_core.syn ^ R'(POS[lit_j])) & ~R'(1 << lit_i)) == '0)
      lit_hit[lit_j] = 1'b1;
  end
  // adder-cell faults: bit 2c / 2c+1 of am0 (am1) holds the sum / carry of
  // cell c of the weight generator at 0 (1)
  localparam int NA = 20;
  logic [NA-1:0] am0 = '0, am1 = '0;
  int add_faults = 0, add_by_cw = 0, add_later = 0;
  int n_faults = 0, by_cw = 0, by_single = 0, by_test = 0, missed = 0, insecure = 0, noncode_out = 0;

  tsc_ecd_top dut (
    .clk(clk), .t(t), .load_one(load_one), .load_many(load_many),
    .data_x(data_x), .data_b(data_b), .corr_x(corr_x), .corr_b(corr_b),
    .z0(z0), .z1(z1), .q0(q0), .q1(q1)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_fault(input int k, input int bt, output bit det_cw,
                           output bit det_single, output bit det_test);
    logic [N+W-1:0] cw;
    det_cw = 0;
    det_single = 0;
    det_test = 0;
    t = 1'b0;
    for (int info = 0; info < 256; info++) begin
      cw[N-1:0]   = encode(8'(info));
      cw[N+W-1:N] = csym(cw[N-1:0]);
      for (int e = -1; e < ((info % 4 == 0) ? N + W : 0); e++) begin
        {data_b, data_x} = (e < 0) ? cw : cw ^ ((N+W)'(1) << e);
        #1;
        if (q0 == q1) begin
          if (e < 0) det_cw = 1;
          else       det_single = 1;
        end else if ({corr_b, corr_x} !== cw && corr_b === csym(corr_x) &&
                     syndrome(corr_x) === '0) begin
          insecure++;
          checks++;
          failures++;
          if (insecure < 6)
            $display("fault site %0d bit %0d: word %h gives %h as correct",
                     k, bt, {data_b, data_x}, {corr_b, corr_x});
        end else if ({corr_b, corr_x} !== cw) begin
          noncode_out++;
        end
      end
    end
    // self-exercising test
    @(negedge clk);
    t = 1'b1;
    for (int v = 0; v < 2; v++) begin
      if (v == 0) load_one = 1'b1;
      else        load_many = 1'b1;
      #1;
      load_one  = 1'b0;
      load_many = 1'b0;
      for (int c = 0; c < 15; c++) begin
        if (c > 0) @(posedge clk);
        #2;
        if (z0 == z1) det_test = 1;
      end
      @(negedge clk);
    end
    t = 1'b0;
  endtask

  initial begin
    for (int k = 0; k < NS; k++) begin
      m0[k] = '0;
      m1[k] = '0;
    end
    force dut.u_core.u_m.a   = (dut.u_core.s1_a & ~m0[S_M_A][R-1:0]) | m1[S_M_A][R-1:0];
    force dut.u_core.u_m.b   = (dut.u_core.s1_b & ~m0[S_M_B][R-1:0]) | m1[S_M_B][R-1:0];
    force dut.u_core.u_c1.r0 = (dut.u_core.s1_a & ~m0[S_C1_R0][R-1:0]) | m1[S_C1_R0][R-1:0];
    force dut.u_core.u_c1.r1 = (~dut.u_core.s1_b & ~m0[S_C1_R1][R-1:0]) | m1[S_C1_R1][R-1:0];
    force dut.u_core.u_sd.s  = (dut.u_core.syn & ~m0[S_SD_S][R-1:0]) | m1[S_SD_S][R-1:0];
    force dut.u_core.u_ec.y  = (dut.u_core.y_eff & ~m0[S_EC_Y][N-1:0]) | m1[S_EC_Y][N-1:0];
    force dut.u_core.u_ec.d  = (dut.u_core.dec & ~m0[S_EC_D][N-1:0]) | m1[S_EC_D][N-1:0] | lit_hit;
    force dut.u_core.u_s2.x  = (dut.u_core.xc & ~m0[S_S2_X][N-1:0]) | m1[S_S2_X][N-1:0];
    force dut.u_core.u_g.x   = (dut.u_core.xc & ~m0[S_G_X][N-1:0]) | m1[S_G_X][N-1:0];
    force dut.u_core.u_c2.r0 = (dut.u_core.s2_a & ~m0[S_C2_R0][R-1:0]) | m1[S_C2_R0][R-1:0];
    force dut.u_core.u_c2.r1 = (~dut.u_core.s2_b & ~m0[S_C2_R1][R-1:0]) | m1[S_C2_R1][R-1:0];
    force dut.u_core.u_cc.b  = (dut.u_core.b & ~m0[S_CC_B][W-1:0]) | m1[S_CC_B][W-1:0];
    force dut.u_core.u_cc.bp = (dut.u_core.bc & ~m0[S_CC_BP][W-1:0]) | m1[S_CC_BP][W-1:0];
    force dut.u_core.u_cc.f0 = (dut.u_core.f0 & ~m0[S_CC_F0][0]) | m1[S_CC_F0][0];
    force dut.u_core.u_cc.f1 = (dut.u_core.f1 & ~m0[S_CC_F1][0]) | m1[S_CC_F1][0];
    force dut.u_core.u_out.r0 = ({dut.u_core.c0, dut.u_core.z0} & ~m0[S_OUT_R0][1:0]) | m1[S_OUT_R0][1:0];
    force dut.u_core.u_out.r1 = ({dut.u_core.c1, dut.u_core.z1} & ~m0[S_OUT_R1][1:0]) | m1[S_OUT_R1][1:0];
    // sum and carry outputs of the ten adder cells of the weight generator
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.s  = ((dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.a ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.b ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.ci) & ~am0[0]) | am1[0];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.co = (((dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.b) | (dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.ci) | (dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.b & dut.u_core.u_g.g_col[0].g_cells.g_cell[0].g_fa.u_fa.ci)) & ~am0[1]) | am1[1];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.s  = ((dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.a ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.b ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.ci) & ~am0[2]) | am1[2];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.co = (((dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.b) | (dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.ci) | (dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.b & dut.u_core.u_g.g_col[0].g_cells.g_cell[1].g_fa.u_fa.ci)) & ~am0[3]) | am1[3];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.s  = ((dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.a ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.b ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.ci) & ~am0[4]) | am1[4];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.co = (((dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.b) | (dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.ci) | (dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.b & dut.u_core.u_g.g_col[0].g_cells.g_cell[2].g_fa.u_fa.ci)) & ~am0[5]) | am1[5];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.s  = ((dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.a ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.b ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.ci) & ~am0[6]) | am1[6];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.co = (((dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.b) | (dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.ci) | (dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.b & dut.u_core.u_g.g_col[0].g_cells.g_cell[3].g_fa.u_fa.ci)) & ~am0[7]) | am1[7];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.s  = ((dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.a ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.b ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.ci) & ~am0[8]) | am1[8];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.co = (((dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.b) | (dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.ci) | (dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.b & dut.u_core.u_g.g_col[0].g_cells.g_cell[4].g_fa.u_fa.ci)) & ~am0[9]) | am1[9];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[5].g_ha.u_ha.s  = ((dut.u_core.u_g.g_col[0].g_cells.g_cell[5].g_ha.u_ha.a ^ dut.u_core.u_g.g_col[0].g_cells.g_cell[5].g_ha.u_ha.b) & ~am0[10]) | am1[10];
    force dut.u_core.u_g.g_col[0].g_cells.g_cell[5].g_ha.u_ha.co = ((dut.u_core.u_g.g_col[0].g_cells.g_cell[5].g_ha.u_ha.a & dut.u_core.u_g.g_col[0].g_cells.g_cell[5].g_ha.u_ha.b) & ~am0[11]) | am1[11];
    force dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.s  = ((dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.a ^ dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.b ^ dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.ci) & ~am0[12]) | am1[12];
    force dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.co = (((dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.a & dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.b) | (dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.a & dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.ci) | (dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.b & dut.u_core.u_g.g_col[1].g_cells.g_cell[0].g_fa.u_fa.ci)) & ~am0[13]) | am1[13];
    force dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.s  = ((dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.a ^ dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.b ^ dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.ci) & ~am0[14]) | am1[14];
    force dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.co = (((dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.a & dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.b) | (dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.a & dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.ci) | (dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.b & dut.u_core.u_g.g_col[1].g_cells.g_cell[1].g_fa.u_fa.ci)) & ~am0[15]) | am1[15];
    force dut.u_core.u_g.g_col[1].g_cells.g_cell[2].g_ha.u_ha.s  = ((dut.u_core.u_g.g_col[1].g_cells.g_cell[2].g_ha.u_ha.a ^ dut.u_core.u_g.g_col[1].g_cells.g_cell[2].g_ha.u_ha.b) & ~am0[16]) | am1[16];
    force dut.u_core.u_g.g_col[1].g_cells.g_cell[2].g_ha.u_ha.co = ((dut.u_core.u_g.g_col[1].g_cells.g_cell[2].g_ha.u_ha.a & dut.u_core.u_g.g_col[1].g_cells.g_cell[2].g_ha.u_ha.b) & ~am0[17]) | am1[17];
    force dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.s  = ((dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.a ^ dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.b ^ dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.ci) & ~am0[18]) | am1[18];
    force dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.co = (((dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.a & dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.b) | (dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.a & dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.ci) | (dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.b & dut.u_core.u_g.g_col[2].g_cells.g_cell[0].g_fa.u_fa.ci)) & ~am0[19]) | am1[19];

    for (int k = 0; k < NS; k++) begin
      for (int bt = 0; bt < SITE_W[k]; bt++) begin
        for (int sv = 0; sv < 2; sv++) begin
          bit det_cw, det_single, det_test;
          if (sv == 0) m0[k] = 16'(1 << bt);
          else         m1[k] = 16'(1 << bt);
          run_fault(k, bt, det_cw, det_single, det_test);
          t = 1'b0;
          m0[k] = '0;
          m1[k] = '0;
          n_faults++;
          checks++;
          if (det_cw) by_cw++;
          else if (det_single) by_single++;
          else if (det_test) by_test++;
          else begin
            missed++;
            failures++;
            $display("site %0d bit %0d stuck-at-%0d is never detected", k, bt, sv);
          end
        end
      end
    end
    // decoder-internal literal faults
    lit_en = 1'b1;
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < R; i++) begin
        bit det_cw, det_single, det_test;
        lit_j = j;
        lit_i = i;
        run_fault(-1, 0, det_cw, det_single, det_test);
        t = 1'b0;
        lit_faults++;
        checks++;
        if (det_cw) lit_by_cw++;
        else if (det_single) lit_by_single++;
        else if (det_test) lit_by_test++;
        else begin
          failures++;
          $display("decoder gate %0d literal %0d fault never detected", j, i);
        end
      end
    end
    lit_en = 1'b0;
    // adder-cell output faults; every cell gets all its input combinations
    // from code words, so each of these must show up on code words already
    for (int c = 0; c < NA; c++) begin
      for (int sv = 0; sv < 2; sv++) begin
        bit det_cw, det_single, det_test;
        if (sv == 0) am0[c] = 1'b1;
        else         am1[c] = 1'b1;
        run_fault(-2, c, det_cw, det_single, det_test);
        t = 1'b0;
        am0 = '0;
        am1 = '0;
        add_faults++;
        checks++;
        if (det_cw) add_by_cw++;
        else begin
          failures++;
          if (det_single || det_test) add_later++;
          $display("adder cell output %0d stuck-at-%0d not detected by code words", c, sv);
        end
      end
    end
    $display("adder cell output faults=%0d caught by code words=%0d, only later=%0d",
             add_faults, add_by_cw, add_later);
    $display("decoder literal faults=%0d caught by code words=%0d, first by single errors=%0d, only by test mode=%0d",
             lit_faults, lit_by_cw, lit_by_single, lit_by_test);
    checks++;
    if (lit_by_test == 0) failures++;
    $display("code inputs that gave a non-code word with q0 != q1: %0d", noncode_out);
    $display("faults=%0d caught by code words=%0d, first by single errors=%0d, only by test mode=%0d, missed=%0d, not fault secure=%0d",
             n_faults, by_cw, by_single, by_test, missed, insecure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
