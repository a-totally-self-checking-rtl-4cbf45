// Checks, for k = 4, 8, 16, 32 and 64, that normal error-free traffic alone
// gives every two-rail checker cell and every adder cell of the decoder its
// complete test set, the condition for those cells to be self-testing.
//
// A two-rail cell must see all four combinations of two code-valued input
// pairs; a full adder all eight input combinations and a half adder all four.
// Probes are bound into every two_rail_cell, full_adder and half_adder, and
// one cell_cov_check helper per size drives its own decoder core with code
// words (all of them up to k = 16, 20000 random words of varying density
// above) and lists any cell that missed a combination. For k = 8 the adder
// network has 10 cells and the three two-rail checkers have 3 + 3 + 1 cells.
module tb_tsc_cell_coverage;
  import tb_cov_pkg::*;

  bind two_rail_cell trc_cov u_cov (.v({x0, x1, y0, y1}));
  bind full_adder adder_cov #(.NIN(3)) u_cov (.v({a, b, ci}));
  bind half_adder adder_cov #(.NIN(2)) u_cov (.v({1'b0, a, b}));

  logic [4:0] done;
  int ch [5];
  int fl [5];
  int nc [5];
  int checks = 0, failures = 0;
  localparam int KS [5] = '{4, 8, 16, 32, 64};

  cell_cov_check #(.K(4))  u_k4  (.done(done[0]), .checks(ch[0]), .failures(fl[0]), .n_cells(nc[0]));
  cell_cov_check #(.K(8))  u_k8  (.done(done[1]), .checks(ch[1]), .failures(fl[1]), .n_cells(nc[1]));
  cell_cov_check #(.K(16)) u_k16 (.done(done[2]), .checks(ch[2]), .failures(fl[2]), .n_cells(nc[2]));
  cell_cov_check #(.K(32)) u_k32 (.done(done[3]), .checks(ch[3]), .failures(fl[3]), .n_cells(nc[3]));
  cell_cov_check #(.K(64)) u_k64 (.done(done[4]), .checks(ch[4]), .failures(fl[4]), .n_cells(nc[4]));

  // watchdog: the longest run is 65536 words, one per time unit
  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    tb_cov_pkg::enable = 1'b1;
    wait (done == '1);
    for (int i = 0; i < 5; i++) begin
      $display("k=%0d: code words applied and cells checked: %0d checks, %0d failures, %0d cells",
               KS[i], ch[i], fl[i], nc[i]);
      checks += ch[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
