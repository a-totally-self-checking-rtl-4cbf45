// Testbench helper: feeds one tsc_ecd_core of k = K information bits with
// error-free code words only, and then reports whether every two-rail cell
// (of C1, C2 and the output checker) and every full and half adder cell (of
// the weight generator) below it has received its whole test set.
//
// For K <= 16 every code word is applied once; for larger K, WORDS random
// code words are applied, each drawn with its own density of ones (0 to
// 100 percent) so that words of very low and very high weight occur, plus
// the all-zeros and all-ones words. The code reference (kept positions and
// the complemented, doubled count of ones) is this helper's own, written
// from the rules of the code. Every word must also come out unchanged with
// q0 != q1. The probes trc_cov and adder_cov, bound by the enclosing
// testbench, do the recording; recording must be switched on (tb_cov_pkg::
// enable) by the enclosing testbench at time 1. done rises when the report
// has been made. No clock: one word per time unit.
module cell_cov_check #(
  parameter int unsigned K = 16,
  parameter int unsigned WORDS = 20000
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_cells
);
  localparam int R = (K <= 4) ? 3 : (K <= 11) ? 4 : (K <= 26) ? 5 : (K <= 57) ? 6 : 7;
  localparam int LEN = (1 << R) - 1;

  function automatic bit removed(input int p);
    int w;
    w = $countones(p);
    case (R)
      4: return p == 6 || p == 9 || p == 15;
      5: return w == 3;
      6: return w == 3 || p == 3 || p == 6 || p == 12 || p == 24 || p == 17;
      7: return w == 3 || w == 5;
      default: return 0;
    endcase
  endfunction

  function automatic int count_kept();
    int c = 0;
    for (int p = 1; p <= LEN; p++) if (!removed(p)) c++;
    return c;
  endfunction

  localparam int N = count_kept();
  localparam int L = $clog2(N + 1);
  localparam int W = 2 * L;

  int pos [N];

  logic [N-1:0] x, xc;
  logic [W-1:0] b, bc;
  logic         z0, z1, q0, q1;

  tsc_ecd_core #(.K(K)) dut (
    .x(x), .y('0), .t(1'b0), .b(b), .xc(xc), .bc(bc),
    .z0(z0), .z1(z1), .q0(q0), .q1(q1)
  );

  // the information bits of v placed in the non-power-of-two positions,
  // check bits set for a zero syndrome, check symbol appended
  function automatic logic [N+W-1:0] codeword(input logic [127:0] v);
    logic [N-1:0] cx = '0;
    logic [R-1:0] s = '0;
    logic [L-1:0] c;
    int i = 0;
    for (int j = 0; j < N; j++) begin
      if ((pos[j] & (pos[j] - 1)) != 0) begin
        cx[j] = v[i];
        i++;
        if (cx[j]) s ^= R'(pos[j]);
      end
    end
    for (int j = 0; j < N; j++)
      if ((pos[j] & (pos[j] - 1)) == 0 && (int'(s) & pos[j]) != 0) cx[j] = 1'b1;
    c = L'($countones(cx));
    return {~c, ~c, cx};
  endfunction

  task automatic apply(input logic [N+W-1:0] cw);
    {b, x} = cw;
    #1;
    checks++;
    if (!(q0 != q1) || {bc, xc} !== cw) failures++;
  endtask

  initial begin : run
    logic [127:0] v;
    string scope;
    int i;
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_cells = 0;
    i = 0;
    for (int p = 1; p <= LEN; p++) begin
      if (!removed(p)) begin
        pos[i] = p;
        i++;
      end
    end
    // settle before recording starts at time 1
    {b, x} = codeword('0);
    #2;
    if (K <= 16) begin
      for (int n = 0; n < (1 << K); n++) apply(codeword(128'(n)));
    end else begin
      apply(codeword('0));
      apply(codeword('1));
      for (int n = 0; n < int'(WORDS); n++) begin
        int unsigned d;
        d = $urandom_range(100);
        for (int j = 0; j < K; j++) v[j] = ($urandom_range(99) < d);
        apply(codeword(v));
      end
    end
    scope = $sformatf("%m");          // <helper>.run
    scope = scope.substr(0, scope.len() - 5);
    foreach (tb_cov_pkg::seen[p]) begin
      if (tb_cov_pkg::under(p, scope)) begin
        n_cells++;
        checks++;
        if ((tb_cov_pkg::seen[p] & tb_cov_pkg::need[p]) != tb_cov_pkg::need[p]) begin
          failures++;
          $display("k=%0d: %s saw %b, needs %b", K, p, tb_cov_pkg::seen[p], tb_cov_pkg::need[p]);
        end
      end
    end
    checks++;
    if (n_cells == 0) failures++;
    done = 1'b1;
  end
endmodule
