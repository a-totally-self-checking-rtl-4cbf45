// Testbench helper: exercises one tsc_ecd_top of k = K information bits.
//
// It keeps its own reference of the shortened Hamming code (the kept columns
// follow the removal rule for each r: nothing for r = 3, columns 6, 9, 15 for
// r = 4, all weight-3 columns for r = 5, weight-3 plus 3, 6, 12, 24, 17 for
// r = 6, weight-3 and weight-5 for r = 7) and of the check symbol
// (complemented count of ones, sent twice). It checks that the all-ones word
// belongs to the code, that random code words and single errors are corrected,
// that random double and unidirectional errors are flagged, and that all
// 2(2^r - 1) self-test vectors leave z0 != z1. done rises when it has finished.
module ecd_size_check #(
  parameter int unsigned K = 16,
  parameter int unsigned WORDS = 200
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_single,
  output int   n_detect,
  output int   n_vectors
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

  logic         t = 1'b0, load_one = 1'b0, load_many = 1'b0;
  logic [N-1:0] data_x, corr_x;
  logic [W-1:0] data_b, corr_b;
  logic         z0, z1, q0, q1;

  tsc_ecd_top #(.K(K)) dut (
    .clk(clk), .t(t), .load_one(load_one), .load_many(load_many),
    .data_x(data_x), .data_b(data_b), .corr_x(corr_x), .corr_b(corr_b),
    .z0(z0), .z1(z1), .q0(q0), .q1(q1)
  );

  function automatic logic [R-1:0] syn(input logic [N-1:0] x);
    logic [R-1:0] s = '0;
    for (int j = 0; j < N; j++) if (x[j]) s ^= R'(pos[j]);
    return s;
  endfunction

  function automatic logic [N+W-1:0] codeword(input logic [N-1:0] raw);
    logic [N-1:0] x = raw;
    logic [R-1:0] s;
    logic [L-1:0] c;
    for (int j = 0; j < N; j++) if ((pos[j] & (pos[j] - 1)) == 0) x[j] = 1'b0;
    s = syn(x);
    for (int j = 0; j < N; j++)
      if ((pos[j] & (pos[j] - 1)) == 0 && (int'(s) & pos[j]) != 0) x[j] = 1'b1;
    c = L'($countones(x));
    return {~c, ~c, x};
  endfunction

  function automatic logic [N+W-1:0] rand_vec();
    logic [N+W-1:0] v;
    for (int i = 0; i < N + W; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  task automatic send(input logic [N+W-1:0] word, input logic [N+W-1:0] cw, input bit correctable);
    @(negedge clk);
    {data_b, data_x} = word;
    #1;
    checks++;
    if (correctable) begin
      if (!(q0 != q1) || {corr_b, corr_x} !== cw) failures++;
    end else if (q0 != q1) failures++;
    else n_detect++;
  endtask

  initial begin
    logic [N+W-1:0] cw, e;
    int i, j;
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_single = 0;
    n_detect = 0;
    n_vectors = 0;
    i = 0;
    for (int p = 1; p <= LEN; p++) begin
      if (!removed(p)) begin
        pos[i] = p;
        i++;
      end
    end
    // the all-ones Hamming word must be a code word
    checks++;
    if (syn('1) != '0) failures++;
    cw = codeword('1);
    send(cw, cw, 1'b1);
    for (int v = 0; v < WORDS; v++) begin
      cw = codeword(rand_vec()[N-1:0]);
      send(cw, cw, 1'b1);
      i = $urandom_range(N + W - 1);
      send(cw ^ ((N+W)'(1) << i), cw, 1'b1);
      n_single++;
      j = (i + 1 + $urandom_range(N + W - 2)) % (N + W);
      send(cw ^ ((N+W)'(1) << i) ^ ((N+W)'(1) << j), cw, 1'b0);
      e = rand_vec() & rand_vec();
      if ($countones((cw & ~e) ^ cw) >= 3) send(cw & ~e, cw, 1'b0);
      if ($countones((cw | e) ^ cw) >= 3) send(cw | e, cw, 1'b0);
    end
    // self test: both presets, all rotations
    @(negedge clk);
    t = 1'b1;
    for (int v = 0; v < 2; v++) begin
      if (v == 0) load_one = 1'b1;
      else        load_many = 1'b1;
      #1;
      load_one  = 1'b0;
      load_many = 1'b0;
      for (int c = 0; c < LEN; c++) begin
        if (c > 0) @(posedge clk);
        #2;
        checks++;
        n_vectors++;
        if (z0 == z1) failures++;
      end
      @(negedge clk);
    end
    t = 1'b0;
    checks++;
    if (n_vectors != 2 * LEN) failures++;
    done = 1'b1;
  end
endmodule
