// Weight generator G: computes the check symbol B1' B2' of the corrected word.
//
// The count of ones of the N-bit word is formed by a network of full and
// half adder cells, as the published circuit describes; its exact arrangement
// is taken there from a cited design, and the one below is this design's: a
// carry-save column compressor. Column w holds the bits of weight 2^w
// (column 0: the N input bits; column w+1: the carries of column w). Each
// column is worked as a queue: a full adder takes the next three bits and
// appends its sum to the queue, until two or one bits remain; two remaining
// bits go through a half adder. The last bit of column w is bit w of the
// count. Every cell therefore adds bits of equal weight that come from
// disjoint groups of input bits. The input bits are taken in a strided
// order (below) so that, for the codes of package secded_aued_pkg, every
// cell receives all its input combinations from code words alone; the cells
// at the top weights see their last combinations only for words of very high
// weight, one reason the code keeps the all-ones word as a code word.
//
// The check symbol is this design's choice: B1' is the bitwise complement of
// the L-bit count, L = clog2(N+1), and B2' is a copy of B1'. The complemented
// count grows when ones turn into zeros, so a unidirectional error can never
// move the data weight and the stored count to the same value; the copy puts
// any two different check symbols at least two bit positions apart.
// Combinational.
module weight_generator #(
  parameter int unsigned N = 12,
  parameter int unsigned L = $clog2(N + 1)
) (
  input  logic [N-1:0] x,
  output logic [L-1:0] b1,
  output logic [L-1:0] b2
);
  // bits entering column w
  function automatic int unsigned height(input int unsigned w);
    int unsigned h, f;
    h = N;
    for (int unsigned i = 0; i < w; i++) begin
      f = (h >= 1) ? (h - 1) / 2 : 0;
      h = f + ((h >= 1 && h - 2 * f == 2) ? 1 : 0);
    end
    return h;
  endfunction

  // Order in which the input bits enter column 0: bit j of the queue is
  // x[(j * STRIDE) mod N], STRIDE the smallest number from 2 up with no
  // common factor with N. Taking the bits in plain order would group bits
  // whose parities the code ties together (for N = 12, two groups of three
  // always have equal parity), and the cell adding those groups would then
  // never see some of its input combinations.
  function automatic int unsigned gcd(input int unsigned u, input int unsigned v);
    int unsigned rem;
    while (v != 0) begin
      rem = u % v;
      u = v;
      v = rem;
    end
    return u;
  endfunction

  function automatic int unsigned pick_stride();
    for (int unsigned s = 2; s < N; s++)
      if (gcd(s, N) == 1) return s;
    return 1;
  endfunction

  localparam int unsigned STRIDE = pick_stride();

  logic [L-1:0] cnt;

  // Queue element idx of a column is input bit idx when idx < H, else the
  // sum of cell idx - H (full adders first, then the half adder).
  for (genvar w = 0; w < L; w++) begin : g_col
    localparam int unsigned H  = height(w);
    localparam int unsigned F  = (H - 1) / 2;               // full adders
    localparam int unsigned HA = (H - 2 * F == 2) ? 1 : 0;  // half adders
    logic [H-1:0] qi;
    if (w == 0) begin : g_in
      for (genvar j = 0; j < H; j++) begin : g_perm
        assign qi[j] = x[(j * STRIDE) % N];
      end
    end else begin : g_carry
      assign qi = g_col[w-1].g_cells.co;
    end
    if (F + HA == 0) begin : g_last
      assign cnt[w] = qi[0];
    end else begin : g_cells
      logic [F+HA-1:0] co;   // carries into column w+1
      for (genvar k = 0; k < F + HA; k++) begin : g_cell
        localparam int unsigned NOP = (k < F) ? 3 : 2;
        logic [NOP-1:0] op;
        logic           s;
        for (genvar o = 0; o < NOP; o++) begin : g_op
          localparam int unsigned IDX = 3 * k + o;
          if (IDX < H) begin : g_from_in
            assign op[o] = qi[IDX];
          end else begin : g_from_sum
            assign op[o] = g_cell[IDX-H].s;
          end
        end
        if (k < F) begin : g_fa
          full_adder u_fa (.a(op[0]), .b(op[1]), .ci(op[2]), .s(s), .co(co[k]));
        end else begin : g_ha
          half_adder u_ha (.a(op[0]), .b(op[1]), .s(s), .co(co[k]));
        end
      end
      assign cnt[w] = g_cell[F+HA-1].s;
    end
  end

  assign b1 = ~cnt;
  assign b2 = ~cnt;
endmodule
