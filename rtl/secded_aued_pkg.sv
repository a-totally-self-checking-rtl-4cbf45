// Shared code constants for the SEC/DED/AUED error correcting/detecting circuit.
//
// A code word is X B1 B2. X is a code word of a (possibly shortened) Hamming
// code with r check bits, and B1 B2 is a check symbol computed from the weight
// of X. X is held in Hamming position order: bit j of an N-bit vector (j = 0 ..
// N-1) carries the (j+1)-th position, counting upward, that survives the
// shortening of the complete Hamming code of length 2^r - 1. The positions that
// are powers of two are the check bits; all others are information bits. The
// column of the parity check matrix that belongs to a position is the binary
// value of the position, so the syndrome of a single error is the position of
// the erroneous bit.
//
// The shortened code must keep the all-ones vector as a code word, so each row
// of the matrix of removed columns has an even number of ones:
//   r = 3 (k = 4):  nothing removed (complete code)
//   r = 4 (k = 8):  columns 6, 9 and 15 removed
//   r = 5 (k = 16): the ten weight-3 columns (the 3-out-of-5 code)
//   r = 6 (k = 32): the twenty weight-3 columns and the five weight-2 columns
//                   3, 6, 12, 24, 17 (each row then holds 10 + 2 ones)
//   r = 7 (k = 64): the 35 weight-3 and 21 weight-5 columns (15 + 15 ones a row)
// The choices for r = 3, 4 and 5 are the ones published with the circuit; those
// for r = 6 and 7 are this design's own, picked to satisfy the same rule.
//
// The check symbol is this design's choice: B1 is the bitwise complement of the
// L-bit binary count of ones in X (a Berger-style check, L = clog2(N+1)) and
// B2 is a copy of B1. Any two check symbols that belong to different weights
// therefore differ in at least two bit positions, which is what the second
// order comparator relies on.
package secded_aued_pkg;

  // Widest complete Hamming code supported (r = 7, length 127).
  localparam int unsigned MAXPOS = 128;

  // Number of Hamming check bits r for k information bits.
  function automatic int unsigned r_for_k(input int unsigned k);
    int unsigned r;
    r = 2;
    while (((1 << r) - r - 1) < k) r++;
    return r;
  endfunction

  function automatic int unsigned popcount7(input int unsigned v);
    int unsigned c;
    c = 0;
    for (int b = 0; b < 8; b++) c += (v >> b) & 1;
    return c;
  endfunction

  // 1 when column (position) pos of the complete code is removed for this r.
  function automatic bit col_removed(input int unsigned r, input int unsigned pos);
    int unsigned w;
    w = popcount7(pos);
    case (r)
      4:       return (pos == 6) || (pos == 9) || (pos == 15);
      5:       return (w == 3);
      6:       return (w == 3) || (pos == 3) || (pos == 6) || (pos == 12) ||
                      (pos == 24) || (pos == 17);
      7:       return (w == 3) || (w == 5);
      default: return 1'b0;
    endcase
  endfunction

  // Position (1 .. 2^r-1) of the idx-th kept column, idx counted from 0.
  function automatic int unsigned kept_pos(input int unsigned r, input int unsigned idx);
    int unsigned cnt;
    int unsigned res;
    cnt = 0;
    res = 0;
    for (int unsigned p = 1; p < (1 << r); p++) begin
      if (!col_removed(r, p)) begin
        if (cnt == idx) res = p;
        cnt++;
      end
    end
    return res;
  endfunction

  // Number of kept columns, n = k + r.
  function automatic int unsigned code_len(input int unsigned r);
    int unsigned cnt;
    cnt = 0;
    for (int unsigned p = 1; p < (1 << r); p++)
      if (!col_removed(r, p)) cnt++;
    return cnt;
  endfunction

  // Bit mask over X (bit j = j-th kept position) of the information bits that
  // row i of the parity check matrix covers, the check bit of the row excluded.
  function automatic logic [MAXPOS-1:0] info_row_mask(input int unsigned r,
                                                      input int unsigned n,
                                                      input int unsigned i);
    logic [MAXPOS-1:0] m;
    int unsigned p;
    m = '0;
    for (int unsigned j = 0; j < n; j++) begin
      p = kept_pos(r, j);
      if (((p >> i) & 1) == 1 && p != (1 << i)) m[j] = 1'b1;
    end
    return m;
  endfunction

  // Index in X of the check bit of row i (the position 2^i).
  function automatic int unsigned check_index(input int unsigned r,
                                              input int unsigned n,
                                              input int unsigned i);
    int unsigned res;
    res = 0;
    for (int unsigned j = 0; j < n; j++)
      if (kept_pos(r, j) == (1 << i)) res = j;
    return res;
  endfunction

  // Mask over shift register positions (bit p = position p) of the removed
  // columns that row i covers: the inputs of XOR tree i besides Z(2^i).
  function automatic logic [MAXPOS-1:0] removed_row_mask(input int unsigned r,
                                                         input int unsigned i);
    logic [MAXPOS-1:0] m;
    m = '0;
    for (int unsigned p = 1; p < (1 << r); p++)
      if (col_removed(r, p) && ((p >> i) & 1) == 1) m[p] = 1'b1;
    return m;
  endfunction

endpackage
