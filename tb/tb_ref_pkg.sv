// Reference model of the k = 8 SEC/DED/AUED code, used by the testbenches.
//
// It is written independently of the RTL package: the twelve kept Hamming
// positions of the shortened (15,11) code with columns 6, 9 and 15 removed are
// listed by hand, check bits sit at positions 1, 2, 4 and 8, and the check
// symbol is the complemented 4-bit count of ones, sent twice.
package tb_ref_pkg;

  localparam int N = 12;
  localparam int R = 4;
  localparam int L = 4;
  localparam int W = 2 * L;

  localparam int POS [N] = '{1, 2, 3, 4, 5, 7, 8, 10, 11, 12, 13, 14};

  function automatic logic [R-1:0] syndrome(input logic [N-1:0] x);
    logic [R-1:0] s;
    s = '0;
    for (int j = 0; j < N; j++) if (x[j]) s ^= POS[j][R-1:0];
    return s;
  endfunction

  // Systematic encoding of 8 information bits into the 12-bit Hamming word.
  function automatic logic [N-1:0] encode(input logic [7:0] info);
    logic [N-1:0] x;
    logic [R-1:0] s;
    int           k;
    x = '0;
    k = 0;
    for (int j = 0; j < N; j++) begin
      if ((POS[j] & (POS[j] - 1)) != 0) begin
        x[j] = info[k];
        k++;
      end
    end
    s = syndrome(x);
    for (int j = 0; j < N; j++)
      if ((POS[j] & (POS[j] - 1)) == 0 && (s & POS[j][R-1:0]) != 0) x[j] = 1'b1;
    return x;
  endfunction

  function automatic logic [W-1:0] csym(input logic [N-1:0] x);
    logic [L-1:0] c;
    c = L'($countones(x));
    return {~c, ~c};
  endfunction

  // Expected outputs of the core for received X, B and correction source Y.
  function automatic void decode(input logic [N-1:0] x, input logic [N-1:0] y,
                                 input logic [W-1:0] b,
                                 output logic [N-1:0] xc, output logic [W-1:0] bc,
                                 output logic z_ok, output logic q_ok);
    logic [R-1:0] s;
    int           d;
    s  = syndrome(x);
    xc = y;
    for (int j = 0; j < N; j++) if (s == POS[j][R-1:0]) xc[j] = ~xc[j];
    bc   = csym(xc);
    z_ok = (syndrome(xc) == '0);
    d    = $countones(b ^ bc);
    q_ok = z_ok && ((d == 0) || (d == 1 && s == '0));
  endfunction

endpackage
