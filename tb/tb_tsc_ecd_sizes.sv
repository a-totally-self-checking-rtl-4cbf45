// Runs the whole circuit at every information length of the code family,
// k = 4, 8, 16, 32 and 64 (r = 3 .. 7), through ecd_size_check: random
// code words, single, double and unidirectional errors, and the complete
// self-exercising test of each size.
module tb_tsc_ecd_sizes;
  logic clk = 1'b0;
  localparam int NC = 5;
  logic [NC-1:0] done;
  int ch [NC], fl [NC], ns [NC], nd [NC], nv [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecd_size_check #(.K(4))  u_k4  (.clk(clk), .done(done[0]), .checks(ch[0]), .failures(fl[0]), .n_single(ns[0]), .n_detect(nd[0]), .n_vectors(nv[0]));
  ecd_size_check #(.K(8))  u_k8  (.clk(clk), .done(done[1]), .checks(ch[1]), .failures(fl[1]), .n_single(ns[1]), .n_detect(nd[1]), .n_vectors(nv[1]));
  ecd_size_check #(.K(16)) u_k16 (.clk(clk), .done(done[2]), .checks(ch[2]), .failures(fl[2]), .n_single(ns[2]), .n_detect(nd[2]), .n_vectors(nv[2]));
  ecd_size_check #(.K(32)) u_k32 (.clk(clk), .done(done[3]), .checks(ch[3]), .failures(fl[3]), .n_single(ns[3]), .n_detect(nd[3]), .n_vectors(nv[3]));
  ecd_size_check #(.K(64)) u_k64 (.clk(clk), .done(done[4]), .checks(ch[4]), .failures(fl[4]), .n_single(ns[4]), .n_detect(nd[4]), .n_vectors(nv[4]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    for (int i = 0; i < NC; i++) begin
      $display("size %0d: checks=%0d failures=%0d corrected=%0d detected=%0d test vectors=%0d",
               i, ch[i], fl[i], ns[i], nd[i], nv[i]);
      checks   += ch[i];
      failures += fl[i];
      checks++;
      if (ns[i] == 0 || nd[i] == 0 || nv[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
