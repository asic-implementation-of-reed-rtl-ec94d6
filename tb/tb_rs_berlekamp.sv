// tb_rs_berlekamp: syndromes of words with 0..t symbol errors at random
// positions are solved; sigma must vanish at alpha^-p for every error position
// p, have degree equal to the error count, and a non-zero constant term. With
// more than t errors the degree must exceed t or the roots must not all be
// found (checked later in the decoder); here only completion is required.
// Also checks the solve time (result 2t+1 cycles after start) and that done is a single-cycle pulse.
module tb_rs_berlekamp;
  import tb_rs_ref::*;
  localparam int N = 208, K = 200, NS = 8, T = 4;
  logic clk = 0, rst_n = 0, start = 0, nz_in = 0, busy, done, nz_out;
  logic [NS-1:0][7:0] syn = '0, syn_out;
  logic [T:0][7:0] lambda;
  logic [4:0] deg;
  int checks = 0, failures = 0, cyc = 0;

  rs_berlekamp #(.NSYM(NS), .T(T)) dut (.clk, .rst_n, .start, .syn, .nz_in, .busy, .done,
                                        .lambda, .deg, .syn_out, .nz_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int msg[], cw[], pos[$], lam[];
    int t0, ne;
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      msg = new[K];
      foreach (msg[i]) msg[i] = $urandom % 256;
      encode(N, K, 1, msg, cw);
      ne = w % (T + 1);
      pos.delete();
      while (pos.size() < ne) begin
        int p;
        bit dup;
        p = $urandom % N;
        dup = 0;
        foreach (pos[i]) if (pos[i] == p) dup = 1;
        if (!dup) begin
          pos.push_back(p);
          cw[N - 1 - p] ^= 1 + ($urandom % 255);
        end
      end
      @(negedge clk);
      for (int j = 0; j < NS; j++) syn[j] = 8'(eval_word(cw, apow(1 + j)));
      nz_in = (syn != '0);
      start = 1;
      @(posedge clk);
      t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != NS + 1) begin failures++; $display("solve took %0d cycles", cyc - t0); end
      checks++;
      if (int'(deg) != ne) begin failures++; $display("word %0d: deg %0d for %0d errors", w, deg, ne); end
      checks++;
      if (lambda[0] == 0) failures++;
      checks++;
      if (syn_out != syn || nz_out != nz_in) failures++;
      lam = new[T + 1];
      for (int i = 0; i <= T; i++) lam[i] = int'(lambda[i]);
      foreach (pos[i]) begin
        checks++;
        if (eval_coef(lam, apow(-pos[i])) != 0) begin
          failures++;
          if (failures < 10) $display("word %0d: sigma(alpha^-%0d) != 0", w, pos[i]);
        end
      end
      @(negedge clk);
      checks++;
      if (done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
