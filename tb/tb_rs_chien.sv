// tb_rs_chien: locators built from random error positions (product of
// (1 + alpha^p x), scaled by a random constant) and random evaluators are
// searched. Checks that out_valid lasts exactly N cycles in position order
// N-1 .. 0, that roots are flagged exactly at the error positions, that the
// odd-part and Omega evaluations match direct evaluation at alpha^-p, the root
// count, and back-to-back loads.
module tb_rs_chien;
  import tb_rs_ref::*;
  localparam int N = 208, T = 4;
  logic clk = 0, rst_n = 0, load = 0, nz_in = 0;
  logic [T:0][7:0] lambda = '0;
  logic [T-1:0][7:0] omega = '0;
  logic [4:0] deg_in = 0, out_nroots, out_deg;
  logic busy, out_valid, out_last, out_root, out_nz;
  logic [7:0] out_lodd, out_oval;
  int checks = 0, failures = 0;

  rs_chien #(.N(N), .T(T), .FCR(1)) dut (.clk, .rst_n, .load, .lambda, .omega, .deg_in, .nz_in,
      .busy, .out_valid, .out_last, .out_root, .out_lodd, .out_oval, .out_nroots, .out_deg, .out_nz);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected stream, one entry per position
  int e_root [$], e_lodd [$], e_oval [$], e_deg [$];
  int seen = 0, nr = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    int r, lo, ov, dg;
    r = e_root.pop_front(); lo = e_lodd.pop_front(); ov = e_oval.pop_front(); dg = e_deg.pop_front();
    if (seen % N == 0) nr = 0;
    nr += r;
    checks++;
    if (int'(out_root) != r || int'(out_lodd) != lo || int'(out_oval) != ov) begin
      failures++;
      if (failures < 10) $display("pos %0d: root %0d/%0d lodd %0h/%0h oval %0h/%0h", N - 1 - seen % N,
                                   out_root, r, out_lodd, lo, out_oval, ov);
    end
    checks++;
    if (out_last != (seen % N == N - 1) || int'(out_nroots) != nr || int'(out_deg) != dg) failures++;
    seen++;
  end

  initial begin
    int lam[], om[], pos[$], lodd[];
    int ne, sc;
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 30; w++) begin
      ne = w % (T + 1);
      pos.delete();
      lam = new[T + 1];
      foreach (lam[i]) lam[i] = 0;
      lam[0] = 1;
      while (pos.size() < ne) begin
        int p;
        bit dup;
        p = $urandom % N;
        dup = 0;
        foreach (pos[i]) if (pos[i] == p) dup = 1;
        if (!dup) begin
          pos.push_back(p);
          for (int i = T; i > 0; i--) lam[i] ^= mul(lam[i-1], apow(p));
        end
      end
      sc = 1 + $urandom % 255;
      foreach (lam[i]) lam[i] = mul(lam[i], sc);
      om = new[T];
      foreach (om[i]) om[i] = $urandom % 256;
      lodd = new[T + 1];
      foreach (lam[i]) lodd[i] = (i % 2 == 1) ? lam[i] : 0;
      for (int p = N - 1; p >= 0; p--) begin
        int x;
        x = apow(-p);
        e_root.push_back(int'(eval_coef(lam, x) == 0));
        e_lodd.push_back(eval_coef(lodd, x));
        e_oval.push_back(mul(eval_coef(om, x), x));
        e_deg.push_back(ne);
      end
      // load on the cycle the previous search ends (or at once when idle)
      @(negedge clk);
      while (busy && !(dut.pos == 0)) @(negedge clk);
      for (int i = 0; i <= T; i++) lambda[i] = 8'(lam[i]);
      for (int j = 0; j < T; j++) omega[j] = 8'(om[j]);
      deg_in = 5'(ne);
      nz_in  = 1;
      load   = 1;
      @(negedge clk);
      load   = 0;
      lambda = '0;
      deg_in = 0;
    end
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (seen != 30 * N) begin failures++; $display("saw %0d positions", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
