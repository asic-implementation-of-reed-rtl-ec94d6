// tb_rs_corrector: synthetic Forney streams against a buffered word held in
// the testbench. Checks the XOR correction, the buffer pops, and the status
// rules at the last position: detected = nz; fail when degree > t, when the
// root count differs from the degree, or when any position was flagged bad;
// nerr = degree unless failed.
module tb_rs_corrector;
  localparam int N = 40, T = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, in_bad = 0, in_nz = 0;
  logic [7:0] in_err = 0, rd_data = 0, out_data;
  logic [4:0] in_nroots = 0, in_deg = 0, out_nerr;
  logic rd_en, out_valid, out_last, out_detected, out_fail;
  int checks = 0, failures = 0, nfail = 0, nok = 0;

  rs_corrector #(.T(T)) dut (.clk, .rst_n, .in_valid, .in_last, .in_err, .in_bad, .in_nroots,
      .in_deg, .in_nz, .rd_en, .rd_data, .out_valid, .out_data, .out_last, .out_detected,
      .out_nerr, .out_fail);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int deg, roots, badpos, ef;
    bit expfail;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      deg    = $urandom % 7;
      roots  = (w % 3 == 0) ? deg + 1 : deg;
      badpos = (w % 7 == 0) ? int'($urandom % N) : -1;
      in_nz  = (w % 5 != 0) || deg != 0;
      for (int p = 0; p < N; p++) begin
        @(negedge clk);
        in_valid  = 1;
        in_last   = (p == N - 1);
        rd_data   = 8'($urandom);
        in_err    = 8'($urandom);
        in_bad    = (p == badpos);
        in_deg    = 5'(deg);
        in_nroots = (p == N - 1) ? 5'(roots) : 5'($urandom);
        ef        = int'(rd_data) ^ int'(in_err);
        #1;
        checks++;
        if (!rd_en) failures++;
        @(negedge clk);
        in_valid = 0;
        #1;
        checks++;
        if (!out_valid || int'(out_data) != ef || out_last != (p == N - 1)) failures++;
      end
      expfail = in_nz && (deg > T || roots != deg || badpos >= 0);
      checks++;
      if (out_detected != in_nz || out_fail != expfail || int'(out_nerr) != (expfail ? 0 : deg)) begin
        failures++;
        if (failures < 10) $display("w%0d deg %0d roots %0d bad %0d nz %0d: fail %0d nerr %0d", w, deg, roots, badpos, in_nz, out_fail, out_nerr);
      end
      if (expfail) nfail++; else nok++;
    end
    checks++; if (nfail == 0 || nok == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
