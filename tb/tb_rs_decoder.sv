// tb_rs_decoder: end-to-end decoder test with reference-encoded words.
// Words carry 0..t random symbol errors, t-symbol bursts, errors in parity,
// or t+1..2t errors; they are sent back to back and also with input gaps.
// For up to t errors the output word must equal the transmitted codeword,
// with detected/nerr/fail matching; for more than t errors the word must be
// flagged failed or, if the decoder miscorrects, come out as some other
// codeword (checked by its syndromes). Also checks the latency from the last
// received symbol to the first corrected symbol (2t+7 cycles) and that each
// word leaves in N consecutive cycles.
module tb_rs_decoder;
  import tb_rs_ref::*;
  localparam int N = 208, K = 200, T = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_last, out_detected, out_fail;
  logic [7:0] in_data = 0, out_data;
  logic [4:0] out_nerr;
  int checks = 0, failures = 0, cyc = 0;
  int exp_sym [$], got [$], exp_ne [$], last_in [$];
  int nwords = 0, ndone = 0, n_corr = 0, n_fail = 0, n_miscorr = 0, n_clean = 0;
  int first_out = -1, prev_valid_cyc = -1, runlen = 0;

  rs_decoder #(.N(N), .K(K)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data,
      .out_last, .out_detected, .out_nerr, .out_fail);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int ne, li;
    bit same;
    if (got.size() == 0) begin
      li = last_in.pop_front();
      checks++;
      if (cyc - li != 2 * T + 7) begin
        failures++;
        $display("latency %0d", cyc - li);
      end
    end else begin
      checks++;
      if (cyc != prev_valid_cyc + 1) failures++;
    end
    prev_valid_cyc = cyc;
    got.push_back(int'(out_data));
    if (out_last) begin
      int w[];
      ne = exp_ne.pop_front();
      same = 1;
      w = new[N];
      for (int i = 0; i < N; i++) begin
        int e;
        e = exp_sym.pop_front();
        w[i] = got[i];
        if (got[i] != e) same = 0;
      end
      checks++;
      if (got.size() != N) failures++;
      got.delete();
      checks++;
      if (ne <= T) begin
        if (!same || out_fail || out_detected != (ne != 0) || int'(out_nerr) != ne) begin
          failures++;
          $display("word %0d with %0d errors: same %0d fail %0d det %0d nerr %0d", ndone, ne, same, out_fail, out_detected, out_nerr);
        end
        if (ne == 0) n_clean++; else n_corr++;
      end else begin
        if (!out_detected) failures++;
        else if (out_fail) n_fail++;
        else begin
          bit ok;
          ok = 1;
          for (int j = 0; j < 2 * T; j++) if (eval_word(w, apow(1 + j)) != 0) ok = 0;
          if (!ok) begin failures++; $display("word %0d: accepted a non-codeword", ndone); end
          n_miscorr++;
        end
      end
      ndone++;
    end
  end

  task automatic send(input int mode, input bit gaps);
    int msg[], cw[], pos[$];
    int ne;
    msg = new[K];
    foreach (msg[i]) msg[i] = $urandom % 256;
    encode(N, K, 1, msg, cw);
    foreach (cw[i]) exp_sym.push_back(cw[i]);
    case (mode)
      0: ne = $urandom % (T + 1);             // scattered, correctable
      1: ne = T;                              // burst of t symbols
      2: ne = T + 1 + $urandom % T;           // too many
      default: ne = 2;                        // errors in the parity part
    endcase
    if (mode == 1) begin
      int s;
      s = $urandom % (N - T + 1);
      for (int i = 0; i < T; i++) pos.push_back(s + i);
    end else if (mode == 3) begin
      pos.push_back(K + $urandom % 4);
      pos.push_back(K + 4 + $urandom % 4);
    end else begin
      while (pos.size() < ne) begin
        int p;
        bit dup;
        p = $urandom % N;
        dup = 0;
        foreach (pos[i]) if (pos[i] == p) dup = 1;
        if (!dup) pos.push_back(p);
      end
    end
    foreach (pos[i]) cw[pos[i]] ^= 1 + ($urandom % 255);
    exp_ne.push_back(ne);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while (gaps && ($urandom % 6) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_data  = 8'(cw[i]);
      if (i == N - 1) last_in.push_back(cyc + 1);
    end
    nwords++;
  endtask

  initial begin
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 60; w++) send(w % 4, (w >= 40));
    @(negedge clk);
    in_valid = 0;
    repeat (2 * N + 40) @(posedge clk);
    checks++;
    if (ndone != nwords) begin failures++; $display("%0d of %0d words decoded", ndone, nwords); end
    checks++;
    if (n_corr == 0 || n_fail + n_miscorr == 0) failures++;
    $display("clean %0d corrected %0d failed %0d miscorrected %0d", n_clean, n_corr, n_fail, n_miscorr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
