// tb_rs_encoder: random messages, with and without source gaps, are encoded
// and compared symbol by symbol with a long-division reference. Also checks
// that in_ready drops for exactly 2t cycles per word, that out_last marks the
// last symbol, and that an unstalled word takes N cycles.
module tb_rs_encoder;
  import tb_rs_ref::*;
  localparam int N = 208, K = 200;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_last;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  int msgs [$];          // queue of expected codeword symbols
  int nwords = 12;
  int outcnt = 0, notready = 0;
  int first_cycle, cyc = 0, last_cycles [$];

  rs_encoder #(.N(N), .K(K)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                  .out_valid, .out_data, .out_last);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n) begin
    if (!in_ready) notready++;
    if (out_valid) begin
      checks++;
      if (msgs.size() == 0) failures++;
      else begin
        int e;
        e = msgs.pop_front();
        if (int'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("word symbol %0d: got %0h expected %0h", outcnt % N, out_data, e);
        end
      end
      checks++;
      if (out_last != ((outcnt % N) == N - 1)) failures++;
      if (out_last) last_cycles.push_back(cyc);
      outcnt++;
    end
  end

  initial begin
    int msg[];
    int cw[];
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < nwords; w++) begin
      msg = new[K];
      foreach (msg[i]) msg[i] = (w == 0) ? 0 : ((w == 1) ? 255 : int'($urandom % 256));
      encode(N, K, 1, msg, cw);
      foreach (cw[i]) msgs.push_back(cw[i]);
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        // words 0..5 without gaps, the rest with random gaps
        while (w >= 6 && ($urandom % 3) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        while (!in_ready) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_data  = 8'(msg[i]);
      end
      @(negedge clk);
      in_valid = 0;
    end
    repeat (2 * N) @(posedge clk);
    checks++; if (outcnt != nwords * N) begin failures++; $display("outputs %0d", outcnt); end
    checks++; if (notready != nwords * (N - K)) begin failures++; $display("not ready cycles %0d", notready); end
    // back-to-back words with no source gaps: N cycles apart
    for (int w = 1; w < 6; w++) begin
      checks++;
      if (last_cycles[w] - last_cycles[w-1] != N) begin
        failures++;
        $display("word spacing %0d", last_cycles[w] - last_cycles[w-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
