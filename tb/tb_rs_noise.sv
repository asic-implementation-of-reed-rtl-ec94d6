// tb_rs_noise: the channel corrupts exactly burst_len consecutive symbols of
// each word, with non-zero error values, inside the word, changes nothing when
// disabled, delays the stream by one cycle, and places bursts at varying
// positions.
module tb_rs_noise;
  localparam int N = 208;
  logic clk = 0, rst_n = 0, noise_en = 0, in_valid = 0, out_valid, out_err;
  logic [3:0] burst_len = 0;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  int sent [$];
  int errpos [$];
  int ocnt = 0;
  int starts [$];

  rs_noise #(.N(N)) dut (.clk, .rst_n, .noise_en, .burst_len, .in_valid, .in_data,
                         .out_valid, .out_data, .out_err);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one-cycle delay and XOR consistency
  always @(posedge clk) if (rst_n && out_valid) begin
    int s;
    s = sent.pop_front();
    checks++;
    if (out_err != (int'(out_data) != s)) failures++;
    if (out_err) errpos.push_back(ocnt % N);
    ocnt++;
  end

  task automatic run_word(input bit en, input int len, input bit gaps);
    @(negedge clk);
    noise_en  = en;
    burst_len = 4'(len);
    for (int i = 0; i < N; i++) begin
      while (gaps && ($urandom % 4) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_data  = 8'($urandom);
      sent.push_back(int'(in_data));
      @(negedge clk);
      noise_en  = ($urandom % 2) == 1 ? !en : en;   // changes mid-word must be ignored
      burst_len = 4'($urandom);
    end
    in_valid = 0;
    @(negedge clk);
    @(negedge clk);
    // check the burst of this word
    checks++;
    if (errpos.size() != (en ? len : 0)) begin
      failures++;
      $display("word with en=%0d len=%0d: %0d errors", en, len, errpos.size());
    end else if (errpos.size() > 0) begin
      starts.push_back(errpos[0]);
      for (int i = 1; i < errpos.size(); i++) begin
        checks++;
        if (errpos[i] != errpos[0] + i) failures++;
      end
    end
    errpos.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_word(0, 5, 0);
    for (int w = 0; w < 60; w++) run_word(1, w % 16, w % 3 == 0);
    run_word(0, 3, 1);
    // bursts must not all start at the same place
    checks++;
    begin
      int mn = 1000, mx = -1;
      foreach (starts[i]) begin
        if (starts[i] < mn) mn = starts[i];
        if (starts[i] > mx) mx = starts[i];
      end
      if (mx - mn < 50) begin failures++; $display("burst starts %0d..%0d", mn, mx); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
