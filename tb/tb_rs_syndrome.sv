// tb_rs_syndrome: syndromes of clean and corrupted codewords against direct
// evaluation of r(alpha^(1+j)); clean words must give all zeros. Checks the
// out_valid pulse one cycle after the last symbol, with back-to-back words and
// with input gaps.
module tb_rs_syndrome;
  import tb_rs_ref::*;
  localparam int N = 208, K = 200, NS = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_nz;
  logic [7:0] in_data = 0;
  logic [NS-1:0][7:0] out_syn;
  int checks = 0, failures = 0;
  int exp_syn [$];
  int last_cyc = -10, cyc = 0, pulses = 0;

  rs_syndrome #(.N(N), .NSYM(NS), .FCR(1)) dut (.clk, .rst_n, .in_valid, .in_data,
                                                 .out_valid, .out_syn, .out_nz);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && exp_syn.size() > 0) ;
    if (out_valid) begin
      bit nz;
      nz = 0;
      pulses++;
      checks++;
      if (cyc != last_cyc + 1) begin failures++; $display("pulse at %0d, last symbol %0d", cyc, last_cyc); end
      for (int j = 0; j < NS; j++) begin
        int e;
        e = exp_syn.pop_front();
        if (e != 0) nz = 1;
        checks++;
        if (int'(out_syn[j]) != e) begin
          failures++;
          if (failures < 10) $display("S%0d got %0h expected %0h", j, out_syn[j], e);
        end
      end
      checks++;
      if (out_nz != nz) failures++;
    end
  end

  initial begin
    int msg[], cw[];
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 20; w++) begin
      msg = new[K];
      foreach (msg[i]) msg[i] = $urandom % 256;
      encode(N, K, 1, msg, cw);
      for (int e = 0; e < (w % 6); e++) cw[$urandom % N] ^= 1 + ($urandom % 255);
      for (int j = 0; j < NS; j++) exp_syn.push_back(eval_word(cw, apow(1 + j)));
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        while (w >= 10 && ($urandom % 5) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_data  = 8'(cw[i]);
        if (i == N - 1) last_cyc = cyc + 1;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++; if (pulses != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
