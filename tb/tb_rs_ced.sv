// tb_rs_ced: valid codewords never raise a fault; a word with one corrupted
// symbol raises a fault when in_check is high and not when it is low.
module tb_rs_ced;
  import tb_rs_ref::*;
  localparam int N = 208, K = 200;
  logic clk = 0, rst_n = 0, in_valid = 0, in_check = 0, out_valid, out_fault;
  logic [7:0] in_data = 0;
  int checks = 0, failures = 0;
  int exp_fault [$];
  int nfaults = 0;

  rs_ced #(.N(N), .NSYM(N - K)) dut (.clk, .rst_n, .in_valid, .in_data, .in_check, .out_valid, .out_fault);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      int e;
      e = exp_fault.pop_front();
      checks++;
      if (int'(out_fault) != e) begin failures++; $display("fault %0d expected %0d", out_fault, e); end
      nfaults += e;
    end else begin
      checks++;
      if (out_fault) failures++;
    end
  end

  initial begin
    int msg[], cw[];
    bit corrupt, chk;
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 24; w++) begin
      msg = new[K];
      foreach (msg[i]) msg[i] = $urandom % 256;
      encode(N, K, 1, msg, cw);
      corrupt = (w % 3 != 0);
      chk     = (w % 2 == 0);
      if (corrupt) cw[$urandom % N] ^= 1 + ($urandom % 255);
      exp_fault.push_back(int'(corrupt && chk));
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_valid = 1;
        in_data  = 8'(cw[i]);
        in_check = (i == N - 1) ? chk : 1'($urandom);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++; if (exp_fault.size() != 0 || nfaults == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
