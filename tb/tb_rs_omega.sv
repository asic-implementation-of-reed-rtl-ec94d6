// tb_rs_omega: random syndromes and locators; omega must equal the low t
// coefficients of S(x)*sigma(x) computed by schoolbook multiplication, one
// cycle after in_valid, with the locator data passed along unchanged.
module tb_rs_omega;
  import tb_rs_ref::*;
  localparam int NS = 8, T = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, nz_in = 0, out_valid, nz_out;
  logic [NS-1:0][7:0] syn = '0;
  logic [T:0][7:0] lambda = '0, lambda_out;
  logic [T-1:0][7:0] omega;
  logic [4:0] deg = 0, deg_out;
  int checks = 0, failures = 0;

  rs_omega #(.NSYM(NS), .T(T)) dut (.clk, .rst_n, .in_valid, .syn, .lambda, .deg, .nz_in,
                                    .out_valid, .omega, .lambda_out, .deg_out, .nz_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prod [NS + T + 1];
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 500; w++) begin
      @(negedge clk);
      for (int j = 0; j < NS; j++) syn[j] = 8'($urandom);
      for (int i = 0; i <= T; i++) lambda[i] = 8'($urandom);
      deg = 5'($urandom % 9);
      nz_in = 1'($urandom);
      foreach (prod[i]) prod[i] = 0;
      for (int j = 0; j < NS; j++)
        for (int i = 0; i <= T; i++) prod[i + j] ^= mul(int'(syn[j]), int'(lambda[i]));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int j = 0; j < T; j++) begin
        checks++;
        if (int'(omega[j]) != prod[j]) begin
          failures++;
          if (failures < 10) $display("omega%0d got %0h expected %0h", j, omega[j], prod[j]);
        end
      end
      checks++;
      if (lambda_out != lambda || deg_out != deg || nz_out != nz_in) failures++;
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
