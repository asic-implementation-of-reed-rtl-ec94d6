// tb_rs_forney: random evaluations at roots and non-roots; at a root the
// error value Y must satisfy Y * lodd = oval (checked with table
// multiplication), elsewhere Y = 0; a root with lodd = 0 must raise out_bad.
// One cycle of latency; status fields pass through.
module tb_rs_forney;
  import tb_rs_ref::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, in_root = 0, in_nz = 0;
  logic [7:0] in_lodd = 0, in_oval = 0, out_err;
  logic [4:0] in_nroots = 0, in_deg = 0, out_nroots, out_deg;
  logic out_valid, out_last, out_bad, out_nz;
  int checks = 0, failures = 0;

  rs_forney dut (.clk, .rst_n, .in_valid, .in_last, .in_root, .in_lodd, .in_oval, .in_nroots,
                 .in_deg, .in_nz, .out_valid, .out_last, .out_err, .out_bad, .out_nroots,
                 .out_deg, .out_nz);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid  = 1;
      in_last   = 1'($urandom);
      in_root   = 1'($urandom);
      in_lodd   = (i % 50 == 0) ? 8'h00 : 8'($urandom);
      in_oval   = 8'($urandom);
      in_nroots = 5'($urandom);
      in_deg    = 5'($urandom);
      in_nz     = 1'($urandom);
      @(negedge clk);
      checks++;
      if (!out_valid || out_last != in_last || out_nroots != in_nroots || out_deg != in_deg || out_nz != in_nz)
        failures++;
      checks++;
      if (out_bad != (in_root && in_lodd == 0)) failures++;
      checks++;
      if (!in_root) begin
        if (out_err != 0) failures++;
      end else if (in_lodd != 0) begin
        if (mul(int'(out_err), int'(in_lodd)) != int'(in_oval)) begin
          failures++;
          if (failures < 10) $display("Y=%0h lodd=%0h oval=%0h", out_err, in_lodd, in_oval);
        end
      end
      in_valid = 0;
      @(negedge clk);
      checks++;
      if (out_valid || out_last) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
