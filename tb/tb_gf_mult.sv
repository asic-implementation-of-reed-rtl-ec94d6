// tb_gf_mult: exhaustive check of the GF(2^8) multiplier against log/antilog
// tables, all 65536 operand pairs.
module tb_gf_mult;
  import tb_rs_ref::*;
  logic [7:0] a, b, p;
  int checks = 0, failures = 0;

  gf_mult dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(p) != mul(i, j)) begin
          failures++;
          if (failures < 10) $display("mismatch %0h*%0h = %0h, expected %0h", i, j, p, mul(i, j));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
