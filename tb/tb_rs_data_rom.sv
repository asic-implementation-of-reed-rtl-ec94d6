// tb_rs_data_rom: the message ROM streams rom[a] in address order, holds its
// symbol while out_ready is low, stops while run is low, and wraps after 256.
module tb_rs_data_rom;
  import tb_rs_ref::*;
  logic clk = 0, rst_n = 0, run = 0, out_ready = 0, out_valid;
  logic [7:0] out_data;
  int checks = 0, failures = 0, idx = 0, wraps = 0, stalls = 0;

  rs_data_rom dut (.clk, .rst_n, .run, .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (out_valid) failures++;
    run = 1;
    for (int cyc = 0; cyc < 1200; cyc++) begin
      @(negedge clk);
      run       = ($urandom % 8) != 0;
      out_ready = ($urandom % 4) != 0;
      #1;
      checks++;
      if (out_valid != run) failures++;
      if (run) begin
        checks++;
        if (int'(out_data) != rom_word(idx % 256)) begin
          failures++;
          if (failures < 10) $display("addr %0d: got %0h expected %0h", idx % 256, out_data, rom_word(idx % 256));
        end
      end
      @(posedge clk);
      if (run && out_ready) begin
        idx++;
        if (idx % 256 == 0) wraps++;
      end else if (run) stalls++;
    end
    checks++; if (wraps < 2) failures++;
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
