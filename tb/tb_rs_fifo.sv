// tb_rs_fifo: random pushes and pops against a queue model, including runs to
// full and to empty and simultaneous push and pop; checks data order, count,
// full and empty.
module tb_rs_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [7:0] wr_data = 0, rd_data;
  logic [4:0] count;
  int checks = 0, failures = 0, nfull = 0, nempty = 0;
  int q [$];

  rs_fifo #(.W(8), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .count, .full, .empty);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != q.size() || full != (q.size() == D) || empty != (q.size() == 0)) begin
        failures++;
        if (failures < 10) $display("count %0d model %0d", count, q.size());
      end
      if (full) nfull++;
      if (empty) nempty++;
      if (q.size() > 0) begin
        checks++;
        if (int'(rd_data) != q[0]) failures++;
      end
      bias = ((i / 500) % 2 == 0) ? 3 : 1;   // alternate filling and draining phases
      wr_en   = (($urandom % 4) < bias) && (q.size() < D || 1'($urandom));
      rd_en   = (($urandom % 4) >= bias) && q.size() > 0;
      if (wr_en && q.size() == D && !rd_en) wr_en = 0;
      wr_data = 8'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(int'(wr_data));
    end
    checks++; if (nfull == 0 || nempty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
