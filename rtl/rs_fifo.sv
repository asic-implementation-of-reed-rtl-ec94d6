// rs_fifo: first-in first-out buffer for the received codeword symbols.
//
// The decoder must keep every received symbol until its error value is known,
// which is roughly one codeword plus the solver latency later. This buffer is
// a register array of DEPTH words with a write and a read pointer. The head
// of the queue is visible on rd_data without a read request (fall-through),
// and rd_en removes it. A simultaneous write and read is allowed, also when
// full. Assertions flag a write to a full or a read from an empty buffer.
//
// The need for the buffer follows from the decoder structure; its form and
// depth are this design's choices.
module rs_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  input  logic                     rd_en,
  output logic [W-1:0]             rd_data,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     full,
  output logic                     empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (rd_en) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (!full || rd_en))
    else $error("rs_fifo: write to a full buffer");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("rs_fifo: read from an empty buffer");

endmodule
