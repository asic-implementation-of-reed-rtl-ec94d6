// rs_decoder: pipelined RS(N,K) decoder, one received symbol per clock.
//
// Stages, each working on a different codeword once the pipe is full:
//   rs_syndrome   2t partial syndromes while the word arrives (N cycles)
//   rs_berlekamp  error locator sigma(x), 2t cycles
//   rs_omega      error evaluator Omega(x), 1 cycle
//   rs_chien      root search over all N positions (N cycles)
//   rs_forney     error values, 1 cycle
//   rs_corrector  XOR into the buffered word, 1 cycle
// rs_fifo holds the received symbols until the corrector needs them. Because
// the solver takes fewer than N cycles and every stage has a fixed latency,
// codewords may follow each other back to back with no gap and no stall.
//
// Interface: in_valid/in_data carry the received word, highest degree first,
// with gaps allowed; words are counted in groups of N from reset. The output
// stream (out_valid/out_data/out_last) carries all N corrected symbols of a
// word in N consecutive cycles; the status outputs are valid with out_last.
// Latency: the first corrected symbol of a word is on the output 2t + 7
// clock cycles after the cycle in which the word's last symbol was taken in
// (1 syndrome, 2t+1 Berlekamp-Massey, 1 Omega, 1 Chien load, 1 Forney,
// 1 corrector, plus the Chien output register), i.e. N + 2t + 6 cycles after
// its first symbol when the input has no gaps.
//
// The five-stage structure (syndrome, Berlekamp-Massey, Chien, Forney,
// correction) follows the codec description; the pipeline schedule, the
// buffer and the status outputs are this design's.
module rs_decoder
  import rs_pkg::*;
#(
  parameter int unsigned N     = rs_pkg::RS_N,
  parameter int unsigned K     = rs_pkg::RS_K,
  parameter int unsigned FCR   = rs_pkg::RS_FCR,
  parameter int unsigned DEPTH = 1 << $clog2(N + N - K + 8)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  input  sym_t                                in_data,
  output logic                                out_valid,
  output sym_t                                out_data,
  output logic                                out_last,
  output logic                                out_detected,
  output logic [$clog2(N - K + 1):0]          out_nerr,
  output logic                                out_fail
);

  localparam int unsigned NS = N - K;
  localparam int unsigned TT = NS / 2;
  localparam int unsigned DW = $clog2(NS + 1) + 1;

  // syndrome -> Berlekamp-Massey
  logic                 syn_valid, syn_nz;
  logic [NS-1:0][M-1:0] syn;
  // Berlekamp-Massey -> Omega
  logic                 bm_busy, bm_done, bm_nz;
  logic [TT:0][M-1:0]   bm_lambda;
  logic [DW-1:0]        bm_deg;
  logic [NS-1:0][M-1:0] bm_syn;
  // Omega -> Chien
  logic                 om_valid, om_nz;
  logic [TT-1:0][M-1:0] om_omega;
  logic [TT:0][M-1:0]   om_lambda;
  logic [DW-1:0]        om_deg;
  // Chien -> Forney
  logic                 ch_busy, ch_valid, ch_last, ch_root, ch_nz;
  sym_t                 ch_lodd, ch_oval;
  logic [DW-1:0]        ch_nroots, ch_deg;
  // Forney -> corrector
  logic                 fo_valid, fo_last, fo_bad, fo_nz;
  sym_t                 fo_err;
  logic [DW-1:0]        fo_nroots, fo_deg;
  // buffer
  logic                 rd_en;
  sym_t                 rd_data;
  logic [$clog2(DEPTH):0] fifo_count;
  logic                 fifo_full, fifo_empty;

  rs_syndrome #(.N(N), .NSYM(NS), .FCR(FCR)) u_syn (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(syn_valid), .out_syn(syn), .out_nz(syn_nz)
  );

  rs_berlekamp #(.NSYM(NS), .T(TT)) u_bm (
    .clk, .rst_n, .start(syn_valid), .syn, .nz_in(syn_nz),
    .busy(bm_busy), .done(bm_done), .lambda(bm_lambda), .deg(bm_deg),
    .syn_out(bm_syn), .nz_out(bm_nz)
  );

  rs_omega #(.NSYM(NS), .T(TT), .DW(DW)) u_om (
    .clk, .rst_n, .in_valid(bm_done), .syn(bm_syn), .lambda(bm_lambda),
    .deg(bm_deg), .nz_in(bm_nz),
    .out_valid(om_valid), .omega(om_omega), .lambda_out(om_lambda),
    .deg_out(om_deg), .nz_out(om_nz)
  );

  rs_chien #(.N(N), .T(TT), .FCR(FCR), .DW(DW)) u_chien (
    .clk, .rst_n, .load(om_valid), .lambda(om_lambda), .omega(om_omega),
    .deg_in(om_deg), .nz_in(om_nz), .busy(ch_busy),
    .out_valid(ch_valid), .out_last(ch_last), .out_root(ch_root),
    .out_lodd(ch_lodd), .out_oval(ch_oval), .out_nroots(ch_nroots),
    .out_deg(ch_deg), .out_nz(ch_nz)
  );

  rs_forney #(.DW(DW)) u_forney (
    .clk, .rst_n, .in_valid(ch_valid), .in_last(ch_last), .in_root(ch_root),
    .in_lodd(ch_lodd), .in_oval(ch_oval), .in_nroots(ch_nroots),
    .in_deg(ch_deg), .in_nz(ch_nz),
    .out_valid(fo_valid), .out_last(fo_last), .out_err(fo_err), .out_bad(fo_bad),
    .out_nroots(fo_nroots), .out_deg(fo_deg), .out_nz(fo_nz)
  );

  rs_fifo #(.W(M), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .wr_en(in_valid), .wr_data(in_data), .rd_en, .rd_data,
    .count(fifo_count), .full(fifo_full), .empty(fifo_empty)
  );

  rs_corrector #(.T(TT), .DW(DW)) u_corr (
    .clk, .rst_n, .in_valid(fo_valid), .in_last(fo_last), .in_err(fo_err),
    .in_bad(fo_bad), .in_nroots(fo_nroots), .in_deg(fo_deg), .in_nz(fo_nz),
    .rd_en, .rd_data,
    .out_valid, .out_data, .out_last, .out_detected, .out_nerr, .out_fail
  );

endmodule
