// rs_codec_top: RS(208,200) codec with its own message source and channel.
//
// Data path: rs_data_rom -> rs_encoder -> rs_noise -> rs_decoder. The ROM
// streams message symbols while `run` is high; the encoder adds 2t = 8 parity
// symbols to every 200 (stalling the ROM meanwhile), the noise block corrupts
// a burst of burst_len symbols per codeword when noise_en is high, and the
// decoder corrects up to t = 4 symbol errors per word. Two concurrent checkers
// (rs_ced) recompute syndromes: enc_fault flags an encoder output word that is
// not a codeword, dec_fault a word the decoder claims to have corrected that
// is not one. Both stay low in a fault-free codec.
//
// Outputs: dec_valid/dec_data carry the K decoded message symbols of each
// word (parity is dropped), dec_last marks the K-th. word_done pulses when the
// last parity position of a word has been decoded, and dec_detected, dec_nerr
// and dec_fail describe that word. chan_valid/chan_err show the channel
// output: chan_err marks each symbol the noise block corrupted.
//
// The chain ROM, encoder, noise, decoder follows the codec description; the
// checkers' placement, the port list and the message-only output are this
// design's.
module rs_codec_top
  import rs_pkg::*;
#(
  parameter int unsigned N = rs_pkg::RS_N,
  parameter int unsigned K = rs_pkg::RS_K
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         run,
  input  logic                         noise_en,
  input  logic [3:0]                   burst_len,
  output logic                         dec_valid,
  output sym_t                         dec_data,
  output logic                         dec_last,
  output logic                         word_done,
  output logic                         dec_detected,
  output logic [$clog2(N - K + 1):0]   dec_nerr,
  output logic                         dec_fail,
  output logic                         chan_valid,
  output logic                         chan_err,
  output logic                         enc_fault,
  output logic                         dec_fault
);

  localparam int unsigned CW = $clog2(N);

  logic rom_valid, rom_ready;
  sym_t rom_data;
  logic enc_valid, enc_last;
  sym_t enc_data;
  sym_t ch_data;
  logic d_valid, d_last, d_fail;
  sym_t d_data;
  logic enc_chk_valid, dec_chk_valid;
  logic [CW-1:0] ocnt;

  rs_data_rom u_rom (
    .clk, .rst_n, .run, .out_valid(rom_valid), .out_ready(rom_ready), .out_data(rom_data)
  );

  rs_encoder #(.N(N), .K(K)) u_enc (
    .clk, .rst_n, .in_valid(rom_valid), .in_ready(rom_ready), .in_data(rom_data),
    .out_valid(enc_valid), .out_data(enc_data), .out_last(enc_last)
  );

  rs_noise #(.N(N)) u_noise (
    .clk, .rst_n, .noise_en, .burst_len, .in_valid(enc_valid), .in_data(enc_data),
    .out_valid(chan_valid), .out_data(ch_data), .out_err(chan_err)
  );

  rs_decoder #(.N(N), .K(K)) u_dec (
    .clk, .rst_n, .in_valid(chan_valid), .in_data(ch_data),
    .out_valid(d_valid), .out_data(d_data), .out_last(d_last),
    .out_detected(dec_detected), .out_nerr(dec_nerr), .out_fail(d_fail)
  );

  rs_ced #(.N(N), .NSYM(N - K)) u_enc_chk (
    .clk, .rst_n, .in_valid(enc_valid), .in_data(enc_data), .in_check(1'b1),
    .out_valid(enc_chk_valid), .out_fault(enc_fault)
  );

  rs_ced #(.N(N), .NSYM(N - K)) u_dec_chk (
    .clk, .rst_n, .in_valid(d_valid), .in_data(d_data), .in_check(!d_fail),
    .out_valid(dec_chk_valid), .out_fault(dec_fault)
  );

  // keep only the message part of each decoded word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ocnt <= '0;
    else if (d_valid) ocnt <= (ocnt == CW'(N - 1)) ? '0 : ocnt + 1'b1;
  end

  assign dec_valid = d_valid && (ocnt < CW'(K));
  assign dec_data  = d_data;
  assign dec_last  = d_valid && (ocnt == CW'(K - 1));
  assign word_done = d_last;
  assign dec_fail  = d_fail;

endmodule
