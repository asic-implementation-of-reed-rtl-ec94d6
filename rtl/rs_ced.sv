// rs_ced: concurrent error detection checker for the encoder and the decoder.
//
// Every valid codeword is divisible by g(x), so all of its 2t partial
// syndromes are zero. This checker recomputes the syndromes of a codeword
// stream with an rs_syndrome instance and raises out_fault for one cycle,
// together with out_valid, when a word that should be valid is not. It is
// placed on the encoder output (every word must be valid) and on the decoder
// output (every word the decoder reports as corrected must be valid), so a
// hardware fault in either that corrupts a word is seen while the codec runs.
//
// Interface: in_valid/in_data as for rs_syndrome; in_check is sampled with the
// last symbol of each word and says whether that word is to be checked.
// out_valid pulses one cycle after the last symbol.
//
// That the codeword's own redundancy is used to check the encoder and decoder
// follows the codec description; checking both with a syndrome recomputation
// is this design's choice.
module rs_ced
  import rs_pkg::*;
#(
  parameter int unsigned N    = rs_pkg::RS_N,
  parameter int unsigned NSYM = rs_pkg::RS_NSYM,
  parameter int unsigned FCR  = rs_pkg::RS_FCR
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  sym_t in_data,
  input  logic in_check,
  output logic out_valid,
  output logic out_fault
);

  logic                   syn_valid, syn_nz;
  logic [NSYM-1:0][M-1:0] syn;
  logic                   chk_q;

  rs_syndrome #(.N(N), .NSYM(NSYM), .FCR(FCR)) u_syn (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(syn_valid), .out_syn(syn), .out_nz(syn_nz)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_q <= 1'b0;
    else if (in_valid) chk_q <= in_check;
  end

  assign out_valid = syn_valid;
  assign out_fault = syn_valid && chk_q && syn_nz;

endmodule
