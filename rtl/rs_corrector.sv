// rs_corrector: error corrector and codeword status of the RS decoder.
//
// For every position the Forney stage delivers an error value (zero where
// there is no error). The corrector pops the matching received symbol from
// the buffer and outputs c = r XOR Y. At the last position of a codeword it
// also reports:
//   out_detected  some syndrome was non-zero (errors were present),
//   out_fail      the word could not be corrected: locator degree above T,
//                 a Chien root count different from the degree, or a root
//                 with zero derivative,
//   out_nerr      number of symbols corrected (0 when out_fail).
// A failed word is passed on with whatever the search changed; out_fail tells
// the consumer not to trust it.
//
// Timing: one register stage; out_valid follows in_valid by one cycle and
// rd_en is asserted in the cycle of in_valid (the buffer reads through).
//
// The XOR correction follows the codec description; the failure rules and the
// status outputs are this design's.
module rs_corrector
  import rs_pkg::*;
#(
  parameter int unsigned T  = rs_pkg::RS_T,
  parameter int unsigned DW = $clog2(2 * T + 1) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_last,
  input  sym_t          in_err,
  input  logic          in_bad,
  input  logic [DW-1:0] in_nroots,
  input  logic [DW-1:0] in_deg,
  input  logic          in_nz,
  output logic          rd_en,
  input  sym_t          rd_data,
  output logic          out_valid,
  output sym_t          out_data,
  output logic          out_last,
  output logic          out_detected,
  output logic [DW-1:0] out_nerr,
  output logic          out_fail
);

  logic bad_acc;
  logic fail_c;

  assign rd_en  = in_valid;
  assign fail_c = in_nz && (bad_acc || in_bad || (in_nroots != in_deg) || (in_deg > DW'(T)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bad_acc      <= 1'b0;
      out_valid    <= 1'b0;
      out_data     <= '0;
      out_last     <= 1'b0;
      out_detected <= 1'b0;
      out_nerr     <= '0;
      out_fail     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_data <= rd_data ^ in_err;
        bad_acc  <= in_last ? 1'b0 : (bad_acc || in_bad);
        if (in_last) begin
          out_detected <= in_nz;
          out_fail     <= fail_c;
          out_nerr     <= fail_c ? '0 : in_deg;
        end
      end
    end
  end

endmodule
