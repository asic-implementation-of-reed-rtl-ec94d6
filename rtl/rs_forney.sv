// rs_forney: error magnitude by the Forney algorithm.
//
// With syndromes S_j = r(alpha^(FCR+j)) the error value at a located position
// with X^-1 = x is Y = X^(1-FCR) * Omega(x) / sigma'(x). Since x*sigma'(x) is
// the odd part of sigma(x), this is Y = x^FCR * Omega(x) / sigma_odd(x): the
// two quantities the Chien stage already delivers. For FCR = 1 it is exactly
// Omega(X^-1) / sigma'(X^-1). The division is a multiply by the inverse,
// computed as a^254 with a squaring chain, followed by one gf_mult. Where there is no root the output is
// zero, so the corrector can XOR it unconditionally. A root with a zero odd
// part (a repeated root) cannot be a valid error; out_bad flags it.
//
// Interface and timing: one register stage; every input field reappears one
// cycle later on the matching out_* port.
//
// The formula follows the codec description; the inverter and the pass-through
// of the Chien status are this design's.
module rs_forney
  import rs_pkg::*;
#(
  parameter int unsigned DW = $clog2(2 * rs_pkg::RS_T + 1) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_last,
  input  logic          in_root,
  input  sym_t          in_lodd,
  input  sym_t          in_oval,
  input  logic [DW-1:0] in_nroots,
  input  logic [DW-1:0] in_deg,
  input  logic          in_nz,
  output logic          out_valid,
  output logic          out_last,
  output sym_t          out_err,
  output logic          out_bad,
  output logic [DW-1:0] out_nroots,
  output logic [DW-1:0] out_deg,
  output logic          out_nz
);

  sym_t lodd_inv, y;
  assign lodd_inv = gf_inv(in_lodd);

  gf_mult u_mul (.a(in_oval), .b(lodd_inv), .p(y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_last   <= 1'b0;
      out_err    <= '0;
      out_bad    <= 1'b0;
      out_nroots <= '0;
      out_deg    <= '0;
      out_nz     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_err    <= in_root ? y : '0;
        out_bad    <= in_root && (in_lodd == '0);
        out_nroots <= in_nroots;
        out_deg    <= in_deg;
        out_nz     <= in_nz;
      end
    end
  end

endmodule
