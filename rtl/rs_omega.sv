// rs_omega: error evaluator polynomial Omega(x) = S(x) * sigma(x) mod x^(2t).
//
// All t coefficients are formed at once: Omega_j = sum_{i=0..j} S_i * sigma_(j-i),
// a triangular array of full multipliers and XOR trees, registered once. Only
// coefficients 0 .. t-1 are kept because the degree of Omega is below the
// degree of sigma, which is at most t for a correctable word.
//
// Interface: on in_valid the product is taken from syn/lambda; one cycle later
// out_valid pulses with omega, and lambda_out/deg_out/nz_out carry the locator
// data along so the Chien stage sees one consistent set. Outputs hold between
// pulses.
//
// The key equation and its parallel evaluation follow the codec description;
// the single-cycle registered form is this design's choice.
module rs_omega
  import rs_pkg::*;
#(
  parameter int unsigned NSYM = rs_pkg::RS_NSYM,
  parameter int unsigned T    = NSYM / 2,
  parameter int unsigned DW   = $clog2(NSYM + 1) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [NSYM-1:0][M-1:0] syn,
  input  logic [T:0][M-1:0]      lambda,
  input  logic [DW-1:0]          deg,
  input  logic                   nz_in,
  output logic                   out_valid,
  output logic [T-1:0][M-1:0]    omega,
  output logic [T:0][M-1:0]      lambda_out,
  output logic [DW-1:0]          deg_out,
  output logic                   nz_out
);

  logic [T-1:0][M-1:0] om_c;

  always_comb begin
    for (int j = 0; j < T; j++) begin
      om_c[j] = '0;
      for (int i = 0; i <= j; i++)
        om_c[j] = om_c[j] ^ gf_mul(syn[i], lambda[j-i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      omega      <= '0;
      lambda_out <= '0;
      deg_out    <= '0;
      nz_out     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        omega      <= om_c;
        lambda_out <= lambda;
        deg_out    <= deg;
        nz_out     <= nz_in;
      end
    end
  end

endmodule
