// rs_syndrome: partial-syndrome calculator of the RS decoder.
//
// For each of the 2t roots alpha^(FCR+j) of g(x) one accumulator evaluates the
// received polynomial r(x) at that root by Horner's rule:
// S_j <- S_j * alpha^(FCR+j) + r_i, symbols arriving highest degree first.
// This is the remainder of r(x) divided by the single factor (x - alpha^(FCR+j)).
// The multipliers are by constants, so each is a small XOR network.
//
// Interface: one symbol per clock on in_valid/in_data, any gaps allowed; a
// codeword is N valid symbols counted from reset. One cycle after the last
// symbol, out_valid pulses and out_syn holds all 2t syndromes (S_0 in the
// lowest slice) until the next codeword completes; out_nz is high when any is
// non-zero, i.e. errors were detected. The next codeword may start in the
// cycle right after the last symbol.
//
// The structure follows the decoder description; the register layout and the
// output hold register are this design's.
module rs_syndrome
  import rs_pkg::*;
#(
  parameter int unsigned N    = rs_pkg::RS_N,
  parameter int unsigned NSYM = rs_pkg::RS_NSYM,
  parameter int unsigned FCR  = rs_pkg::RS_FCR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  sym_t                    in_data,
  output logic                    out_valid,
  output logic [NSYM-1:0][M-1:0]  out_syn,
  output logic                    out_nz
);

  localparam int unsigned CW = $clog2(N);

  typedef sym_t root_t [NSYM];
  function automatic root_t roots();
    root_t r;
    for (int j = 0; j < NSYM; j++) r[j] = gf_alpha_pow(FCR + j);
    return r;
  endfunction
  localparam root_t ROOT = roots();

  logic [CW-1:0] cnt;
  sym_t          acc [NSYM];
  sym_t          nxt [NSYM];
  logic          first, last;

  assign first = (cnt == '0);
  assign last  = (cnt == CW'(N - 1));

  always_comb
    for (int j = 0; j < NSYM; j++)
      nxt[j] = (first ? '0 : gf_mul(acc[j], ROOT[j])) ^ in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_nz    <= 1'b0;
      out_syn   <= '0;
      for (int j = 0; j < NSYM; j++) acc[j] <= '0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) begin
        cnt <= last ? '0 : cnt + 1'b1;
        for (int j = 0; j < NSYM; j++) acc[j] <= nxt[j];
        if (last) begin
          out_nz <= 1'b0;
          for (int j = 0; j < NSYM; j++) begin
            out_syn[j] <= nxt[j];
            if (nxt[j] != '0) out_nz <= 1'b1;
          end
        end
      end
    end
  end

endmodule
