// rs_encoder: systematic RS(N,K) encoder built on a division LFSR.
//
// The codeword is c(x) = x^(N-K) d(x) + p(x), where p(x) is the remainder of
// x^(N-K) d(x) divided by the generator g(x) = prod_{j=0}^{2t-1} (x - alpha^(FCR+j)).
// The 2t parity registers form a shift register with internal feedback: for
// every message symbol, the feedback term fb = d ^ par[2t-1] is multiplied by
// each generator coefficient g_i (constant multipliers) and added into the
// register chain, which is polynomial long division one symbol at a time.
// After K message symbols the registers hold p(x); they are then shifted out,
// highest degree first, while zeros shift in, which leaves them clear for the
// next message.
//
// Interface: message symbols arrive on in_valid/in_data and are accepted while
// in_ready is high. in_ready drops for the 2t cycles in which parity leaves.
// The output stream (out_valid/out_data/out_last) is registered, one cycle
// behind the input, and cannot be stalled; out_last marks symbol N-1. A full
// codeword therefore takes N cycles when the source never stalls.
//
// The LFSR structure follows the codec description; the handshake, the output
// register and the choice of generator roots are this design's.
module rs_encoder
  import rs_pkg::*;
#(
  parameter int unsigned N   = rs_pkg::RS_N,
  parameter int unsigned K   = rs_pkg::RS_K,
  parameter int unsigned FCR = rs_pkg::RS_FCR
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  sym_t in_data,
  output logic out_valid,
  output sym_t out_data,
  output logic out_last
);

  localparam int unsigned NS = N - K;
  localparam int unsigned CW = $clog2(N);

  typedef sym_t gen_t [NS+1];

  // Generator coefficients g_0 .. g_{2t}, g_{2t} = 1.
  function automatic gen_t gen_poly();
    gen_t g;
    for (int i = 0; i <= NS; i++) g[i] = '0;
    g[0] = sym_t'(1);
    for (int j = 0; j < NS; j++) begin
      sym_t root = gf_alpha_pow(FCR + j);
      for (int i = NS; i > 0; i--) g[i] = g[i-1] ^ gf_mul(g[i], root);
      g[0] = gf_mul(g[0], root);
    end
    return g;
  endfunction

  localparam gen_t G = gen_poly();

  logic [CW-1:0] cnt;       // position in codeword of the next output symbol
  sym_t          par [NS];
  logic          msg_phase;
  logic          step;
  sym_t          fb;

  assign msg_phase = (cnt < CW'(K));
  assign in_ready  = msg_phase;
  assign step      = msg_phase ? in_valid : 1'b1;
  assign fb        = in_data ^ par[NS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      for (int i = 0; i < NS; i++) par[i] <= '0;
    end else begin
      out_valid <= step;
      out_last  <= step && (cnt == CW'(N - 1));
      if (step) begin
        cnt <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
        if (msg_phase) begin
          out_data <= in_data;
          par[0]   <= gf_mul(fb, G[0]);
          for (int i = 1; i < NS; i++) par[i] <= par[i-1] ^ gf_mul(fb, G[i]);
        end else begin
          out_data <= par[NS-1];
          par[0]   <= '0;
          for (int i = 1; i < NS; i++) par[i] <= par[i-1];
        end
      end
    end
  end

endmodule
