// rs_noise: pseudo-random burst-error channel placed between encoder and decoder.
//
// A 32-bit Galois LFSR (x^32 + x^22 + x^2 + x + 1) steps every clock. At the
// first symbol of each codeword the block samples burst_len (L) and draws a
// burst start s = floor(r16 * (N - L + 1) / 2^16) from 16 LFSR bits, so the
// burst always fits in the codeword. Symbols s .. s+L-1 of that codeword are
// XORed with a non-zero pseudo-random byte (8 other LFSR bits, 0 replaced by
// 1); all other symbols pass unchanged. With noise_en low nothing is altered.
// A burst of L symbols is therefore exactly L symbol errors.
//
// Timing: one register stage; out_* follow in_* by one cycle. out_err marks the
// symbols that were corrupted. Codeword boundaries are found by counting N
// valid symbols after reset.
//
// That noise is added pseudo-randomly follows the codec description; the
// burst shape, the LFSR and the error-value rule are this design's choices.
module rs_noise
  import rs_pkg::*;
#(
  parameter int unsigned N         = rs_pkg::RS_N,
  parameter logic [31:0] LFSR_SEED = 32'hACE1_2468
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       noise_en,
  input  logic [3:0] burst_len,
  input  logic       in_valid,
  input  sym_t       in_data,
  output logic       out_valid,
  output sym_t       out_data,
  output logic       out_err
);

  localparam int unsigned CW = $clog2(N);

  logic [31:0]   lfsr;
  logic [CW-1:0] cnt;
  logic [CW-1:0] cur_start, start_now;
  logic [3:0]    cur_len, len_now;
  logic          cur_en, en_now;
  logic [CW+15:0] scaled;
  logic          hit;
  sym_t          eval;

  // burst parameters: drawn live on the first symbol, held for the rest
  always_comb begin
    scaled = (CW+16)'(lfsr[15:0]) * (CW+16)'(N - int'(burst_len) + 1);
    if (cnt == '0) begin
      len_now   = burst_len;
      en_now    = noise_en && (int'(burst_len) <= int'(N));
      start_now = scaled[CW+15:16];
    end else begin
      len_now   = cur_len;
      en_now    = cur_en;
      start_now = cur_start;
    end
    hit  = en_now && (cnt >= start_now) && ({1'b0, cnt} < ({1'b0, start_now} + (CW+1)'(len_now)));
    eval = (lfsr[23:16] == 8'h00) ? sym_t'(1) : sym_t'(lfsr[23:16]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= LFSR_SEED;
      cnt       <= '0;
      cur_start <= '0;
      cur_len   <= '0;
      cur_en    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_err   <= 1'b0;
    end else begin
      lfsr      <= lfsr[0] ? ((lfsr >> 1) ^ 32'h8020_0003) : (lfsr >> 1);
      out_valid <= in_valid;
      if (in_valid) begin
        cnt       <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
        cur_start <= start_now;
        cur_len   <= len_now;
        cur_en    <= en_now;
        out_data  <= hit ? (in_data ^ eval) : in_data;
        out_err   <= hit;
      end else begin
        out_err   <= 1'b0;
      end
    end
  end

endmodule
