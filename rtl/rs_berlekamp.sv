// rs_berlekamp: Berlekamp-Massey solver for the error locator polynomial.
//
// From the 2t syndromes it synthesises the shortest LFSR that generates them;
// its connection polynomial is the error locator sigma(x), whose roots are the
// inverses of the error locations. The inversion-free form is used so that no
// division sits in the loop. Starting from sigma = B = 1, gamma = 1, L = 0,
// iteration r = 0 .. 2t-1 does, in one clock:
//   delta  = sum_i sigma_i * S_(r-i)                 (discrepancy)
//   sigma' = gamma * sigma + delta * x * B
//   if delta != 0 and 2L <= r:  B = sigma, gamma = delta, L = r + 1 - L
//   else                        B = x * B
// The result is a non-zero multiple of the monic locator; the constant cancels
// in the Forney ratio, and the roots are unchanged.
//
// Interface: `start` with the syndromes (S_0 in the lowest slice) begins a
// solve; busy stays high for 2t cycles, then `done` pulses for one cycle and
// lambda/deg/syn_out/nz_out hold the result until the next solve ends. A new
// start is accepted the cycle after done, or any time busy is low. sigma and B
// are kept 2t+1 coefficients wide; lambda returns the t+1 low ones, and a
// degree above t means the word is not correctable.
//
// The use of Berlekamp-Massey follows the codec description; the
// inversion-free variant and the one-iteration-per-clock schedule are this
// design's.
module rs_berlekamp
  import rs_pkg::*;
#(
  parameter int unsigned NSYM = rs_pkg::RS_NSYM,
  parameter int unsigned T    = NSYM / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [NSYM-1:0][M-1:0]  syn,
  input  logic                    nz_in,
  output logic                    busy,
  output logic                    done,
  output logic [T:0][M-1:0]       lambda,
  output logic [$clog2(NSYM+1):0] deg,
  output logic [NSYM-1:0][M-1:0]  syn_out,
  output logic                    nz_out
);

  localparam int unsigned RW = $clog2(NSYM + 1);
  localparam int unsigned LW = RW + 1;

  sym_t          s     [NSYM];
  sym_t          sig   [NSYM+1];
  sym_t          bb    [NSYM+1];
  sym_t          gamma;
  logic [LW-1:0] len;
  logic [RW-1:0] r;
  logic          nz_q;

  sym_t          delta;
  sym_t          sig_n [NSYM+1];
  logic          swap;

  always_comb begin
    delta = '0;
    for (int i = 0; i <= NSYM; i++)
      if (i <= int'(r)) delta = delta ^ gf_mul(sig[i], s[int'(r) - i]);
    swap = (delta != '0) && ({len, 1'b0} <= (LW+1)'(r));
    for (int i = 0; i <= NSYM; i++)
      sig_n[i] = gf_mul(gamma, sig[i]) ^ ((i == 0) ? '0 : gf_mul(delta, bb[i-1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      r       <= '0;
      len     <= '0;
      gamma   <= '0;
      nz_q    <= 1'b0;
      lambda  <= '0;
      deg     <= '0;
      syn_out <= '0;
      nz_out  <= 1'b0;
      for (int i = 0; i < NSYM; i++) s[i] <= '0;
      for (int i = 0; i <= NSYM; i++) begin
        sig[i] <= '0;
        bb[i]  <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        r     <= '0;
        len   <= '0;
        gamma <= sym_t'(1);
        nz_q  <= nz_in;
        for (int i = 0; i < NSYM; i++) s[i] <= syn[i];
        for (int i = 0; i <= NSYM; i++) begin
          sig[i] <= (i == 0) ? sym_t'(1) : '0;
          bb[i]  <= (i == 0) ? sym_t'(1) : '0;
        end
      end else if (busy) begin
        for (int i = 0; i <= NSYM; i++) sig[i] <= sig_n[i];
        if (swap) begin
          for (int i = 0; i <= NSYM; i++) bb[i] <= sig[i];
          gamma <= delta;
          len   <= LW'(r) + 1'b1 - len;
        end else begin
          bb[0] <= '0;
          for (int i = 1; i <= NSYM; i++) bb[i] <= bb[i-1];
        end
        if (r == RW'(NSYM - 1)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          deg    <= swap ? (LW'(r) + 1'b1 - len) : len;
          nz_out <= nz_q;
          for (int i = 0; i < NSYM; i++) syn_out[i] <= s[i];
          for (int i = 0; i <= T; i++) lambda[i] <= sig_n[i];
        end else begin
          r <= r + 1'b1;
        end
      end
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("rs_berlekamp: start while a solve is running");

endmodule
