// rs_chien: Chien search over the positions of the shortened codeword.
//
// Position p (coefficient of x^p, p = N-1 first, since that symbol is received
// first) is in error when sigma(alpha^-p) = 0. Each term sigma_i * x^i sits in
// a register that is loaded with sigma_i * alpha^(-i(N-1)) and multiplied by
// the constant alpha^i every clock, so the register sum walks through
// x = alpha^-(N-1), alpha^-(N-2), ..., alpha^0. The odd terms are summed
// separately: x * sigma'(x) equals that odd sum in characteristic 2. A second
// bank does the same for x^FCR * Omega(x), which the Forney stage divides by
// the odd sum to get the error value.
//
// Interface: `load` takes lambda (sigma_0 in the lowest slice), omega, the
// locator degree and the error-detected flag. Starting the next cycle,
// out_valid is high for exactly N cycles, one per position in receive order;
// out_root flags roots, out_lodd and out_oval carry the two evaluations, and
// out_nroots counts roots found so far including this position. out_last marks
// position 0; out_deg/out_nz repeat the loaded degree and flag with every
// position. A new load is accepted on
// or after the cycle of out_last.
//
// The register-per-term search follows the codec description; restricting it
// to the N positions of the shortened code and carrying the Omega bank
// alongside are this design's choices.
module rs_chien
  import rs_pkg::*;
#(
  parameter int unsigned N   = rs_pkg::RS_N,
  parameter int unsigned T   = rs_pkg::RS_T,
  parameter int unsigned FCR = rs_pkg::RS_FCR,
  parameter int unsigned DW  = $clog2(2 * T + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [T:0][M-1:0]    lambda,
  input  logic [T-1:0][M-1:0]  omega,
  input  logic [DW-1:0]        deg_in,
  input  logic                 nz_in,
  output logic                 busy,
  output logic                 out_valid,
  output logic                 out_last,
  output logic                 out_root,
  output sym_t                 out_lodd,
  output sym_t                 out_oval,
  output logic [DW-1:0]        out_nroots,
  output logic [DW-1:0]        out_deg,
  output logic                 out_nz
);

  localparam int unsigned CW = $clog2(N);

  typedef sym_t lk_t [T+1];
  typedef sym_t ok_t [T];

  function automatic lk_t lam_init();
    lk_t r;
    for (int i = 0; i <= T; i++) r[i] = gf_alpha_pow(-i * (int'(N) - 1));
    return r;
  endfunction
  function automatic lk_t lam_step();
    lk_t r;
    for (int i = 0; i <= T; i++) r[i] = gf_alpha_pow(i);
    return r;
  endfunction
  function automatic ok_t om_init();
    ok_t r;
    for (int j = 0; j < T; j++) r[j] = gf_alpha_pow(-(j + int'(FCR)) * (int'(N) - 1));
    return r;
  endfunction
  function automatic ok_t om_step();
    ok_t r;
    for (int j = 0; j < T; j++) r[j] = gf_alpha_pow(j + int'(FCR));
    return r;
  endfunction

  localparam lk_t LI = lam_init();
  localparam lk_t LS = lam_step();
  localparam ok_t OI = om_init();
  localparam ok_t OS = om_step();

  sym_t          lt [T+1];
  sym_t          ot [T];
  logic [CW-1:0] pos;            // positions still to go after this one
  logic [DW-1:0] nroots;
  logic [DW-1:0] deg_q;
  logic          nz_q;
  sym_t          ev, od, ov;

  always_comb begin
    ev = '0;
    od = '0;
    ov = '0;
    for (int i = 0; i <= T; i++)
      if (i % 2 == 1) od = od ^ lt[i];
      else            ev = ev ^ lt[i];
    for (int j = 0; j < T; j++) ov = ov ^ ot[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      pos        <= '0;
      nroots     <= '0;
      out_valid  <= 1'b0;
      out_last   <= 1'b0;
      out_root   <= 1'b0;
      out_lodd   <= '0;
      out_oval   <= '0;
      out_nroots <= '0;
      out_deg    <= '0;
      out_nz     <= 1'b0;
      deg_q      <= '0;
      nz_q       <= 1'b0;
      for (int i = 0; i <= T; i++) lt[i] <= '0;
      for (int j = 0; j < T; j++) ot[j] <= '0;
    end else begin
      out_valid <= busy;
      out_last  <= busy && (pos == '0);
      if (busy) begin
        out_root   <= ((ev ^ od) == '0);
        out_lodd   <= od;
        out_oval   <= ov;
        out_nroots <= nroots + DW'((ev ^ od) == '0);
        out_deg    <= deg_q;
        out_nz     <= nz_q;
        nroots     <= nroots + DW'((ev ^ od) == '0);
        for (int i = 0; i <= T; i++) lt[i] <= gf_mul(lt[i], LS[i]);
        for (int j = 0; j < T; j++) ot[j] <= gf_mul(ot[j], OS[j]);
        pos <= pos - 1'b1;
        if (pos == '0) busy <= 1'b0;
      end
      if (load) begin
        busy    <= 1'b1;
        pos     <= CW'(N - 1);
        nroots  <= '0;
        deg_q   <= deg_in;
        nz_q    <= nz_in;
        for (int i = 0; i <= T; i++) lt[i] <= gf_mul(lambda[i], LI[i]);
        for (int j = 0; j < T; j++) ot[j] <= gf_mul(omega[j], OI[j]);
      end
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) load |-> (!busy || pos == '0))
    else $error("rs_chien: load while a search is running");

endmodule
