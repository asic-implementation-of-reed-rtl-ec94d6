// rs_data_rom: message source of the codec, a read-only table of symbols.
//
// While `run` is high the ROM offers the symbol at its current address with
// out_valid; each accepted symbol (out_valid && out_ready) advances the
// address, which wraps after DEPTH entries. Because DEPTH (256) is not a
// multiple of the message length (200), successive messages carry different
// data. Read is combinational from the address register, so a symbol is
// offered in the same cycle `run` rises.
//
// The codec feeds its encoder from such a table; its contents and depth are
// this design's own: rom[a] = ((29*a + 7) mod 256) XOR rotl3(a[7:0]), built at
// elaboration.
module rs_data_rom
  import rs_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic out_valid,
  input  logic out_ready,
  output sym_t out_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  function automatic sym_t rom_word(input int a);
    logic [7:0] a8 = 8'(a);
    logic [7:0] lin = 8'(a * 29 + 7);
    return sym_t'(lin ^ {a8[4:0], a8[7:5]});
  endfunction

  sym_t rom [DEPTH];
  always_comb
    for (int i = 0; i < DEPTH; i++) rom[i] = rom_word(i);

  logic [AW-1:0] addr;

  assign out_valid = run;
  assign out_data  = rom[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr <= '0;
    else if (out_valid && out_ready)
      addr <= (addr == AW'(DEPTH - 1)) ? '0 : addr + 1'b1;
  end

endmodule
