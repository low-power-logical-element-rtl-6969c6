// One SRAM look-up table of the logical element, with its read mux.
//
// Eight configuration bits hold the truth table of one LE output (Sum or
// Carry) for every combination of the three data bits. The 3-bit data word
// drives the select lines of an 8:1 mux that reads the addressed bit, so the
// output follows the data combinationally once the table is written.
//
// The document gives the table and the mux but not how the table is loaded;
// here the whole 8-bit word is written at once on a clock edge with we high,
// as an FPGA configuration chain or a word-wide SRAM write would. The table
// is not reset: like configuration SRAM it holds whatever it was last
// written, and must be written before it is read.
//
// Interface: clk, we, wdata[7:0] (bit i = output for data word i),
// addr = {D0, D1, Cin}, q = addressed table bit.
// Timing: write takes effect from the next clock edge; read is combinational.
module le_sram_lut
  import le_pkg::*;
(
  input  logic                   clk,
  input  logic                   we,
  input  logic [LUT_ENTRIES-1:0] wdata,
  input  le_data_t               addr,
  output logic                   q
);

  logic [LUT_ENTRIES-1:0] mem;

  always_ff @(posedge clk) begin
    if (we) mem <= wdata;
  end

  always_comb q = mem[addr];

endmodule
