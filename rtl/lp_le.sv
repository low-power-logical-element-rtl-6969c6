// Low power logical element (LE) for an FPGA fabric.
//
// The LE computes any function of two data bits and a carry-in through two
// programmable truth tables, one for Sum and one for Carry, and can store
// the Sum in four flip-flops. Its low power idea is architectural: for a
// function that does not depend on the order of its inputs (AND, OR, XOR,
// ADD, equality compare, one-bit multiply ...) the three data bits may be
// sorted before they reach the LUT read muxes. After sorting, the D0 path
// carries the 1s and the Cin path the 0s, so those select lines, and the
// mux nodes behind them, switch less often; the result is unchanged because
// the function gives the same value for any order of its inputs.
//
// Structure, as in the document: data re-organization logic in front of both
// LUT muxes, a Sum LUT and a Carry LUT, four storage flip-flops fed from Sum,
// and an output select over the flip-flops and the direct Sum. This design
// adds a configuration bit, reorg_en, that bypasses the re-organization for
// the operations that are not order-independent (INV, less/greater than,
// shifts), so the one LE carries all the operations the document lists. For
// the two-input operations Cin must be held at 0 while reorg_en is set.
//
// Interface:
//   cfg_we, cfg   write both truth tables and reorg_en (le_pkg::le_cfg_t)
//   data          {D0, D1, Cin}
//   store_en      shift Sum into the flip-flops on the clock edge
//   osel          output select (le_pkg::le_osel_e codes)
//   sum, carry    LUT outputs; out = selected output; ff_q = flip-flops
//   lut_sel       the select word seen by both LUT muxes, after separation
//                 or bypass; brought out so its switching can be observed
// Timing: data to sum/carry/out (osel = 4) is combinational; a configuration
// write or a store takes effect from the next rising clock edge.
module lp_le
  import le_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  le_cfg_t              cfg,
  input  le_data_t             data,
  input  logic                 store_en,
  input  logic [2:0]           osel,
  output logic                 sum,
  output logic                 carry,
  output logic [NUM_FLOPS-1:0] ff_q,
  output logic                 out,
  output le_data_t             lut_sel
);

  logic     reorg_en;
  le_data_t data_sorted;
  le_data_t lut_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      reorg_en <= 1'b0;
    else if (cfg_we) reorg_en <= cfg.reorg_en;
  end

  le_data_reorg u_reorg (
    .d_old (data),
    .d_new (data_sorted)
  );

  always_comb lut_addr = reorg_en ? data_sorted : data;
  assign lut_sel = lut_addr;

  le_sram_lut u_sum_lut (
    .clk   (clk),
    .we    (cfg_we),
    .wdata (cfg.sum_lut),
    .addr  (lut_addr),
    .q     (sum)
  );

  le_sram_lut u_carry_lut (
    .clk   (clk),
    .we    (cfg_we),
    .wdata (cfg.carry_lut),
    .addr  (lut_addr),
    .q     (carry)
  );

  le_storage u_storage (
    .clk      (clk),
    .rst_n    (rst_n),
    .store_en (store_en),
    .sum_in   (sum),
    .osel     (osel),
    .ff_q     (ff_q),
    .out      (out)
  );

endmodule
