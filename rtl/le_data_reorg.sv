// Data re-organization for the low power logical element.
//
// The LE's Sum and Carry truth tables are read through muxes whose select
// lines are the data bits D0, D1 and Cin. For an operation whose result does
// not depend on the order of its input bits, the bits can be re-ordered
// before they reach the muxes without changing the result. This block
// re-orders them so that the 1s always travel on D0 first and the 0s on Cin
// first: D0_new = 1 when any input is 1, D1_new = 1 when at least two are,
// Cin_new = 1 only when all three are. With random data each path then
// switches less often than an unsorted input bit would.
//
// The gate network follows the document: a 3-input OR for D0_new, a 3-input
// AND for Cin_new, and for D1_new the majority written as
// D0.D1 + Cin.(D0 xor D1), which reuses the adder's carry structure.
//
// Interface: d_old = {D0, D1, Cin} in, d_new = {D0_new, D1_new, Cin_new} out.
// Timing: purely combinational, three gate levels on the D1_new path.
module le_data_reorg
  import le_pkg::*;
(
  input  le_data_t d_old,
  output le_data_t d_new
);

  logic d0, d1, ci;
  logic both, odd;

  assign {d0, d1, ci} = d_old;

  always_comb begin
    both     = d0 & d1;
    odd      = d0 ^ d1;
    d_new[2] = d0 | d1 | ci;        // D0_new: path reserved for 1s
    d_new[1] = both | (ci & odd);   // D1_new
    d_new[0] = d0 & d1 & ci;        // Cin_new: path reserved for 0s
  end

endmodule
