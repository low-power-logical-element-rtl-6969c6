// Storage flip-flops and output select of the logical element.
//
// The LE keeps four flip-flops behind its Sum output. In this design they
// form a chain: on a clock edge with store_en high, flip-flop 0 takes Sum and
// every other flip-flop takes the value of the one before it, so the last
// four stored Sum values are held, newest in flip-flop 0. The output select
// mux then drives the LE output from one of the four flip-flops or straight
// from the LUT's Sum.
//
// The document gives four storage elements fed from Sum and an output select
// over them and the LUT output; the chained loading and the store enable are
// this design's choice. The flip-flops clear on an active-low reset.
//
// Interface: clk, rst_n, store_en, sum_in, osel (0..3 = flip-flop 0..3,
// 4 = sum_in directly, 5..7 read as 0), ff_q = flip-flop contents, out.
// Timing: one clock from sum_in to flip-flop 0; the mux is combinational.
module le_storage
  import le_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 store_en,
  input  logic                 sum_in,
  input  logic [2:0]           osel,
  output logic [NUM_FLOPS-1:0] ff_q,
  output logic                 out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ff_q <= '0;
    else if (store_en) ff_q <= {ff_q[NUM_FLOPS-2:0], sum_in};
  end

  always_comb begin
    case (osel)
      OSEL_FF0: out = ff_q[0];
      OSEL_FF1: out = ff_q[1];
      OSEL_FF2: out = ff_q[2];
      OSEL_FF3: out = ff_q[3];
      OSEL_LUT: out = sum_in;
      default:  out = 1'b0;
    endcase
  end

endmodule
