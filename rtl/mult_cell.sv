// mult_cell: one multiplier M_ij of the PPI-MO array with its
// partial-product register.
//
// The cell multiplies the element of A it is fixed to (a_ji for cell M_ij)
// by the element of B broadcast to its multiplier row in this cycle
// (b_ik in cycle k), and stores the full-precision signed product in its
// register. The array holds n^2 of these cells: n^2 multipliers and n^2
// registers, as the architecture counts them.
//
// Interface: a and b are DATA_W-bit two's-complement numbers; p is the
// 2*DATA_W-bit product. Timing: p is the product of the a and b present at
// the last rising clock edge at which en was high; the register holds its
// value while en is low, so an idle array does not toggle. Reset is
// synchronous and active low and clears p.
//
// The multiplier-plus-register structure follows the architecture; the
// enable, the reset and the signed format are this design's own choices.
module mult_cell #(
  parameter int unsigned DATA_W = ppimo_pkg::DATA_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic signed [DATA_W-1:0]   a,
  input  logic signed [DATA_W-1:0]   b,
  output logic signed [2*DATA_W-1:0] p
);

  logic signed [2*DATA_W-1:0] prod;

  always_comb prod = a * b;

  always_ff @(posedge clk) begin
    if (!rst_n)  p <= '0;
    else if (en) p <= prod;
  end

endmodule
