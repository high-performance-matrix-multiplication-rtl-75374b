// column_adder: the n-1 adders that sum one column of the PPI-MO
// multiplier array.
//
// Column j of the array holds the products a_ji * b_ik for i = 1..n; their
// sum is the result element c_jk. The adders form a chain: the first adds
// terms 0 and 1, each following one adds the next term, so a column uses
// n-1 adders and the n columns together n^2 - n, the count the
// architecture gives. The sum keeps full precision (IN_W + ceil(log2 N)
// bits), so it never overflows.
//
// Interface: terms[i] is the registered product of multiplier row i, a
// signed IN_W-bit number; sum is their signed total. Timing: purely
// combinational.
//
// A chain rather than a balanced tree is this design's choice; the
// architecture fixes only the adder count.
module column_adder #(
  parameter int unsigned N    = ppimo_pkg::MAT_N,
  parameter int unsigned IN_W = ppimo_pkg::prod_w(ppimo_pkg::DATA_W),
  localparam int unsigned OUT_W = ppimo_pkg::sum_w(IN_W, N)
) (
  input  logic signed [IN_W-1:0]  terms [N],
  output logic signed [OUT_W-1:0] sum
);

  // partial[i] is the sum of terms 0..i: adder i-1 produces it.
  logic signed [OUT_W-1:0] partial [N];

  assign partial[0] = OUT_W'(terms[0]);

  for (genvar i = 1; i < int'(N); i++) begin : g_add
    assign partial[i] = partial[i-1] + OUT_W'(terms[i]);
  end

  assign sum = partial[N-1];

endmodule
