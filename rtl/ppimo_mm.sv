// ppimo_mm: PPI-MO matrix-matrix multiplier, C = A x B for n x n matrices.
//
// How it works. An n x n array of multiplier cells M_ij (row i, column j)
// does the whole product in n cycles. Matrix A is a parallel, fixed input:
// all n^2 of its elements sit on input ports, and cell M_ij is wired to
// a_ji for the whole operation. Matrix B arrives one column per cycle: in
// cycle k the element b_ik is broadcast to every cell of multiplier row i.
// Each cell registers its product, and the n-1 adders below each column
// sum that column: column j yields sum_i a_ji * b_ik = c_jk. So every cycle
// one whole column k of C leaves on n output ports, and C comes out in
// column-major order, k = 1..n. Hardware: n^2 multipliers, n^2 product
// registers, n^2 - n adders, n^2 + n input ports.
//
// Interface.
//   a[r][c]      element a_(r+1)(c+1) of A, signed DATA_W bits. It must stay
//                stable in every cycle that b_valid is high for the same
//                product; it may change between two back-to-back products.
//   b_col[i]     element b_(i+1)k of the current column k of B.
//   b_valid      b_col holds a column of B this cycle. Columns are counted
//                modulo N: the first valid column after reset is column 0,
//                and every N-th valid column ends a product.
//   c_col[j]     element c_(j+1)k of C, signed, full precision.
//   c_valid      c_col holds a column of C; c_idx is its index k (0-based),
//                c_last flags the final column N-1 of a product.
// Timing. Latency one clock: the column of C for a column of B accepted at
// a rising edge is on c_col right after that edge, until the next valid
// column replaces it. Throughput one column per cycle, so a product every N
// cycles with back-to-back input. b_valid may drop for any number of cycles
// inside a product; the product registers then hold. Reset is synchronous,
// active low.
//
// The array, the fixed-A wiring, the B broadcast per multiplier row, the
// column sums and the one-column-per-cycle rate follow the architecture.
// The valid/index/last handshake, the column counter, the element width,
// the signed format and full-precision results are this design's choices.
module ppimo_mm #(
  parameter int unsigned N      = ppimo_pkg::MAT_N,
  parameter int unsigned DATA_W = ppimo_pkg::DATA_W,
  localparam int unsigned PROD_W = ppimo_pkg::prod_w(DATA_W),
  localparam int unsigned OUT_W  = ppimo_pkg::sum_w(PROD_W, N),
  localparam int unsigned IDX_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // matrix A, parallel fixed input (n^2 ports)
  input  logic signed [DATA_W-1:0] a     [N][N],
  // one column of matrix B per cycle (n ports)
  input  logic                     b_valid,
  input  logic signed [DATA_W-1:0] b_col [N],
  // one column of matrix C per cycle (n ports)
  output logic                     c_valid,
  output logic [IDX_W-1:0]         c_idx,
  output logic                     c_last,
  output logic signed [OUT_W-1:0]  c_col [N]
);

  // ---------------------------------------------------------------
  // Multiplier array: cell (i, j) multiplies a_ji by b_ik.
  // prod[j][i] is the product of row i in column j, grouped by column
  // for the column adders.
  // ---------------------------------------------------------------
  logic signed [PROD_W-1:0] prod [N][N];

  for (genvar i = 0; i < int'(N); i++) begin : g_row
    for (genvar j = 0; j < int'(N); j++) begin : g_col
      mult_cell #(.DATA_W(DATA_W)) u_cell (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (b_valid),
        .a     (a[j][i]),
        .b     (b_col[i]),
        .p     (prod[j][i])
      );
    end
  end

  // ---------------------------------------------------------------
  // Column adders: column j gives c_jk.
  // ---------------------------------------------------------------
  for (genvar j = 0; j < int'(N); j++) begin : g_sum
    column_adder #(.N(N), .IN_W(PROD_W)) u_add (
      .terms (prod[j]),
      .sum   (c_col[j])
    );
  end

  // ---------------------------------------------------------------
  // Column bookkeeping: index of the next B column, and valid/index of
  // the C column held in the product registers.
  // ---------------------------------------------------------------
  logic [IDX_W-1:0] next_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      next_idx <= '0;
      c_valid  <= 1'b0;
      c_idx    <= '0;
    end else begin
      c_valid <= b_valid;
      if (b_valid) begin
        c_idx    <= next_idx;
        next_idx <= (next_idx == IDX_W'(N - 1)) ? '0 : next_idx + 1'b1;
      end
    end
  end

  assign c_last = c_valid && (c_idx == IDX_W'(N - 1));

  // The column counter never leaves 0..N-1.
  a_idx_range : assert property (@(posedge clk) disable iff (!rst_n)
    next_idx <= IDX_W'(N - 1));

endmodule
