// tb_ppimo_mm: end-to-end, self-checking testbench for the PPI-MO matrix
// multiplier at its default size (4 x 4 matrices of 8-bit elements).
//
// It streams a series of random products C = A x B through the array and
// compares every column of C with a product computed in the testbench by
// plain integer arithmetic. It checks after every clock edge:
//   * latency: c_valid follows b_valid exactly one cycle later;
//   * column order: c_idx counts 0..N-1 and c_last marks column N-1;
//   * values: each c_col[j] equals sum_i a_ji * b_ik for the column k;
//   * hold: while b_valid is low the outputs keep their last value;
//   * rate: a product fed without gaps leaves in exactly N cycles.
// Operating cases it makes happen, each counted, a never-seen one counting
// as a failure: back-to-back products with A changed between them, input
// gaps inside a product (with garbage on A and B during the gap), operands
// at the extremes of the number range, and a reset in mid-product that
// restarts column counting at 0. A watchdog ends the run with a failure.
module tb_ppimo_mm;
  localparam int unsigned N      = ppimo_pkg::MAT_N;
  localparam int unsigned DATA_W = ppimo_pkg::DATA_W;
  localparam int unsigned OUT_W  = ppimo_pkg::sum_w(ppimo_pkg::prod_w(DATA_W), N);
  localparam int unsigned IDX_W  = (N > 1) ? $clog2(N) : 1;
  localparam int          NMAT   = 300;

  logic clk;
  initial clk = 1'b0;
  logic rst_n;
  logic signed [DATA_W-1:0] a     [N][N];
  logic                     b_valid;
  logic signed [DATA_W-1:0] b_col [N];
  logic                     c_valid;
  logic [IDX_W-1:0]         c_idx;
  logic                     c_last;
  logic signed [OUT_W-1:0]  c_col [N];

  ppimo_mm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_gap = 0, n_extreme = 0, n_reset = 0, n_rate = 0;

  // current operands and reference result
  int ma [N][N];
  int mb [N][N];
  int mc [N][N];
  int held [N];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic int rnd_elem(bit extreme);
    if (extreme) return ($urandom % 2 != 0) ? -(2 ** (DATA_W - 1)) : (2 ** (DATA_W - 1)) - 1;
    return int'($signed(DATA_W'($urandom)));
  endfunction

  task automatic new_operands(bit extreme);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        ma[r][c] = rnd_elem(extreme);
        mb[r][c] = rnd_elem(extreme);
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        mc[r][c] = 0;
        for (int k = 0; k < N; k++) mc[r][c] += ma[r][k] * mb[k][c];
      end
  endtask

  // one idle cycle, with garbage on the operand ports
  task automatic idle_cycle();
    b_valid = 1'b0;
    for (int r = 0; r < N; r++) begin
      b_col[r] = $signed(DATA_W'($urandom));
      for (int c = 0; c < N; c++) a[r][c] = $signed(DATA_W'($urandom));
    end
    @(posedge clk); #1;
    expect_true(!c_valid, "c_valid high after an idle input cycle");
    for (int j = 0; j < N; j++)
      expect_true(int'(c_col[j]) == held[j], "output changed while idle");
  endtask

  // feed column k of B and check column k of C one clock later
  task automatic feed_column(int k);
    b_valid = 1'b1;
    for (int r = 0; r < N; r++) begin
      b_col[r] = DATA_W'(mb[r][k]);
      for (int c = 0; c < N; c++) a[r][c] = DATA_W'(ma[r][c]);
    end
    @(posedge clk); #1;
    expect_true(c_valid, "c_valid low one cycle after b_valid");
    expect_true(int'(c_idx) == k, $sformatf("c_idx %0d, expected %0d", c_idx, k));
    expect_true(c_last == (k == N - 1), "c_last wrong");
    for (int j = 0; j < N; j++) begin
      expect_true(int'(c_col[j]) == mc[j][k],
                  $sformatf("c[%0d][%0d] = %0d, expected %0d", j, k, c_col[j], mc[j][k]));
      held[j] = int'(c_col[j]);
    end
  endtask

  initial begin
    int start_cycle;
    bit gaps, extreme, prev_was_product;

    rst_n = 1'b0; b_valid = 1'b0;
    for (int r = 0; r < N; r++) begin
      b_col[r] = '0;
      for (int c = 0; c < N; c++) a[r][c] = '0;
    end
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int j = 0; j < N; j++) held[j] = 0;
    prev_was_product = 1'b0;

    for (int m = 0; m < NMAT; m++) begin
      extreme = (m % 10) == 3;
      gaps    = (m % 4) == 1;
      new_operands(extreme);
      if (extreme) n_extreme++;
      // an idle spell between some products
      if (m % 7 == 5) begin
        repeat (1 + $urandom % 3) idle_cycle();
        prev_was_product = 1'b0;
      end
      if (prev_was_product) n_back_to_back++;
      start_cycle = int'($time / 10);
      for (int k = 0; k < N; k++) begin
        if (gaps && k > 0) begin
          repeat (1 + $urandom % 2) idle_cycle();
          n_gap++;
        end
        feed_column(k);
      end
      // rate: without gaps the last column leaves N cycles after the first
      // one was presented
      if (!gaps) begin
        n_rate++;
        expect_true(int'($time / 10) - start_cycle == int'(N),
                    $sformatf("product took %0d cycles", int'($time / 10) - start_cycle));
      end
      prev_was_product = 1'b1;

      // a reset in the middle of a product restarts column counting
      if (m == NMAT / 2) begin
        new_operands(1'b0);
        feed_column(0);
        if (N > 1) feed_column(1);
        rst_n = 1'b0;
        b_valid = 1'b0;
        @(posedge clk); #1;
        rst_n = 1'b1;
        expect_true(!c_valid, "c_valid after reset");
        for (int j = 0; j < N; j++) begin
          expect_true(c_col[j] == '0, "products not cleared by reset");
          held[j] = 0;
        end
        n_reset++;
        prev_was_product = 1'b0;
      end
    end

    $display("back-to-back=%0d gaps=%0d extreme=%0d reset=%0d rate=%0d",
             n_back_to_back, n_gap, n_extreme, n_reset, n_rate);
    expect_true(n_back_to_back > 0, "no back-to-back products");
    expect_true(n_gap > 0, "no input gaps");
    expect_true(n_extreme > 0, "no extreme operands");
    expect_true(n_reset > 0, "no mid-product reset");
    expect_true(n_rate > 0, "rate never measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
