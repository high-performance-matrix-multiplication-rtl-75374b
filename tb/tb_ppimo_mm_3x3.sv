// tb_ppimo_mm_3x3: the PPI-MO multiplier built for 3 x 3 matrices, the
// order of the architecture's worked example: 9 multipliers, 9 product
// registers, 6 adders, one column of C per cycle, a product in 3 cycles.
//
// It multiplies a fixed pair of small matrices (C checked against
// constants worked out by hand) and then random pairs back to back
// (checked against integer arithmetic in the testbench), and checks that
// each product leaves in exactly 3 cycles in column-major order. A
// watchdog ends the run with a failure if it hangs.
module tb_ppimo_mm_3x3;
  localparam int unsigned N      = 3;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned OUT_W  = ppimo_pkg::sum_w(ppimo_pkg::prod_w(DATA_W), N);

  logic clk;
  initial clk = 1'b0;
  logic rst_n;
  logic signed [DATA_W-1:0] a     [N][N];
  logic                     b_valid;
  logic signed [DATA_W-1:0] b_col [N];
  logic                     c_valid;
  logic [1:0]               c_idx;
  logic                     c_last;
  logic signed [OUT_W-1:0]  c_col [N];

  ppimo_mm #(.N(N), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ma [N][N];
  int mb [N][N];
  int mc [N][N];

  initial begin
    repeat (20000) @(posedge clk);
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

  // feed B column by column, without gaps, and check C
  task automatic run_product();
    int t0;
    t0 = int'($time / 10);
    for (int k = 0; k < N; k++) begin
      b_valid = 1'b1;
      for (int r = 0; r < N; r++) begin
        b_col[r] = DATA_W'(mb[r][k]);
        for (int c = 0; c < N; c++) a[r][c] = DATA_W'(ma[r][c]);
      end
      @(posedge clk); #1;
      expect_true(c_valid && int'(c_idx) == k && c_last == (k == N - 1),
                  $sformatf("column %0d: valid=%0b idx=%0d last=%0b", k, c_valid, c_idx, c_last));
      for (int j = 0; j < N; j++)
        expect_true(int'(c_col[j]) == mc[j][k],
                    $sformatf("c[%0d][%0d] = %0d, expected %0d", j, k, c_col[j], mc[j][k]));
    end
    expect_true(int'($time / 10) - t0 == int'(N), "3x3 product did not take 3 cycles");
  endtask

  initial begin
    rst_n = 1'b0; b_valid = 1'b0;
    for (int r = 0; r < N; r++) begin
      b_col[r] = '0;
      for (int c = 0; c < N; c++) a[r][c] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // A = [1 2 3; 4 5 6; 7 8 9], B = [1 0 -1; 2 1 0; -3 4 2]
    ma = '{'{1, 2, 3}, '{4, 5, 6}, '{7, 8, 9}};
    mb = '{'{1, 0, -1}, '{2, 1, 0}, '{-3, 4, 2}};
    // C = A x B worked out by hand
    mc = '{'{-4, 14, 5}, '{-4, 29, 8}, '{-4, 44, 11}};
    run_product();

    for (int m = 0; m < 100; m++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          ma[r][c] = int'($signed(DATA_W'($urandom)));
          mb[r][c] = int'($signed(DATA_W'($urandom)));
        end
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          mc[r][c] = 0;
          for (int k = 0; k < N; k++) mc[r][c] += ma[r][k] * mb[k][c];
        end
      run_product();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
