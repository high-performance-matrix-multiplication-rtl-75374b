// tb_mult_cell: self-checking testbench for mult_cell.
//
// Drives random and extreme signed operands, with the enable on and off,
// and checks after every clock edge that the register holds the product of
// the operands of the last enabled edge (the reference is integer
// arithmetic in the testbench), and that reset clears it. A watchdog ends
// the run with a failure if it hangs.
module tb_mult_cell;
  localparam int unsigned DATA_W = 8;

  logic clk;
  initial clk = 1'b0;
  logic rst_n, en;
  logic signed [DATA_W-1:0]   a, b;
  logic signed [2*DATA_W-1:0] p;

  int checks = 0, failures = 0;
  int expected;

  mult_cell #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int exp, string what);
    checks++;
    if (int'(p) !== exp) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d p=%0d expected %0d", what, a, b, p, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b1; a = 8'sd17; b = -8'sd3;
    @(posedge clk); #1;
    check(0, "reset");
    rst_n = 1'b1;
    expected = 0;
    // extreme corners first, then random operands
    for (int t = 0; t < 1000; t++) begin
      if (t < 16) begin
        a = (t[1:0] == 0) ? -128 : (t[1:0] == 1) ? 127 : (t[1:0] == 2) ? -1 : 0;
        b = (t[3:2] == 0) ? -128 : (t[3:2] == 1) ? 127 : (t[3:2] == 2) ? -1 : 1;
        en = 1'b1;
      end else begin
        a  = $signed(DATA_W'($urandom));
        b  = $signed(DATA_W'($urandom));
        en = ($urandom % 4) != 0;
      end
      if (en) expected = int'(a) * int'(b);
      @(posedge clk); #1;
      check(expected, en ? "product" : "hold");
    end
    rst_n = 1'b0;
    @(posedge clk); #1;
    check(0, "reset at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
