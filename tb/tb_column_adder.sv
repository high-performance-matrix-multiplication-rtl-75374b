// tb_column_adder: self-checking testbench for column_adder.
//
// Checks two sizes side by side, the default order N = 4 and the order
// N = 3 of the worked example, with random and extreme signed 16-bit
// products, against a sum computed in integer arithmetic. The adder is
// combinational, so each check waits a short delay after the inputs change.
// A watchdog ends the run with a failure if it hangs.
module tb_column_adder;
  localparam int unsigned IN_W = 16;

  logic signed [IN_W-1:0] t4 [4];
  logic signed [IN_W-1:0] t3 [3];
  logic signed [IN_W+1:0] s4;
  logic signed [IN_W+1:0] s3;

  int checks = 0, failures = 0;

  column_adder #(.N(4), .IN_W(IN_W)) dut4 (.terms(t4), .sum(s4));
  column_adder #(.N(3), .IN_W(IN_W)) dut3 (.terms(t3), .sum(s3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [IN_W-1:0] pick();
    case ($urandom % 5)
      0: return -32768;
      1: return 32767;
      default: return $signed(IN_W'($urandom));
    endcase
  endfunction

  initial begin
    int e4, e3;
    for (int t = 0; t < 2000; t++) begin
      e4 = 0; e3 = 0;
      for (int i = 0; i < 4; i++) begin
        t4[i] = (t < 2) ? ((t == 0) ? -32768 : 32767) : pick();
        e4 += int'(t4[i]);
      end
      for (int i = 0; i < 3; i++) begin
        t3[i] = pick();
        e3 += int'(t3[i]);
      end
      #1;
      checks++;
      if (int'(s4) != e4) begin
        failures++;
        $display("FAIL N=4: %0d %0d %0d %0d -> %0d, expected %0d",
                 t4[0], t4[1], t4[2], t4[3], s4, e4);
      end
      checks++;
      if (int'(s3) != e3) begin
        failures++;
        $display("FAIL N=3: %0d %0d %0d -> %0d, expected %0d",
                 t3[0], t3[1], t3[2], s3, e3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
