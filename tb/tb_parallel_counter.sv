// tb_parallel_counter -- self-checking testbench for parallel_counter.
//
// A 4-bit instance is run through several complete cycles of its 16 states
// to check the sequence 0, 1, ..., 15, 0 and the wrap-around; a default
// 32-bit instance is checked against a 32-bit up count for a few thousand
// clocks. Synchronous reset is applied mid-run to both. Expected values come
// from a count kept in the testbench. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_parallel_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int wraps = 0;

  logic        reset;
  logic [3:0]  q4;
  logic [31:0] q32;

  parallel_counter #(.N(4)) dut4 (.clk(clk), .reset(reset), .count_o(q4));
  parallel_counter          dut32 (.clk(clk), .reset(reset), .count_o(q32));

  longint unsigned ref_count;

  task automatic check(string what);
    checks++;
    if (q4 !== 4'(ref_count % 16) || q32 !== 32'(ref_count)) begin
      failures++;
      if (failures <= 20)
        $display("FAIL %s: q4=%0d q32=%0d expected %0d", what, q4, q32, ref_count);
    end
  endtask

  initial begin
    reset = 1'b1;
    @(negedge clk);
    @(negedge clk);
    reset = 1'b0;
    ref_count = 0;
    check("after reset");
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      ref_count++;
      check("counting");
      if (q4 == 4'd0) wraps++;
      if (c == 1234) begin
        reset = 1'b1;
        @(negedge clk);
        reset = 1'b0;
        ref_count = 0;
        check("mid-run reset");
      end
    end
    checks++;
    if (wraps < 10) begin
      failures++;
      $display("FAIL the 4-bit counter wrapped only %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
