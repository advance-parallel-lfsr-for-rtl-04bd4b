// tb_prn_combiner -- self-checking testbench for prn_combiner.
//
// Drives random 32-bit LFSR and counter words every clock and checks that
// number_o equals the XOR of the words presented one clock earlier (the
// stage's one-clock latency), and that reset clears the register. A
// watchdog ends the run with a failure if it does not finish in time.
module tb_prn_combiner;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        reset;
  logic [31:0] lfsr_w, count_w, number;
  logic [31:0] expected;

  prn_combiner dut (
    .clk(clk), .reset(reset), .lfsr_i(lfsr_w), .count_i(count_w), .number_o(number));

  task automatic check(string what);
    checks++;
    if (number !== expected) begin
      failures++;
      if (failures <= 20)
        $display("FAIL %s: got %h expected %h", what, number, expected);
    end
  endtask

  initial begin
    reset = 1'b1;
    lfsr_w = $urandom;
    count_w = $urandom;
    @(negedge clk);
    expected = '0;
    check("reset");
    reset = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      logic [31:0] a, b;
      a = $urandom;
      b = $urandom;
      if (c % 7 == 0) b = a;            // equal words give zero
      if (c % 11 == 0) a = '0;          // zero LFSR word passes the count
      lfsr_w = a;
      count_w = b;
      @(negedge clk);
      expected = a ^ b;
      check("xor");
    end
    reset = 1'b1;
    @(negedge clk);
    expected = '0;
    check("reset after run");
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
