// tb_advance_lfsr -- end-to-end testbench for the advance_lfsr generator at
// a reduced width, N = 8 (TAP = 4), so that the counter wraps many times.
//
// The generator is reset, seeded, run freely, re-seeded while running, reset
// while a load is requested, and reset mid-run, with random seeds. Every
// clock number_o is compared with prng_ref, a cycle model of the three
// registers. The test also counts each mechanism of the design and fails if
// one never happened: synchronous reset, seed load, reseed while running,
// reset taking priority over load, LFSR feedback bit 1, counter wrap. Rate:
// it checks that a new number is produced on every clock, i.e. number_o is
// compared on every cycle with the model, which produces one per edge.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_advance_lfsr;
  import prng_ref_pkg::*;

  localparam int unsigned N   = 8;
  localparam int unsigned TAP = N / 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_reseed_running = 0;
  int n_reset_over_load = 0;

  logic         reset, loadseed;
  logic [N-1:0] seed, number;

  advance_lfsr #(.N(N), .TAP(TAP)) dut (
    .clk(clk), .reset(reset), .loadseed_i(loadseed), .seed_i(seed), .number_o(number));

  prng_ref model = new(N, TAP);

  // Drive inputs for one clock, let the edge happen, compare.
  task automatic cycle(bit r, bit l, logic [N-1:0] s);
    reset = r; loadseed = l; seed = s;
    @(posedge clk);
    model.clock(r, l, longint'(s));
    @(negedge clk);
    checks++;
    if (number !== N'(model.number)) begin
      failures++;
      if (failures <= 20)
        $display("FAIL t=%0t: number_o=%h expected %h", $time, number, N'(model.number));
    end
  endtask

  task automatic expect_event(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, count);
  endtask

  initial begin
    reset = 1'b1; loadseed = 1'b0; seed = '0;
    @(negedge clk);
    cycle(1, 0, '0);
    cycle(1, 0, '0);
    for (int c = 0; c < 5000; c++) begin
      bit r, l;
      logic [N-1:0] s;
      r = 1'b0; l = 1'b0;
      s = N'($urandom);
      if (c == 0) l = 1'b1;                         // first seed after reset
      else if (c % 700 == 350) l = 1'b1;            // reseed while running
      else if (c % 1500 == 1499) begin r = 1'b1; l = 1'b1; end
      else if (c % 1500 == 0) l = 1'b1;             // seed again after that reset
      if (l && !r && c % 1500 != 0) n_reseed_running++;
      if (l && r) n_reset_over_load++;
      if (s == '0) s = N'(1);
      cycle(r, l, s);
    end
    $display("mechanisms exercised:");
    expect_event("synchronous reset", model.n_resets);
    expect_event("seed load", model.n_loads);
    expect_event("reseed while running", n_reseed_running);
    expect_event("reset over load", n_reset_over_load);
    expect_event("LFSR feedback bit 1", model.n_feedback_ones);
    expect_event("counter wrap", model.n_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
