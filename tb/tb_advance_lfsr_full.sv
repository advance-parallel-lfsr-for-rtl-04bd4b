// tb_advance_lfsr_full -- full-size run of advance_lfsr with every parameter
// at its default (N = 32, feedback polynomial 1 + X^16 + X^32).
//
// One complete operation: synchronous reset, load of a seed with only the
// MSB set, then 200,000 clocks of free running, a reseed with a random
// value and 50,000 more clocks. number_o is compared on every clock with the
// prng_ref cycle model, which also confirms one new number per clock.
// Because 1 + X^16 + X^32 = (1 + X + X^2)^16 over GF(2) and 1 + X + X^2 has
// order 3, every LFSR state recurs after 3 * 16 = 48 clocks; the test checks
// on the model that the LFSR word 48 clocks after each reseed equals the
// word at the reseed, and that the output words nevertheless do not repeat
// with that period (the counter breaks it). A watchdog ends the run with a
// failure if it does not finish in time.
module tb_advance_lfsr_full;
  import prng_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  longint unsigned lfsr_hist[$];
  longint unsigned num_hist[$];
  int              n_period_checks = 0;

  logic        reset, loadseed;
  logic [31:0] seed, number;

  advance_lfsr dut (
    .clk(clk), .reset(reset), .loadseed_i(loadseed), .seed_i(seed), .number_o(number));

  prng_ref model = new(32, 16);

  task automatic cycle(bit r, bit l, logic [31:0] s);
    reset = r; loadseed = l; seed = s;
    @(posedge clk);
    model.clock(r, l, longint'(s));
    @(negedge clk);
    checks++;
    if (number !== 32'(model.number)) begin
      failures++;
      if (failures <= 20)
        $display("FAIL t=%0t: number_o=%h expected %h", $time, number, 32'(model.number));
    end
    lfsr_hist.push_back(model.lfsr);
    num_hist.push_back(model.number);
    if (lfsr_hist.size() > 49) begin
      void'(lfsr_hist.pop_front());
      void'(num_hist.pop_front());
    end
  endtask

  // The LFSR word of 48 clocks ago must equal today's, unless a load or
  // reset happened in between (the caller only asks during free running).
  task automatic check_period();
    checks++;
    n_period_checks++;
    if (lfsr_hist[0] != lfsr_hist[48]) begin
      failures++;
      if (failures <= 20)
        $display("FAIL LFSR word %h did not recur after 48 clocks (%h)", lfsr_hist[0], lfsr_hist[48]);
    end
    checks++;
    if (num_hist[0] == num_hist[48]) begin
      failures++;
      if (failures <= 20)
        $display("FAIL output word %h repeated after 48 clocks", num_hist[0]);
    end
  endtask

  initial begin
    reset = 1'b1; loadseed = 1'b0; seed = '0;
    @(negedge clk);
    cycle(1, 0, '0);
    cycle(1, 0, '0);
    cycle(0, 1, 32'h8000_0000);
    // First words after the seed, worked out by hand:
    // LFSR 8000_0000 ^ count 1, then 0000_0001 ^ 2, then 0000_0002 ^ 3.
    begin
      logic [31:0] by_hand [3] = '{32'h8000_0001, 32'h0000_0003, 32'h0000_0001};
      for (int k = 0; k < 3; k++) begin
        cycle(0, 0, '0);
        checks++;
        if (number !== by_hand[k]) begin
          failures++;
          $display("FAIL word %0d after seed: %h expected %h", k + 1, number, by_hand[k]);
        end
      end
    end
    for (int c = 0; c < 200000; c++) begin
      cycle(0, 0, '0);
      if (c >= 48) check_period();
    end
    cycle(0, 1, $urandom | 32'h1);
    for (int c = 0; c < 50000; c++) begin
      cycle(0, 0, '0);
      if (c >= 48) check_period();
    end
    $display("loads %0d, feedback ones %0d, 48-clock period checks %0d",
             model.n_loads, model.n_feedback_ones, n_period_checks);
    checks++;
    if (model.n_loads != 2 || model.n_feedback_ones == 0) begin
      failures++;
      $display("FAIL mechanisms not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
