// tb_parallel_lfsr -- self-checking testbench for parallel_lfsr.
//
// Three instances are driven from one clock:
//   * N = 6, TAP = 3 (polynomial 1 + X^3 + X^6). After a random seed load the
//     bit that enters FF1 in each of the next six clocks is compared with the
//     closed-form update list of that example: (6,3), (5,2), (4,1),
//     (3, new FF1), (2, new FF2), (1, new FF3), where (a,b) is the XOR of the
//     seeded FFa and FFb and "new FFk" the k-th bit written back.
//   * N = 32, TAP = 16, the default size, and N = 7 with TAP = 4 (the ceiling
//     of 7/2). Each is compared every clock with a bit-sequence model: the
//     bit entering FF1 at clock t is s[t] = s[t-TAP] ^ s[t-N], and FF(i+1)
//     holds s[t-i]. Reset, seed loads and long free runs are mixed in.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_parallel_lfsr;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ---------------- N = 6 instance ----------------
  logic       reset6, load6;
  logic [5:0] seed6, q6;
  parallel_lfsr #(.N(6), .TAP(3)) dut6 (
    .clk(clk), .reset(reset6), .load_i(load6), .seed_i(seed6), .state_o(q6));

  // ---------------- N = 32 instance ----------------
  logic        reset32, load32;
  logic [31:0] seed32, q32;
  parallel_lfsr dut32 (
    .clk(clk), .reset(reset32), .load_i(load32), .seed_i(seed32), .state_o(q32));

  // ---------------- N = 7, ceiling tap ----------------
  logic       reset7, load7;
  logic [6:0] seed7, q7;
  parallel_lfsr #(.N(7), .TAP(4)) dut7 (
    .clk(clk), .reset(reset7), .load_i(load7), .seed_i(seed7), .state_o(q7));

  // Bit-sequence reference model: hist[k] is the bit written into FF1 k clocks
  // ago (hist[0] is the newest), so FF(i+1) == hist[i].
  class seq_model #(int unsigned N = 8, int unsigned TAP = 4);
    bit hist[$];
    function void seed(bit [N-1:0] s);
      hist.delete();
      for (int i = 0; i < N; i++) hist.push_back(s[i]);
    endfunction
    function void clear();
      seed('0);
    endfunction
    function bit step();
      bit b;
      b = hist[TAP-1] ^ hist[N-1];
      hist.push_front(b);
      void'(hist.pop_back());
      return b;
    endfunction
    function bit [N-1:0] word();
      bit [N-1:0] w;
      for (int i = 0; i < N; i++) w[i] = hist[i];
      return w;
    endfunction
  endclass

  seq_model #(32, 16) m32 = new();
  seq_model #(7, 4)   m7  = new();

  task automatic check32(string what);
    checks++;
    if (q32 !== m32.word()) begin
      failures++;
      if (failures <= 20) $display("FAIL N=32 %s: got %h expected %h", what, q32, m32.word());
    end
  endtask

  task automatic check7(string what);
    checks++;
    if (q7 !== m7.word()) begin
      failures++;
      if (failures <= 20) $display("FAIL N=7 %s: got %h expected %h", what, q7, m7.word());
    end
  endtask

  // Table check for N = 6. o[k] is the seeded FF(k+1); n[k] the k-th new bit.
  task automatic run_table6(logic [5:0] seed);
    logic [5:0] o;
    logic [6:1] n;
    logic [6:1] expect_bit;
    o = seed;
    // Closed-form list, numbering flip-flops from 1.
    n[1] = o[6-1] ^ o[3-1];
    n[2] = o[5-1] ^ o[2-1];
    n[3] = o[4-1] ^ o[1-1];
    n[4] = o[3-1] ^ n[1];
    n[5] = o[2-1] ^ n[2];
    n[6] = o[1-1] ^ n[3];
    expect_bit = n;
    @(negedge clk);
    seed6 = seed; load6 = 1'b1;
    @(negedge clk);
    load6 = 1'b0;
    checks++;
    if (q6 !== seed) begin
      failures++;
      if (failures <= 20) $display("FAIL N=6 seed load: got %b expected %b", q6, seed);
    end
    for (int k = 1; k <= 6; k++) begin
      @(negedge clk);
      checks++;
      if (q6[0] !== expect_bit[k]) begin
        failures++;
        if (failures <= 20) $display("FAIL N=6 clock %0d: FF1=%b expected %b (seed %b)", k, q6[0], expect_bit[k], seed);
      end
    end
    // After six clocks the whole register is the six new bits, oldest in FF6.
    checks++;
    if (q6 !== {n[1], n[2], n[3], n[4], n[5], n[6]}) begin
      failures++;
      if (failures <= 20) $display("FAIL N=6 word after 6 clocks: got %b", q6);
    end
  endtask

  initial begin
    reset6 = 1'b1; load6 = 1'b0; seed6 = '0;
    reset32 = 1'b1; load32 = 1'b0; seed32 = '0;
    reset7 = 1'b1; load7 = 1'b0; seed7 = '0;
    @(negedge clk);
    @(negedge clk);
    reset6 = 1'b0;
    reset32 = 1'b0;
    reset7 = 1'b0;

    // Reset leaves all zeros, and all zeros stays all zeros.
    m32.clear(); m7.clear();
    repeat (3) begin
      @(negedge clk);
      void'(m32.step()); void'(m7.step());
      check32("zero state"); check7("zero state");
    end

    for (int r = 0; r < 20; r++) run_table6(6'($urandom));

    for (int r = 0; r < 6; r++) begin
      logic [31:0] s32;
      logic [6:0]  s7;
      s32 = $urandom;
      s7  = 7'($urandom);
      if (r == 0) s32 = 32'h8000_0000;
      @(negedge clk);
      load32 = 1'b1; seed32 = s32;
      load7 = 1'b1; seed7 = s7;
      @(negedge clk);
      load32 = 1'b0; load7 = 1'b0;
      m32.seed(s32); m7.seed(s7);
      check32("after load"); check7("after load");
      for (int c = 0; c < 500; c++) begin
        @(negedge clk);
        void'(m32.step()); void'(m7.step());
        check32("free run"); check7("free run");
      end
    end

    // Reset has priority over load.
    @(negedge clk);
    reset32 = 1'b1; load32 = 1'b1; seed32 = 32'hDEAD_BEEF;
    @(negedge clk);
    reset32 = 1'b0; load32 = 1'b0;
    m32.clear();
    check32("reset over load");

    // N = 7 full period check: a seed returns after a whole number of periods.
    begin
      int period;
      logic [6:0] start;
      start = 7'h01;
      @(negedge clk);
      load7 = 1'b1; seed7 = start;
      @(negedge clk);
      load7 = 1'b0;
      period = 0;
      do begin
        @(negedge clk);
        period++;
      end while (q7 !== start && period < 200);
      checks++;
      if (q7 !== start) begin
        failures++;
        if (failures <= 20) $display("FAIL N=7 sequence never returned to its seed");
      end else $display("N=7 TAP=4 sequence from seed 01 has period %0d", period);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    if (failures <= 20) $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
