// srt_divider_tb: end-to-end test of the divider at its default size.
//
// Divides directed and random normalised 53-bit operands and checks
//   dividend * 2^55 = quotient * divisor + remainder, 0 <= remainder < divisor
// against a reference computed here with wide integer division.  It also
// checks that a division never takes more than 11 ring trips, that one that
// does not stop early takes exactly 11, and that each mechanism of the
// design happened at least once: early stop on a repeated remainder, stop on
// full shift registers, the best case of two trips, a forced -1 digit, a
// wrapped (aliased) remainder approximation, the final decrement for a
// negative remainder, and in every stage the overlap of the two paths: the
// approximation arms holding their results while the incoming digit is
// still in reset (observed inside each stage by hierarchical reference).
module srt_divider_tb;
  import srt_pkg::*;

  localparam int N_RANDOM = 300;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              go = 1'b0;
  logic [MANT_W-1:0] dividend = '0, divisor = '0;
  logic              busy, done, exact, early, corrected;
  logic [Q_W:0]      quotient;
  logic [MANT_W-1:0] remainder;
  logic [3:0]        trips;
  logic [N_STAGES-1:0] fired, forced, aliased;

  srt_divider dut (
    .clk(clk), .rst_n(rst_n), .go(go), .dividend(dividend), .divisor(divisor),
    .busy(busy), .done(done), .quotient(quotient), .remainder(remainder),
    .exact(exact), .corrected(corrected), .early(early), .trips(trips),
    .stage_fired(fired), .stage_forced(forced), .stage_aliased(aliased)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_early = 0, n_full = 0, n_forced = 0, n_aliased = 0, n_corrected = 0, n_exact = 0;
  int max_cycles = 0, n_two_trips = 0, min_cycles = 1000000;

  always @(posedge clk) begin
    for (int i = 0; i < N_STAGES; i++) begin
      if (fired[i] && forced[i])  n_forced++;
      if (fired[i] && aliased[i]) n_aliased++;
    end
  end

  // overlap: a stage's approximation block is complete before its digit came
  int n_ahead [N_STAGES];
  for (genvar i = 0; i < N_STAGES; i++) begin : g_ahead
    initial n_ahead[i] = 0;
    always @(posedge clk)
      if (dut.g_stage[i].u_stage.stat.p_done && dut.g_stage[i].u_stage.dig_in_empty)
        n_ahead[i]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic divide(input logic [MANT_W-1:0] x, input logic [MANT_W-1:0] d);
    logic [MANT_W+Q_W+1:0] num, q_ref, r_ref;
    int cyc;
    num   = {x, {(Q_W){1'b0}}};
    q_ref = num / (MANT_W+Q_W+2)'(d);
    r_ref = num % (MANT_W+Q_W+2)'(d);
    @(negedge clk);
    dividend = x;
    divisor  = d;
    go       = 1'b1;
    @(negedge clk);
    go = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    if (cyc > max_cycles) max_cycles = cyc;
    if (cyc < min_cycles) min_cycles = cyc;
    check(quotient == q_ref[Q_W:0], $sformatf("quotient %h / %h: got %h want %h", x, d, quotient, q_ref[Q_W:0]));
    check(remainder == r_ref[MANT_W-1:0], $sformatf("remainder %h / %h: got %h want %h", x, d, remainder, r_ref[MANT_W-1:0]));
    check(exact == (r_ref == 0), "exact flag");
    check(trips <= 4'(N_ITERS) && trips >= 1, $sformatf("trip count %0d", trips));
    check(early || trips == 4'(N_ITERS), $sformatf("normal stop after %0d trips", trips));
    if (early) n_early++; else n_full++;
    if (early && trips == 4'd2) n_two_trips++;
    check(!early || trips >= 2, "early stop before the second trip");
    if (corrected) n_corrected++;
    if (exact) n_exact++;
  endtask

  function automatic logic [MANT_W-1:0] rnd_mant();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return {1'b1, r[MANT_W-2:0]};
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed: equal operands, simple ratios, extremes
    divide({1'b1, {(MANT_W-1){1'b0}}}, {1'b1, {(MANT_W-1){1'b0}}});
    divide({2'b11, {(MANT_W-2){1'b0}}}, {1'b1, {(MANT_W-1){1'b0}}});
    divide({1'b1, {(MANT_W-1){1'b0}}}, {2'b11, {(MANT_W-2){1'b0}}});
    divide({MANT_W{1'b1}}, {1'b1, {(MANT_W-1){1'b0}}});
    divide({1'b1, {(MANT_W-1){1'b0}}}, {MANT_W{1'b1}});
    divide({MANT_W{1'b1}}, {MANT_W{1'b1}});
    divide({1'b1, {(MANT_W-2){1'b0}}, 1'b1}, {MANT_W{1'b1}});
    divide({5'b10001, {(MANT_W-5){1'b0}}}, {5'b11111, {(MANT_W-5){1'b0}}});  // 17/31: period-5 quotient
    for (int n = 0; n < N_RANDOM; n++) divide(rnd_mant(), rnd_mant());
    // 8-bit operands, where early stops are common
    for (int n = 0; n < 200; n++)
      divide({1'b1, 7'($urandom), {(MANT_W-8){1'b0}}}, {1'b1, 7'($urandom), {(MANT_W-8){1'b0}}});

    $display("divisions: early=%0d full=%0d exact=%0d corrected=%0d forced=%0d aliased=%0d cycles=%0d..%0d",
             n_early, n_full, n_exact, n_corrected, n_forced, n_aliased, min_cycles, max_cycles);
    check(n_early > 0, "early stop never happened");
    check(n_full > 0, "full stop never happened");
    check(n_forced > 0, "force-ahead never happened");
    check(n_aliased > 0, "aliased approximation never happened");
    check(n_corrected > 0, "negative final remainder never happened");
    check(n_two_trips > 0, "best case (two trips) never happened");
    $display("arms ahead of the digit (cycles per stage): %0d %0d %0d %0d %0d",
             n_ahead[0], n_ahead[1], n_ahead[2], n_ahead[3], n_ahead[4]);
    for (int i = 0; i < N_STAGES; i++)
      check(n_ahead[i] > 0, $sformatf("stage %0d never formed its approximations ahead of the digit", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
