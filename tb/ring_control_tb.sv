// ring_control_tb: plays the part of the ring around the controller.  For
// each division it answers `load` with a first-stage evaluation, then
// reports trip results: either N_ITERS non-repeating trips, or a repeat on
// a random trip.  Checks the flush pulse, that `more` and `release_sr`
// appear exactly for trips that continue, that the controller stops on
// Same or after N_ITERS trips, that `done` waits for `settled`, and the
// trip count and `early` flag.
module ring_control_tb;
  import srt_pkg::*;
  logic clk = 0, rst_n = 0, go = 0, a_fired = 0, e_empty = 0, cmp_valid = 0, same = 0, settled = 0;
  logic flush, load, more, release_sr, busy, done, early;
  logic [3:0] trips;
  int checks = 0, failures = 0;

  ring_control dut (.clk(clk), .rst_n(rst_n), .go(go), .a_fired(a_fired), .e_empty(e_empty), .cmp_valid(cmp_valid),
                    .same(same), .settled(settled), .flush(flush), .load(load), .more(more),
                    .release_sr(release_sr), .busy(busy), .done(done), .early(early), .trips(trips));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic division(input int stop_at);   // 0: never repeats
    int n;
    @(negedge clk);
    go = 1;
    @(negedge clk);
    go = 0;
    check(flush && busy && !done, "flush after go");
    @(negedge clk);
    check(!flush && load, "load after flush");
    repeat (2) @(negedge clk);
    check(load, "load held until first stage evaluates");
    a_fired = 1;
    @(negedge clk);
    a_fired = 0;
    check(!load && !more, "load released");
    n = 0;
    forever begin
      bit rep;
      repeat (4) @(negedge clk);
      n++;
      rep = (n == stop_at);
      cmp_valid = 1;
      same = rep;
      #1;
      check(release_sr == (!rep && n < N_ITERS), $sformatf("release on trip %0d", n));
      @(negedge clk);
      cmp_valid = 0;
      same = 0;
      if (rep || n == N_ITERS) break;
      check(more, "more after a non-repeating trip");
      a_fired = 1;
      @(negedge clk);
      a_fired = 0;
      @(negedge clk);
      check(more, "more held until the last stage has reset");
      e_empty = 1;
      @(negedge clk);
      e_empty = 0;
      @(negedge clk);
      check(!more, "more cleared once the last stage has reset");
    end
    repeat (3) @(negedge clk);
    check(!more && busy && !done, "waiting for shift registers");
    settled = 1;
    repeat (2) @(negedge clk);
    check(done && !busy, "done after settle");
    check(int'(trips) == n, $sformatf("trips %0d want %0d", trips, n));
    check(early == (stop_at != 0 && stop_at <= N_ITERS), "early flag");
    settled = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 30; r++) division((r % 3 == 0) ? 0 : 2 + int'($urandom % (N_ITERS - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
