// srt_divider_8bit_tb: every pair of normalised 8-bit significands
// (1xxxxxxx, zero-extended to 53 bits), 128 x 128 divisions.  Checks each
// quotient and remainder against wide integer division and reports how many
// divisions stopped early on a repeated remainder, the mean number of ring
// trips and the trip histogram.  The document quotes early finishes for
// about 12% of uniformly distributed 8-bit operands; the measured fraction is
// printed for comparison, not checked, since it depends on how operands
// are drawn.
module srt_divider_8bit_tb;
  import srt_pkg::*;

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

  int checks = 0, failures = 0, n = 0, n_early = 0, trip_sum = 0;
  int hist [16];

  initial begin
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 128; a < 256; a++) begin
      for (int b = 128; b < 256; b++) begin
        logic [MANT_W+Q_W+1:0] num, q_ref, r_ref;
        logic [MANT_W-1:0] x, d;
        x = {8'(a), {(MANT_W-8){1'b0}}};
        d = {8'(b), {(MANT_W-8){1'b0}}};
        num   = {x, {(Q_W){1'b0}}};
        q_ref = num / (MANT_W+Q_W+2)'(d);
        r_ref = num % (MANT_W+Q_W+2)'(d);
        @(negedge clk);
        dividend = x;
        divisor  = d;
        go = 1'b1;
        @(negedge clk);
        go = 1'b0;
        while (!done) @(negedge clk);
        checks++;
        if (quotient != q_ref[Q_W:0] || remainder != r_ref[MANT_W-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d/%0d: q=%h want %h", a, b, quotient, q_ref[Q_W:0]);
        end
        n++;
        if (early) n_early++;
        trip_sum += int'(trips);
        hist[trips]++;
      end
    end
    $display("8-bit operands: %0d divisions, %0d stopped early (%0d.%0d%%), mean trips %0d.%02d",
             n, n_early, n_early * 100 / n, (n_early * 1000 / n) % 10,
             trip_sum / n, (trip_sum * 100 / n) % 100);
    for (int t = 1; t <= N_ITERS; t++) $display("  trips=%0d: %0d", t, hist[t]);
    checks++;
    if (n_early == 0) begin
      failures++;
      $display("FAIL: no early stop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
