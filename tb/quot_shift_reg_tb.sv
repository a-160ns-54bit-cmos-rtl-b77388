// quot_shift_reg_tb: sends digit/spacer sequences into the shift register
// with the four-phase handshake (offer a digit while `ack` is high, keep it
// until `ack` falls, then send a spacer).  Checks that after 11 digits every
// digit sits in its own output position, and that when the producer stops
// after k digits without sending a spacer, the last digit fills all later
// positions (the early-finish case).  Also checks that `stable` only rises
// once the contents stop changing.
module quot_shift_reg_tb;
  import srt_pkg::*;
  localparam int N = N_ITERS;
  logic clk = 0, rst_n = 0, clr = 0;
  qdig_t din = Q_SPACER;
  logic ack, stable;
  qdig_t digits [N];
  int checks = 0, failures = 0;

  quot_shift_reg dut (.clk(clk), .rst_n(rst_n), .clr(clr), .din(din), .ack(ack), .digits(digits), .stable(stable));

  always #5 clk = ~clk;

  function automatic qdig_t rnd_dig();
    case ($urandom % 3) 0: return Q_POS; 1: return Q_ZERO; default: return Q_NEG; endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int k);
    qdig_t seq [N];
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    for (int j = 0; j < k; j++) begin
      seq[j] = rnd_dig();
      while (!ack) @(negedge clk);
      din = seq[j];
      while (ack) @(negedge clk);
      if (j < k - 1) begin
        repeat ($urandom % 4) @(negedge clk);
        din = Q_SPACER;
      end
    end
    // digit k-1 stays on the input: wait for the register to settle
    @(negedge clk);
    while (!stable) @(negedge clk);
    for (int j = 0; j < N; j++) begin
      qdig_t want;
      want = (j < k) ? seq[j] : seq[k-1];
      check(digits[j] == want, $sformatf("k=%0d position %0d: %b want %b", k, j, digits[j], want));
    end
    repeat (5) @(negedge clk);
    check(stable, "stable dropped without input change");
    din = Q_SPACER;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) run(N);
    for (int r = 0; r < 60; r++) run(1 + r % N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
