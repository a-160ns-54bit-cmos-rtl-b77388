// rem_compare_tb: captures sequences of bundles, some repeating the previous
// one exactly, some with the same remainder value split differently between
// the sum and carry words, some differing in the value, the digit or the
// force flag (which must not matter), and checks `same` and the
// one-clock `result_valid` pulse.  The first capture after a clear must
// never report `same`.
module rem_compare_tb;
  import srt_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, capture = 0, same, result_valid;
  ring_state_t state;
  int checks = 0, failures = 0;

  rem_compare dut (.clk(clk), .rst_n(rst_n), .clr(clr), .capture(capture), .state(state), .same(same), .result_valid(result_valid));

  always #5 clk = ~clk;

  function automatic ring_state_t rnd_state();
    ring_state_t s;
    logic [63:0] a, b;
    a = {$urandom, $urandom};
    b = {$urandom, $urandom};
    s.sum = a[REM_W-1:0];
    s.car = b[REM_W-1:0];
    s.q   = ($urandom % 2) ? Q_POS : Q_NEG;
    s.frc = 1'($urandom);
    return s;
  endfunction

  initial begin
    ring_state_t prev;
    bit have_prev;
    state = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    have_prev = 0;
    for (int n = 0; n < 500; n++) begin
      bit want;
      if (n % 37 == 0) begin
        clr = 1;
        @(negedge clk);
        clr = 0;
        have_prev = 0;
      end
      case ($urandom % 7)
        0, 1: state = have_prev ? prev : rnd_state();
        2: begin state = prev; state.car[$urandom % REM_W] ^= 1'b1; end
        3: begin state = prev; state.frc ^= 1'b1; end
        4: begin
          logic [REM_W-1:0] delta;
          delta = REM_W'({$urandom, $urandom});
          state = prev;
          state.sum = prev.sum + delta;
          state.car = prev.car - delta;
        end
        5: begin state = prev; state.q = (prev.q == Q_POS) ? Q_NEG : Q_POS; end
        default: state = rnd_state();
      endcase
      want = have_prev && (REM_W'(state.sum + state.car) == REM_W'(prev.sum + prev.car)) && (state.q == prev.q);
      capture = 1;
      @(negedge clk);
      capture = 0;
      checks++;
      if (!result_valid || same !== want) begin
        failures++;
        $display("FAIL: valid=%b same=%b want %b", result_valid, same, want);
      end
      @(negedge clk);
      checks++;
      if (result_valid) begin
        failures++;
        $display("FAIL: result_valid longer than one clock");
      end
      prev = state;
      have_prev = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
