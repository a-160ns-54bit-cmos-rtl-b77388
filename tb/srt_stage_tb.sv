// srt_stage_tb: one stage between a driven predecessor and a driven
// successor.  For random incoming bundles it checks the overlap (the
// approximation block evaluates from the remainder alone, before the digit
// arrives; the remainder block waits for the digit; the digit block waits for
// the shift register), the handshake (no block resets while its inputs are
// complete or before the successor is complete; a reset block leaves
// precharge only when the successor is empty again) and
// the result: the output remainder equals 2*(R - q*D) and the output digit
// and force flag follow the selection rules applied to the truncated top
// three bits of that remainder.  It also checks that the digit offered to
// the shift register is held after the stage resets and dropped after the
// release.
module srt_stage_tb;
  import srt_pkg::*;
  localparam int W = REM_W;

  logic clk = 0, rst_n = 0, flush = 0;
  logic [W-1:0] divisor;
  ring_tok_t tok_in, tok_out;
  stage_stat_t succ, stat;
  logic sr_ack = 0, sr_release = 0, fired, forced, aliased;
  qdig_t sr_digit;
  int checks = 0, failures = 0;

  srt_stage dut (
    .clk(clk), .rst_n(rst_n), .flush(flush), .divisor(divisor),
    .tok_in(tok_in), .tok_out(tok_out), .succ(succ), .stat(stat),
    .sr_ack(sr_ack), .sr_release(sr_release), .sr_digit(sr_digit),
    .fired(fired), .forced(forced), .aliased(aliased)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return r[W-1:0];
  endfunction

  task automatic set_succ(input bit full);
    succ = full ? '{r_done: 1, r_empty: 0, p_done: 1, p_empty: 0, q_done: 1, q_empty: 0}
                : '{r_done: 0, r_empty: 1, p_done: 0, p_empty: 1, q_done: 0, q_empty: 1};
  endtask

  initial begin
    tok_in = TOK_SPACER;
    set_succ(0);
    divisor = rnd();
    divisor[W-1 -: 2] = 2'b01;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      ring_state_t s, o;
      logic [W-1:0] want;
      logic [2:0]   top;
      qdig_t        want_q;
      logic         want_f;
      s.sum = rnd(); s.car = rnd(); s.frc = (n % 5) == 0;
      case (n % 3) 0: s.q = Q_POS; 1: s.q = Q_ZERO; default: s.q = Q_NEG; endcase
      // remainder first, digit still in reset: only the approximations
      @(negedge clk);
      sr_ack = 0;
      tok_in = tok_encode(s);
      tok_in.q = Q_SPACER;
      tok_in.frc = '0;
      repeat (2) @(negedge clk);
      check(stat.p_done, "approximations not formed ahead of the digit");
      check(stat.r_empty && stat.q_empty, "remainder or digit block ran without the digit");
      check(!fired, "fired without the digit");
      // digit arrives while the shift register is not ready; from the second
      // bundle on the successor is still complete, so the stage must stay in
      // precharge until it resets
      tok_in = tok_encode(s);
      repeat (3) @(negedge clk);
      if (n > 0) begin
        check(stat.r_empty && stat.q_empty, "left precharge before the successor reset");
        set_succ(0);
        repeat (3) @(negedge clk);
      end
      check(stat.r_done, "remainder block did not evaluate");
      check(stat.q_empty, "digit block evaluated without shift register acknowledge");
      sr_ack = 1;
      repeat (2) @(negedge clk);
      check(stat.q_done && stat.r_done && stat.p_done, "did not evaluate");
      sr_ack = 0;   // shift register now holds the digit
      o = tok_decode(tok_out);
      if (s.q == Q_POS)      want = (s.sum + s.car - divisor) << 1;
      else if (s.q == Q_NEG) want = (s.sum + s.car + divisor) << 1;
      else                   want = (s.sum + s.car) << 1;
      check(W'(o.sum + o.car) == want, "remainder");
      // the zero arm adds the incoming words directly (no CSA in front)
      if (s.q == Q_ZERO) top = 3'(s.sum[W-2 -: 3] + s.car[W-2 -: 3]);
      else               top = 3'(o.sum[W-1 -: 3] + o.car[W-1 -: 3]);
      if (s.frc || (top[2] && top != 3'b111)) want_q = Q_NEG;
      else if (top == 3'b111)                 want_q = Q_ZERO;
      else                                    want_q = Q_POS;
      want_f = (top == 3'b100) || (s.frc && !top[2]);
      check(o.q == want_q, $sformatf("digit %b want %b (top %0d frc %0d)", o.q, want_q, $signed(top), s.frc));
      check(o.frc == want_f, "force flag");
      check(tok_out.sum.t == ~tok_out.sum.f, "dual-monotonic encoding");
      check(sr_digit == want_q, "digit offered to shift register");
      // successor takes the result, but inputs still valid: must hold
      set_succ(1);
      repeat (3) @(negedge clk);
      check(stat.r_done && stat.p_done && stat.q_done, "reset while inputs still complete");
      // predecessor resets: stage must reset
      tok_in = TOK_SPACER;
      repeat (4) @(negedge clk);
      check(tok_out == TOK_SPACER, "did not reset");
      check(stat.p_empty, "approximations did not reset");
      check(sr_digit == want_q, "digit not held after reset");
      sr_release = 1;
      @(negedge clk);
      sr_release = 0;
      @(negedge clk);
      check(sr_digit == Q_SPACER, "spacer not sent after release");
      sr_ack = 1;
      repeat (2) @(negedge clk);
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
