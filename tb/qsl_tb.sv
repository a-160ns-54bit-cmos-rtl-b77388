// qsl_tb: exhaustive check of the quotient digit selection against a table
// worked out from the selection rules, for all 3-bit approximations and both
// values of the incoming force flag.
module qsl_tb;
  import srt_pkg::*;
  logic [2:0] est;
  logic frc_in, frc_out;
  qdig_t q;
  int checks = 0, failures = 0;

  qsl dut (.est(est), .frc_in(frc_in), .q(q), .frc_out(frc_out));

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int e = -4; e <= 3; e++) begin
        qdig_t want_q;
        logic  want_f;
        est = 3'(e);
        frc_in = f[0];
        #1;
        if (f == 1 || e <= -2) want_q = Q_NEG;
        else if (e == -1)      want_q = Q_ZERO;
        else                   want_q = Q_POS;
        want_f = (e == -4) || (f == 1 && e >= 0);
        checks++;
        if (q !== want_q || frc_out !== want_f) begin
          failures++;
          $display("FAIL: est=%0d frc_in=%0d q=%b/%b frc=%b/%b", e, f, q, want_q, frc_out, want_f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
