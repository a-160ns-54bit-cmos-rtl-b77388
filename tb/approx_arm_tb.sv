// approx_arm_tb: feeds the arm the top columns of random full-width sum,
// carry and divisor-multiple words and checks that its 3-bit result is the
// truncated value of 2*(sum + carry + multiple): equal to the exact top
// three bits or one unit below them (the carries lost below the columns).
// Both the CSA arm and the zero arm (no CSA) are checked.
module approx_arm_tb;
  import srt_pkg::*;
  localparam int W = REM_W;
  logic [3:0] s_top, c_top, m_top;
  logic [2:0] est_csa, est_zero;
  int checks = 0, failures = 0;

  approx_arm #(.HAS_CSA(1'b1)) dut_csa  (.s_top(s_top), .c_top(c_top), .m_top(m_top), .est(est_csa));
  approx_arm #(.HAS_CSA(1'b0)) dut_zero (.s_top(s_top), .c_top(c_top), .m_top('0),    .est(est_zero));

  function automatic logic [W-1:0] rnd();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return r[W-1:0];
  endfunction

  task automatic check_arm(input logic [2:0] got, input logic [W-1:0] total, input string what);
    logic [W-1:0] shifted;
    logic [2:0]   top;
    shifted = total << 1;
    top     = shifted[W-1 -: 3];
    checks++;
    if (got !== top && got !== 3'(top - 3'd1)) begin
      failures++;
      $display("FAIL %s: est=%0d exact top=%0d", what, got, top);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] s, c, m;
      s = rnd(); c = rnd(); m = rnd();
      s_top = s[W-2 -: 4];
      c_top = c[W-2 -: 4];
      m_top = m[W-2 -: 4];
      #1;
      check_arm(est_csa, s + c + m, "csa arm");
      check_arm(est_zero, s + c, "zero arm");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
