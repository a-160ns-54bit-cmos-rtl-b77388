// quot_resolve_tb: random signed-digit quotients and final carry-save
// bundles whose remainder lies in [-2D, 2D]; checks the binary quotient
// 2^55 + sum(q_k 2^(54-k)), decremented when the final remainder is negative,
// and the remainder brought back into [0, D), using signed integer
// arithmetic independent of the block.
module quot_resolve_tb;
  import srt_pkg::*;
  localparam int W = REM_W;
  logic [Q_W-1:0] qpos, qneg;
  ring_state_t last;
  logic [W-1:0] divisor;
  logic [Q_W:0] quotient;
  logic [MANT_W-1:0] remainder;
  logic rem_neg, rem_zero;
  int checks = 0, failures = 0;

  quot_resolve dut (.qpos(qpos), .qneg(qneg), .last(last), .divisor(divisor),
                    .quotient(quotient), .remainder(remainder), .rem_neg(rem_neg), .rem_zero(rem_zero));

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint signed d, y, p, r_want;
      longint signed qv;
      logic [63:0] a;
      logic [Q_W:0] q_want;
      int qd;
      a = rnd64();
      d = longint'({11'd0, 1'b1, a[51:0]});       // D in [2^52, 2^53)
      // final remainder P in [-D, D] (zero now and then), digit, then 2P_54 = P + q*D
      if (n % 10 == 0) p = 0;
      else p = longint'(rnd64() % 64'(2 * d + 1)) - d;
      qd = int'($urandom % 3) - 1;
      y  = p + qd * d;
      a = rnd64();
      last.sum = W'(a);
      last.car = W'(y) - last.sum;
      last.q   = qd == 1 ? Q_POS : (qd == -1 ? Q_NEG : Q_ZERO);
      last.frc = 1'b0;
      divisor  = W'(d);
      a = rnd64();
      qpos = Q_W'(a);
      a = rnd64();
      qneg = Q_W'(a) & ~qpos;
      #1;
      q_want = {1'b1, {Q_W{1'b0}}} + {1'b0, qpos} - {1'b0, qneg};
      r_want = p;
      if (p < 0) begin
        q_want = q_want - 1;
        r_want = p + d;
      end
      checks++;
      if (quotient !== q_want || remainder !== MANT_W'(r_want) || rem_neg !== (p < 0) || rem_zero !== (r_want == 0)) begin
        failures++;
        $display("FAIL: p=%0d q=%h want %h r=%h want %h", p, quotient, q_want, remainder, MANT_W'(r_want));
      end
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
