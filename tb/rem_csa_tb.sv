// rem_csa_tb: random carry-save remainders, divisors and digits; checks that
// the two output words add up (modulo 2^55) to 2*(sum + carry - q*D).
module rem_csa_tb;
  import srt_pkg::*;
  localparam int W = REM_W;
  logic [W-1:0] sum, car, divisor, sum_next, car_next;
  qdig_t q;
  int checks = 0, failures = 0;

  rem_csa dut (.sum(sum), .car(car), .divisor(divisor), .q(q), .sum_next(sum_next), .car_next(car_next));

  function automatic logic [W-1:0] rnd();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return r[W-1:0];
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [W-1:0] want;
      sum = rnd(); car = rnd();
      divisor = rnd();
      divisor[W-1 -: 2] = 2'b01;
      case (n % 3)
        0: q = Q_POS;
        1: q = Q_ZERO;
        default: q = Q_NEG;
      endcase
      #1;
      if (q == Q_POS)      want = (sum + car - divisor) << 1;
      else if (q == Q_NEG) want = (sum + car + divisor) << 1;
      else                 want = (sum + car) << 1;
      checks++;
      if (W'(sum_next + car_next) !== want) begin
        failures++;
        $display("FAIL: q=%b got %h want %h", q, W'(sum_next + car_next), want);
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
