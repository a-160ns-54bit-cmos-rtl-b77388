// comp_det_tb: random, all-reset, all-evaluated and one-pair-missing
// patterns on the dual-monotonic pairs; checks done and empty against a
// bit-by-bit loop.
module comp_det_tb;
  localparam int W = 111;
  logic [W-1:0] t, f;
  logic done, empty;
  int checks = 0, failures = 0;
  logic clk = 0;

  comp_det #(.WIDTH(W)) dut (.t(t), .f(f), .done(done), .empty(empty));

  task automatic check_now();
    bit want_done = 1, want_empty = 1;
    #1;
    for (int i = 0; i < W; i++) begin
      if (!(t[i] || f[i])) want_done = 0;
      if (t[i] || f[i])    want_empty = 0;
    end
    checks++;
    if (done !== want_done || empty !== want_empty) begin
      failures++;
      $display("FAIL: done=%b/%b empty=%b/%b", done, want_done, empty, want_empty);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] v;
      for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
      case (n % 4)
        0: begin t = '0; f = '0; end
        1: begin t = v; f = ~v; end
        2: begin t = v; f = ~v; t[n % W] = 0; f[n % W] = 0; end
        default: begin t = v; for (int i = 0; i < W; i += 32) f[i +: 32] = $urandom; t = t & ~f; end
      endcase
      check_now();
      if (n % 4 == 2 || n % 4 == 3) begin
        // a single evaluated pair must clear `empty`
        t = '0; f = '0; f[(n * 7) % W] = 1'b1;
        check_now();
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
