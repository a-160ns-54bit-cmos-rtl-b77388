// c_element_tb: drives random input pairs into the C-element and checks its
// output against the rule "rise when both high, fall when both low, else
// hold", one clock after the inputs, plus the synchronous clear.
module c_element_tb;
  logic clk = 0, rst_n = 0, clr = 0, a = 0, b = 0, c;
  logic model;
  int checks = 0, failures = 0;

  c_element dut (.clk(clk), .rst_n(rst_n), .clr(clr), .a(a), .b(b), .c(c));

  always #5 clk = ~clk;

  initial begin
    model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a   = 1'($urandom);
      b   = 1'($urandom);
      clr = ($urandom % 20) == 0;
      @(posedge clk);
      if (clr)             model = 0;
      else if (a && b)     model = 1;
      else if (!a && !b)   model = 0;
      #1;
      checks++;
      if (c !== model) begin
        failures++;
        $display("FAIL: a=%b b=%b clr=%b c=%b want %b", a, b, clr, c, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
