// tb_d_ff: self-checking test of the D flip-flop. Random data is clocked
// through and q is compared after each rising edge with the value d had
// before it; an asynchronous reset pulse between edges must clear q at once.
module tb_d_ff;
  logic clk = 1'b0, reset = 1'b1, d = 1'b0, q;
  int checks = 0, failures = 0;

  d_ff dut (.clk(clk), .reset(reset), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    @(negedge clk);
    checks++; if (q !== 1'b0) begin failures++; $display("q not cleared by reset"); end
    reset = 1'b0;
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      exp = d;
      @(posedge clk); #1;
      checks++;
      if (q !== exp) begin failures++; $display("cycle %0d: q=%b exp=%b", i, q, exp); end
      if (i % 37 == 20) begin
        // Asynchronous reset between edges, then release before the next edge.
        d = 1'b1; @(posedge clk); #2 reset = 1'b1; #1;
        checks++; if (q !== 1'b0) begin failures++; $display("async reset failed"); end
        #1 reset = 1'b0;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
