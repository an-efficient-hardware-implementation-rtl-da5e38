// tb_tlatch: self-checking test of the transparent latch.
// With the gate high the output must follow every input change at once;
// with the gate low it must hold the value present when the gate fell.
module tb_tlatch;
  localparam int W = 16;
  logic         g;
  logic [W-1:0] d, q, held;
  int checks = 0, failures = 0;

  tlatch #(.W(W)) dut (.g(g), .d(d), .q(q));

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("%s: q=%h exp %h", what, q, exp);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      g = 1'b1;
      for (int k = 0; k < 4; k++) begin
        d = W'($urandom);
        #1 check(d, "transparent");
      end
      held = d;
      g = 1'b0;
      #1 check(held, "at close");
      for (int k = 0; k < 4; k++) begin
        d = W'($urandom);
        #1 check(held, "holding");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
