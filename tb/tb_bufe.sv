// tb_bufe: self-checking test of the 3-state buffer (value, enable form).
// Enabled: y equals a and y_en is high. Disabled: y_en is low and y is zero.
module tb_bufe;
  localparam int W = 16;
  logic         en, y_en;
  logic [W-1:0] a, y;
  int checks = 0, failures = 0;

  bufe #(.W(W)) dut (.en(en), .a(a), .y(y), .y_en(y_en));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 1000; r++) begin
      en = 1'($urandom);
      a  = W'($urandom) | W'(1);
      #1;
      checks++;
      if (en ? (y !== a || y_en !== 1'b1) : (y !== '0 || y_en !== 1'b0)) begin
        failures++;
        $display("en=%0d a=%h y=%h y_en=%0d", en, a, y, y_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
