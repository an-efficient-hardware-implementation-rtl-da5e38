// tb_epa_dec: self-checking test of the EPA address decoder.
// Sweeps every 16-bit address and checks that exactly ports 0x301, 0x302 and
// 0x303 raise S1, S2 and S3.
module tb_epa_dec;
  logic [15:0] a;
  logic        s1, s2, s3;
  int checks = 0, failures = 0;

  epa_dec dut (.a(a), .s1(s1), .s2(s2), .s3(s3));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;
    for (int i = 0; i < 65536; i++) begin
      a = i[15:0];
      #1;
      exp = {i == 769, i == 770, i == 771};
      checks++;
      if ({s1, s2, s3} !== exp) begin
        failures++;
        if (failures < 10) $display("a=%h got %b exp %b", a, {s1, s2, s3}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
