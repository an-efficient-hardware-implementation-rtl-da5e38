// tb_fpa_dec: self-checking test of the FPA address decoder.
// Sweeps every 16-bit address in both modes (ce = 0 and ce = 1) and compares
// s1/s2/db/de with the expected decode written out independently here.
module tb_fpa_dec;
  logic        ce;
  logic [15:0] a;
  logic        s1, s2, db, de;
  int checks = 0, failures = 0;

  fpa_dec dut (.ce(ce), .a(a), .s1(s1), .s2(s2), .db(db), .de(de));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    int hits_s1 = 0, hits_db = 0;
    for (int m = 0; m < 2; m++) begin
      for (int i = 0; i < 65536; i++) begin
        ce = m[0];
        a  = i[15:0];
        #1;
        if (!ce) exp = {i == 'h301, i == 'h302, i == 'h303, i == 'h304};
        else     exp = {a[0], a[1], 1'b0, 1'b0};
        checks++;
        if ({s1, s2, db, de} !== exp) begin
          failures++;
          if (failures < 10) $display("ce=%0d a=%h got %b exp %b", ce, a, {s1, s2, db, de}, exp);
        end
        if (!ce && s1) hits_s1++;
        if (db) hits_db++;
      end
    end
    checks++;
    if (hits_s1 != 1 || hits_db != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
