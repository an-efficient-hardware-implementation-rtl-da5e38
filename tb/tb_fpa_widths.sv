// tb_fpa_widths: the Fast Physical Addressing interface at the three bus
// widths of the characteristics table: 8-bit data (256 new-bus addresses),
// 16-bit (64K) and 32-bit (4G). The 8-bit case keeps a 16-bit system address
// bus so the I/O ports 0x301..0x304 can be addressed. Each width runs host
// transfers at both ends of its new-bus address space and a DMA transfer,
// checking the half-rate new bus.
module tb_fpa_widths;
  logic done8, done16, done32;
  int   c8, f8, c16, f16, c32, f32;

  fpa_width_run #(.AW(16), .DW(8))  run8  (.done(done8),  .checks(c8),  .failures(f8));
  fpa_width_run #(.AW(16), .DW(16)) run16 (.done(done16), .checks(c16), .failures(f16));
  fpa_width_run #(.AW(32), .DW(32)) run32 (.done(done32), .checks(c32), .failures(f32));

  initial begin
    #2_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32 + 1);
    $finish;
  end

  initial begin
    wait (done8 && done16 && done32);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32);
    $finish;
  end
endmodule
