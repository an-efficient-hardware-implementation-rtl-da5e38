// tb_epa_bridge: self-checking test of the Extended Physical Addressing
// interface. A host model plays ISA-style I/O cycles (address and data set
// up, strobe low, strobe high). Checks:
//  * writes to 0x301 and 0x303 set the low and high byte of the new-bus
//    address and leave the new bus released;
//  * a write to 0x302 drives the new bus: data = system data, address =
//    latched word, oe high, and only while the strobe is low;
//  * a read of 0x302 raises oe and the address but not the write buffers;
//  * cycles with AEN high and writes to other ports change nothing;
//  * clk_out repeats clk_in.
module tb_epa_bridge;
  logic [11:0] ad_in;
  logic        aen, ior_n, iow_n, clk_in, oe, data_out_en, ad_out_en, clk_out;
  logic [7:0]  data_in, data_out;
  logic [15:0] ad_out, na;
  int checks = 0, failures = 0;

  epa_bridge dut (
    .ad_in(ad_in), .aen(aen), .data_in(data_in), .ior_n(ior_n), .iow_n(iow_n),
    .clk_in(clk_in), .oe(oe), .data_out(data_out), .data_out_en(data_out_en),
    .ad_out(ad_out), .ad_out_en(ad_out_en), .clk_out(clk_out)
  );

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t FAIL %s: oe=%0d den=%0d aen_o=%0d ad_out=%h data_out=%h",
               $time, what, oe, data_out_en, ad_out_en, ad_out, data_out);
    end
  endtask

  task automatic released(input string what);
    check(!oe && !data_out_en && !ad_out_en, what);
  endtask

  // One I/O cycle; `mid` is checked while the strobe is low.
  task automatic io(input bit wr, input bit dma, input logic [11:0] port, input logic [7:0] d,
                    output bit on, output logic [15:0] a_seen, output logic [7:0] d_seen,
                    output bit rd_oe);
    ad_in = port; aen = dma; data_in = d; #10;
    if (wr) iow_n = 1'b0; else ior_n = 1'b0;
    #10;
    on = data_out_en; a_seen = ad_out; d_seen = data_out; rd_oe = oe && ad_out_en && !data_out_en;
    #10;
    iow_n = 1'b1; ior_n = 1'b1;
    #5 released("released after the strobe");
    #5 data_in = ~d; ad_in = 12'h000; aen = 1'b0;
  endtask

  initial begin
    bit on, rd_oe;
    logic [15:0] a_seen;
    logic [7:0] d_seen, d;
    clk_in = 0; ior_n = 1; iow_n = 1; aen = 0; ad_in = '0; data_in = '0;
    #1;
    for (int r = 0; r < 100; r++) begin
      na = 16'($urandom);
      io(1, 0, 12'h301, na[7:0], on, a_seen, d_seen, rd_oe);
      check(!on, "no buffers while writing the low address byte");
      io(1, 0, 12'h303, na[15:8], on, a_seen, d_seen, rd_oe);
      check(!on, "no buffers while writing the high address byte");
      // Noise: a DMA cycle on the latch port and a write to an unrelated port.
      io(1, 1, 12'h301, 8'($urandom), on, a_seen, d_seen, rd_oe);
      io(1, 0, 12'h300, 8'($urandom), on, a_seen, d_seen, rd_oe);
      check(!on, "no buffers for port 0x300");
      io(1, 1, 12'h302, 8'($urandom), on, a_seen, d_seen, rd_oe);
      check(!on, "no buffers for an AEN cycle");
      d = 8'($urandom);
      io(1, 0, 12'h302, d, on, a_seen, d_seen, rd_oe);
      check(on && a_seen == na && d_seen == d,
            $sformatf("new-bus write addr %h data %h got %h %h", na, d, a_seen, d_seen));
      io(0, 0, 12'h302, 8'h00, on, a_seen, d_seen, rd_oe);
      check(!on && rd_oe && a_seen == na, "new-bus read: oe and address, no write buffers");
    end
    for (int k = 0; k < 8; k++) begin
      clk_in = ~clk_in; #1;
      check(clk_out == clk_in, "clock repeated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
