// tb_fpa_ag: self-checking test of the DMA address generator.
// Each bus cycle is observed just after the falling clock edge, once the
// inputs for the next rising edge are set. Checks:
//  * nothing starts with only one of the two positions recorded;
//  * with da held high, ce rises one clock after arming and the area
//    begin..end appears once per address, one address per clock, in order
//    (end - begin + 1 clocks), then ce falls and the generator disarms;
//  * with da toggled at random, ce follows da, no address is skipped or
//    repeated and the whole area still goes out;
//  * reset clears a half-written pair.
module tb_fpa_ag;
  localparam int AW = 16, DW = 16;
  logic          clk = 1'b0, rst_n;
  logic          da, db, de, ce;
  logic [DW-1:0] data_in;
  logic [AW-1:0] dma_ad;
  int checks = 0, failures = 0;

  fpa_ag #(.AW(AW), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .da(da), .data_in(data_in),
    .db(db), .de(de), .ce(ce), .dma_ad(dma_ad)
  );

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t FAIL %s (ce=%0d dma_ad=%h)", $time, what, ce, dma_ad);
    end
  endtask

  // Set the inputs for the next rising edge, then let them settle.
  task automatic cyc(input bit i_da, input bit i_db, input bit i_de, input logic [DW-1:0] d);
    @(negedge clk);
    da = i_da; db = i_db; de = i_de; data_in = d;
    #1;
  endtask

  task automatic write_pos(input logic [DW-1:0] b, input logic [DW-1:0] e);
    cyc(1'b0, 1'b1, 1'b0, b);
    check(!ce, "no ce while writing begin");
    cyc(1'b0, 1'b0, 1'b1, e);
    check(!ce, "no ce while writing end");
  endtask

  // Run a transfer of begin..end with da always high; returns clocks with ce.
  task automatic run_full(input logic [AW-1:0] b, input logic [AW-1:0] e);
    logic [AW-1:0] expect_ad;
    int n, lat;
    write_pos(b, e);
    cyc(1'b1, 1'b0, 1'b0, '0);          // arming edge: generator takes the bus next
    check(!ce, "ce not yet on the arming clock");
    lat = 0;
    expect_ad = b;
    n = 0;
    for (int k = 0; k < 4 * (e - b + 1) + 8; k++) begin
      cyc(1'b1, 1'b0, 1'b0, '0);
      if (ce) begin
        if (n == 0) lat = k;
        check(dma_ad == expect_ad, "address sequence");
        expect_ad++;
        n++;
      end else if (n > 0) break;
    end
    check(lat == 0, "ce on the clock after arming");
    check(n == int'(e - b) + 1, $sformatf("one address per clock: %0d clocks for %0d addresses", n, e - b + 1));
    // Disarmed: da high for a while starts nothing.
    for (int k = 0; k < 4; k++) begin
      cyc(1'b1, 1'b0, 1'b0, '0);
      check(!ce, "disarmed after the end address");
    end
  endtask

  initial begin
    logic [AW-1:0] expect_ad;
    int n, pauses;
    rst_n = 1'b0; da = 0; db = 0; de = 0; data_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Only the begin position: must not start.
    cyc(1'b0, 1'b1, 1'b0, 16'h4000);
    for (int k = 0; k < 5; k++) begin
      cyc(1'b1, 1'b0, 1'b0, '0);
      check(!ce, "no start with only begin recorded");
    end
    // Reset forgets the half pair: end alone must not start.
    @(negedge clk); rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    cyc(1'b0, 1'b0, 1'b1, 16'h4003);
    for (int k = 0; k < 5; k++) begin
      cyc(1'b1, 1'b0, 1'b0, '0);
      check(!ce, "no start with only end recorded after reset");
    end
    @(negedge clk); rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;

    run_full(16'h1000, 16'h1007);
    run_full(16'hBEEF, 16'hBEEF);
    run_full(16'h0300, 16'h0340);

    // Transfer with random pauses.
    write_pos(16'h2000, 16'h203F);
    expect_ad = 16'h2000;
    n = 0; pauses = 0;
    for (int k = 0; k < 1000 && n < 64; k++) begin
      bit d;
      d = ($urandom_range(0, 2) != 0);
      cyc(d, 1'b0, 1'b0, '0);
      if (!d) begin
        check(!ce, "ce low while da low");
        pauses++;
      end
      if (ce) begin
        check(dma_ad == expect_ad, "address sequence across pauses");
        expect_ad++;
        n++;
      end
    end
    check(n == 64, "whole area sent across pauses");
    check(pauses > 0, "pauses exercised");
    cyc(1'b1, 1'b0, 1'b0, '0);
    check(!ce, "done after paused transfer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
