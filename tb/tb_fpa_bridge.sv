// tb_fpa_bridge: self-checking test of the Fast Physical Addressing interface.
// A small host model plays I/O cycles (one clock each) and a memory model
// answers the DMA generator's addresses. Checks:
//  * host mode: a word written to port 0x301 becomes the new-bus address, a
//    word written to 0x302 goes out as new-bus data with that address, and
//    the new bus is released on any other port;
//  * DMA mode: after begin/end are written to 0x303/0x304 and da is high,
//    every memory word of the area is read once, in order, and the new bus
//    carries exactly the (address, data) cycles that the word layout asks for
//    (address bit 0: new-bus address word, bit 1: new-bus data word);
//  * rate: a new-bus cycle takes two memory accesses, i.e. the new bus runs
//    at half the DMA access rate (Fn = 1/(2*Ta)).
module tb_fpa_bridge;
  localparam int AW = 16, DW = 16;
  logic          clk = 1'b0, rst_n, da, ad_dma_en, data_out_en, ad_out_en;
  logic [AW-1:0] ad_in, ad_dma;
  logic [DW-1:0] data_in, host_data, data_out, ad_out;
  logic [DW-1:0] mem [0:(1<<AW)-1];
  logic [DW-1:0] model_lat;  // new-bus address the latch should hold
  int checks = 0, failures = 0;

  fpa_bridge #(.AW(AW), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .ad_in(ad_in), .ad_dma(ad_dma), .ad_dma_en(ad_dma_en),
    .data_in(data_in), .da(da), .data_out(data_out), .data_out_en(data_out_en),
    .ad_out(ad_out), .ad_out_en(ad_out_en)
  );

  always #5 clk = ~clk;

  // System data bus: memory answers DMA addresses, otherwise the host drives it.
  assign data_in = ad_dma_en ? mem[ad_dma] : host_data;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t FAIL %s", $time, what);
    end
  endtask

  task automatic io_write(input logic [AW-1:0] port, input logic [DW-1:0] d);
    @(negedge clk);
    ad_in = port; host_data = d;
    #1;
  endtask

  task automatic host_transfer(input logic [DW-1:0] na, input logic [DW-1:0] nd);
    model_lat = na;
    io_write(16'h0301, na);
    check(!ad_out_en && !data_out_en, "new bus released while the address is written");
    io_write(16'h0000, 16'h5555);
    check(!ad_out_en && !data_out_en, "new bus released between steps");
    io_write(16'h0302, nd);
    check(ad_out_en && data_out_en, "buffers on for port 0x302");
    check(ad_out == na && data_out == nd, $sformatf("host cycle addr %h data %h got %h %h", na, nd, ad_out, data_out));
    io_write(16'h0000, 16'hAAAA);
    check(!ad_out_en && !data_out_en, "new bus released after the data step");
  endtask

  task automatic dma_transfer(input logic [AW-1:0] b, input logic [AW-1:0] e);
    logic [DW-1:0] exp_a[$], exp_d[$];
    logic [DW-1:0] lat;
    int clocks, cycles;
    // Expected new-bus cycles, from the layout of the area.
    lat = model_lat;
    for (int i = int'(b); i <= int'(e); i++) begin
      logic [AW-1:0] a;
      a = AW'(i);
      if (a[0]) lat = mem[a];
      if (a[1]) begin exp_a.push_back(lat); exp_d.push_back(mem[a]); end
    end
    model_lat = lat;
    io_write(16'h0303, b);
    io_write(16'h0304, e);
    @(negedge clk); ad_in = '0; da = 1'b1; #1;
    clocks = 0; cycles = 0;
    for (int k = 0; k < 4 * (int'(e) - int'(b) + 1) + 8; k++) begin
      @(negedge clk); #1;
      if (ad_dma_en) begin
        check(ad_dma == AW'(int'(b) + clocks), "DMA address order");
        clocks++;
        if (ad_out_en) begin
          check(cycles < exp_a.size() && ad_out == exp_a[cycles] && data_out == exp_d[cycles],
                $sformatf("DMA new-bus cycle %0d: %h/%h", cycles, ad_out, data_out));
          cycles++;
        end
      end else begin
        check(!ad_out_en && !data_out_en || clocks == 0, "new bus idle outside DMA");
        if (clocks > 0) break;
      end
    end
    da = 1'b0;
    check(clocks == int'(e) - int'(b) + 1, "one memory access per clock");
    check(cycles == exp_a.size(), $sformatf("new-bus cycles %0d exp %0d", cycles, exp_a.size()));
    if ((int'(e) - int'(b) + 1) % 4 == 0)
      check(2 * cycles == clocks, "new bus at half the memory access rate");
  endtask


  initial begin
    rst_n = 1'b0; da = 1'b0; ad_in = '0; host_data = '0;
    for (int i = 0; i < (1 << AW); i++) mem[i] = DW'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int r = 0; r < 50; r++) host_transfer(DW'($urandom), DW'($urandom));

    dma_transfer(16'h1000, 16'h103F);
    dma_transfer(16'h2001, 16'h2010);
    for (int r = 0; r < 5; r++) begin
      logic [AW-1:0] b;
      b = AW'($urandom_range(16'h0400, 16'hF000));
      dma_transfer(b, b + AW'($urandom_range(1, 200)));
    end
    // Host mode still works after DMA.
    host_transfer(16'h1234, 16'h5678);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
