// tb_pa_top: end-to-end test of pa_top at its default sizes.
// Both interfaces run at once, each with its own host model:
//  * FPA: host-mode transfers through ports 0x301/0x302, then a DMA
//    transfer of a 256-word memory area that is paused twice by dropping
//    da, then a second, unpaused DMA transfer. The new-bus cycles are checked
//    against a model of the memory layout (bit 0: address word, bit 1: data
//    word), including new-bus addresses 0x0000 and 0xFFFF (the whole 64K
//    space of the 16-bit bus) and the rate of one new-bus cycle per two
//    memory accesses.
//  * EPA: two-step writes (address bytes, then data) and reads of the data
//    port, with AEN cycles mixed in.
// Every mechanism must occur at least once: host-mode address latch and
// transfer, begin/end recording, DMA start, DMA address word, DMA data
// word, DMA pause, DMA end, EPA low/high address latch, EPA write, EPA
// read, EPA cycle ignored for AEN.
module tb_pa_top;
  logic        fpa_clk = 1'b0, fpa_rst_n, fpa_ad_dma_en, fpa_da, fpa_data_out_en, fpa_ad_out_en;
  logic [15:0] fpa_ad_in, fpa_ad_dma, fpa_data_in, fpa_host_data, fpa_data_out, fpa_ad_out;
  logic [11:0] epa_ad_in;
  logic        epa_aen, epa_ior_n, epa_iow_n, epa_clk_in = 1'b0, epa_oe, epa_data_out_en,
               epa_ad_out_en, epa_clk_out;
  logic [7:0]  epa_data_in, epa_data_out;
  logic [15:0] epa_ad_out;
  logic [15:0] mem [0:65535];
  logic [15:0] model_lat;
  int checks = 0, failures = 0;

  typedef enum int {
    M_HOST_LATCH, M_HOST_XFER, M_POS_WRITE, M_DMA_START, M_DMA_ADDR_WORD, M_DMA_DATA_WORD,
    M_DMA_PAUSE, M_DMA_END, M_EPA_LATCH_LO, M_EPA_LATCH_HI, M_EPA_WRITE, M_EPA_READ,
    M_EPA_AEN_IGNORED, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  pa_top dut (
    .fpa_clk(fpa_clk), .fpa_rst_n(fpa_rst_n), .fpa_ad_in(fpa_ad_in), .fpa_ad_dma(fpa_ad_dma),
    .fpa_ad_dma_en(fpa_ad_dma_en), .fpa_data_in(fpa_data_in), .fpa_da(fpa_da),
    .fpa_data_out(fpa_data_out), .fpa_data_out_en(fpa_data_out_en), .fpa_ad_out(fpa_ad_out),
    .fpa_ad_out_en(fpa_ad_out_en),
    .epa_ad_in(epa_ad_in), .epa_aen(epa_aen), .epa_data_in(epa_data_in), .epa_ior_n(epa_ior_n),
    .epa_iow_n(epa_iow_n), .epa_clk_in(epa_clk_in), .epa_oe(epa_oe), .epa_data_out(epa_data_out),
    .epa_data_out_en(epa_data_out_en), .epa_ad_out(epa_ad_out), .epa_ad_out_en(epa_ad_out_en),
    .epa_clk_out(epa_clk_out)
  );

  always #5 fpa_clk = ~fpa_clk;
  always #60 epa_clk_in = ~epa_clk_in;   // 8.33 MHz host I/O bus clock

  assign fpa_data_in = fpa_ad_dma_en ? mem[fpa_ad_dma] : fpa_host_data;

  initial begin
    #20_000_000;
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

  // ---------------- FPA host ----------------
  task automatic fpa_io(input logic [15:0] port, input logic [15:0] d);
    @(negedge fpa_clk);
    fpa_ad_in = port; fpa_host_data = d;
    #1;
  endtask

  task automatic fpa_host_transfer(input logic [15:0] na, input logic [15:0] nd);
    fpa_io(16'h0301, na);
    mech[M_HOST_LATCH]++;
    check(!fpa_ad_out_en, "FPA bus released during address step");
    fpa_io(16'h0302, nd);
    check(fpa_ad_out_en && fpa_data_out_en && fpa_ad_out == na && fpa_data_out == nd,
          $sformatf("FPA host transfer %h/%h got %h/%h", na, nd, fpa_ad_out, fpa_data_out));
    mech[M_HOST_XFER]++;
    fpa_io(16'h0000, 16'h0000);
    model_lat = na;
  endtask

  // DMA over b..e; da is dropped for a few clocks at each listed access count.
  task automatic fpa_dma(input logic [15:0] b, input logic [15:0] e, input int pause_at[$]);
    logic [15:0] exp_a[$], exp_d[$];
    int accesses, cycles, k;
    for (int i = int'(b); i <= int'(e); i++) begin
      logic [15:0] a;
      a = 16'(i);
      if (a[0]) model_lat = mem[a];
      if (a[1]) begin exp_a.push_back(model_lat); exp_d.push_back(mem[a]); end
    end
    fpa_io(16'h0303, b);
    fpa_io(16'h0304, e);
    mech[M_POS_WRITE]++;
    @(negedge fpa_clk); fpa_ad_in = '0; fpa_da = 1'b1; #1;
    accesses = 0; cycles = 0; k = 0;
    while (k < 100_000) begin
      @(negedge fpa_clk);
      fpa_da = !(pause_at.size() > 0 && accesses == pause_at[0] && k % 7 != 0);
      if (fpa_da == 1'b0 && k % 7 == 6) begin void'(pause_at.pop_front()); mech[M_DMA_PAUSE]++; end
      #1;
      k++;
      if (fpa_ad_dma_en) begin
        if (accesses == 0) mech[M_DMA_START]++;
        check(fpa_da, "generator off the bus while da is low");
        check(fpa_ad_dma == 16'(int'(b) + accesses), "DMA address order");
        if (fpa_ad_dma[0]) mech[M_DMA_ADDR_WORD]++;
        accesses++;
        if (fpa_ad_out_en) begin
          mech[M_DMA_DATA_WORD]++;
          check(cycles < exp_a.size() && fpa_ad_out == exp_a[cycles] && fpa_data_out == exp_d[cycles],
                $sformatf("DMA new-bus cycle %0d got %h/%h", cycles, fpa_ad_out, fpa_data_out));
          cycles++;
        end
      end else if (fpa_da && accesses > 0) begin
        mech[M_DMA_END]++;
        break;
      end
    end
    fpa_da = 1'b0;
    check(accesses == int'(e) - int'(b) + 1, "every word of the area read once");
    check(cycles == exp_a.size(), "all expected new-bus cycles seen");
    check(2 * cycles == accesses, "new bus at half the memory access rate");
  endtask

  // ---------------- EPA host ----------------
  task automatic epa_io(input bit wr, input bit aen, input logic [11:0] port, input logic [7:0] d,
                        output bit drv, output logic [15:0] a_seen, output logic [7:0] d_seen,
                        output bit oe_seen);
    @(posedge epa_clk_in);
    epa_ad_in = port; epa_aen = aen; epa_data_in = d;
    @(negedge epa_clk_in);
    if (wr) epa_iow_n = 1'b0; else epa_ior_n = 1'b0;
    @(posedge epa_clk_in); #1;
    drv = epa_data_out_en; a_seen = epa_ad_out; d_seen = epa_data_out; oe_seen = epa_oe;
    @(negedge epa_clk_in);
    epa_iow_n = 1'b1; epa_ior_n = 1'b1;
    #1 check(!epa_oe && !epa_ad_out_en && !epa_data_out_en, "EPA new bus released after strobe");
  endtask

  task automatic epa_run();
    bit drv, oe_seen;
    logic [15:0] a_seen, na;
    logic [7:0] d_seen, d;
    for (int r = 0; r < 40; r++) begin
      na = (r == 0) ? 16'hFFFF : (r == 1) ? 16'h0000 : 16'($urandom);
      epa_io(1, 0, 12'h301, na[7:0], drv, a_seen, d_seen, oe_seen);
      check(!drv && !oe_seen, "EPA no drive on low address byte");
      mech[M_EPA_LATCH_LO]++;
      epa_io(1, 0, 12'h303, na[15:8], drv, a_seen, d_seen, oe_seen);
      check(!drv && !oe_seen, "EPA no drive on high address byte");
      mech[M_EPA_LATCH_HI]++;
      epa_io(1, 1, 12'h303, 8'($urandom), drv, a_seen, d_seen, oe_seen);
      check(!drv && !oe_seen, "EPA AEN cycle ignored");
      mech[M_EPA_AEN_IGNORED]++;
      d = 8'($urandom);
      epa_io(1, 0, 12'h302, d, drv, a_seen, d_seen, oe_seen);
      check(drv && oe_seen && a_seen == na && d_seen == d,
            $sformatf("EPA write %h/%h got %h/%h", na, d, a_seen, d_seen));
      mech[M_EPA_WRITE]++;
      epa_io(0, 0, 12'h302, 8'h00, drv, a_seen, d_seen, oe_seen);
      check(!drv && oe_seen && a_seen == na, "EPA read: oe and address only");
      mech[M_EPA_READ]++;
    end
    check(epa_clk_out == epa_clk_in, "EPA clock repeated");
  endtask

  initial begin
    int none[$];
    fpa_rst_n = 1'b0; fpa_da = 1'b0; fpa_ad_in = '0; fpa_host_data = '0;
    epa_ad_in = '0; epa_aen = 1'b0; epa_data_in = '0; epa_ior_n = 1'b1; epa_iow_n = 1'b1;
    for (int i = 0; i < 65536; i++) mem[i] = 16'($urandom);
    // Words that make new-bus addresses at both ends of the 64K space.
    mem[16'h4001] = 16'h0000;
    mem[16'h4005] = 16'hFFFF;
    repeat (3) @(negedge fpa_clk);
    fpa_rst_n = 1'b1;

    fork
      begin
        for (int r = 0; r < 20; r++) fpa_host_transfer(16'($urandom), 16'($urandom));
        fpa_dma(16'h4000, 16'h40FF, '{40, 150});
        fpa_dma(16'hFF00, 16'hFFFF, none);
        fpa_host_transfer(16'hFFFF, 16'h0001);
      end
      epa_run();
    join

    foreach (mech[m]) begin
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end
    end
    $display("mechanisms: %p", mech);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
