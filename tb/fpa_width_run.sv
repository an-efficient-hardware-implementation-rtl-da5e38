// fpa_width_run: test sequence for one fpa_bridge configuration, used by
// tb_fpa_widths to run the characteristics table's bus widths.
// It plays host-mode transfers to the first and last new-bus addresses
// (0 and 2^DW - 1) and random ones, then a DMA transfer over a 256-word area
// (placed at the top of the address space where the DW-bit begin/end
// positions can reach it), checking each new-bus cycle against a model of
// the memory layout and the rate of one new-bus cycle per two memory
// accesses. Results come out on checks/failures when done rises.
module fpa_width_run #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned WIN = 256;
  logic          clk = 1'b0, rst_n, da, ad_dma_en, data_out_en, ad_out_en;
  logic [AW-1:0] ad_in, ad_dma, win_base;
  logic [DW-1:0] data_in, host_data, data_out, ad_out, model_lat;
  logic [DW-1:0] win [0:WIN-1];

  fpa_bridge #(.AW(AW), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .ad_in(ad_in), .ad_dma(ad_dma), .ad_dma_en(ad_dma_en),
    .data_in(data_in), .da(da), .data_out(data_out), .data_out_en(data_out_en),
    .ad_out(ad_out), .ad_out_en(ad_out_en)
  );

  always #5 clk = ~clk;

  // Memory window of WIN words at win_base; outside it the memory reads zero.
  always_comb begin
    if (!ad_dma_en)                      data_in = host_data;
    else if (ad_dma - win_base < AW'(WIN)) data_in = win[8'(ad_dma - win_base)];
    else                                 data_in = '0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("AW=%0d DW=%0d %0t FAIL %s", AW, DW, $time, what);
    end
  endtask

  task automatic io(input logic [AW-1:0] port, input logic [DW-1:0] d);
    @(negedge clk);
    ad_in = port; host_data = d;
    #1;
  endtask

  task automatic host_transfer(input logic [DW-1:0] na, input logic [DW-1:0] nd);
    io(AW'(16'h0301), na);
    io(AW'(16'h0302), nd);
    check(ad_out_en && data_out_en && ad_out == na && data_out == nd,
          $sformatf("host transfer %h/%h got %h/%h", na, nd, ad_out, data_out));
    io('1, ~nd);   // an unrelated address (all ones) must release the bus
    check(!ad_out_en && !data_out_en, "bus released on other addresses");
    model_lat = na;
  endtask

  initial begin
    logic [AW-1:0] b, e;
    logic [DW-1:0] exp_a[$], exp_d[$];
    int accesses, cycles;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; da = 1'b0; ad_in = '0; host_data = '0;
    for (int i = 0; i < int'(WIN); i++) win[i] = DW'({$urandom, $urandom});
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    check($bits(ad_out) == DW, "new-bus address width gives 2^DW addresses");
    host_transfer('0, DW'($urandom));
    host_transfer('1, DW'($urandom));
    for (int r = 0; r < 10; r++) host_transfer(DW'({$urandom, $urandom}), DW'({$urandom, $urandom}));

    // DMA area: the top WIN words that a DW-bit position can name.
    e = (DW >= AW) ? '1 : AW'({DW{1'b1}});
    b = e - AW'(WIN - 1);
    win_base = b;
    win[1] = '0;  // make the first latched new-bus address 0 ...
    win[5] = '1;  // ... and a later one 2^DW - 1
    for (int i = 0; i < int'(WIN); i++) begin
      logic [AW-1:0] a;
      a = b + AW'(i);
      if (a[0]) model_lat = win[i];
      if (a[1]) begin exp_a.push_back(model_lat); exp_d.push_back(win[i]); end
    end
    io(AW'(16'h0303), DW'(b));
    io(AW'(16'h0304), DW'(e));
    @(negedge clk); ad_in = '0; da = 1'b1;
    accesses = 0; cycles = 0;
    for (int k = 0; k < 4 * int'(WIN); k++) begin
      @(negedge clk); #1;
      if (ad_dma_en) begin
        check(ad_dma == b + AW'(accesses), "DMA address order");
        accesses++;
        if (ad_out_en) begin
          check(cycles < exp_a.size() && ad_out == exp_a[cycles] && data_out == exp_d[cycles],
                $sformatf("DMA new-bus cycle %0d got %h/%h", cycles, ad_out, data_out));
          cycles++;
        end
      end else if (accesses > 0) break;
    end
    da = 1'b0;
    check(accesses == int'(WIN), "whole area read");
    check(cycles == exp_a.size() && 2 * cycles == accesses, "one new-bus cycle per two accesses");
    done = 1'b1;
  end
endmodule
