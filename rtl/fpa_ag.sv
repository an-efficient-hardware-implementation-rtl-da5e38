// fpa_ag: DMA address generator of the Fast Physical Addressing interface.
//
// The host software first writes the begin and end positions of a memory
// area to two I/O ports; the decoder turns those writes into db and de, and
// the generator records data_in on the clock edge where each strobe is high.
// Once both positions are recorded the generator is armed. It takes the
// system address bus when da (DMA allowed, from the host side) is high:
// ce rises and dma_ad walks from begin to end, one address per clock, each
// address being one memory access. After the end address has been on the
// bus for one clock, ce falls, both positions are forgotten and the
// generator waits for a new pair.
// Dropping da pauses the transfer: ce falls at once (the host gets its bus
// back) and the next address is kept until da returns. This is how the
// software starts and stops the DMA.
//
// The document gives this block's ports and its function, not its insides:
// the state held, the use of da as an allow/pause input, the reset, the
// one-clock start latency and counting upwards (wrapping past the top of the
// address space if end < begin) are this design's choices.
//
// Timing: begin/end captured at the rising clk edge with db/de high; the
// first DMA address appears on dma_ad (ce = 1) the clock after the generator
// is armed with da high; then one address per clock.
module fpa_ag #(
  parameter int unsigned AW = 16,  // system address bus width
  parameter int unsigned DW = 16   // system data bus width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          da,
  input  logic [DW-1:0] data_in,
  input  logic          db,
  input  logic          de,
  output logic          ce,
  output logic [AW-1:0] dma_ad
);

  logic [AW-1:0] begin_q, end_q, addr_q;
  logic          have_begin_q, have_end_q, active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      begin_q      <= '0;
      end_q        <= '0;
      addr_q       <= '0;
      have_begin_q <= 1'b0;
      have_end_q   <= 1'b0;
      active_q     <= 1'b0;
    end else begin
      if (!active_q) begin
        if (have_begin_q && have_end_q && da) begin
          active_q <= 1'b1;
          addr_q   <= begin_q;
        end
      end else if (da) begin
        if (addr_q == end_q) begin
          active_q     <= 1'b0;
          have_begin_q <= 1'b0;
          have_end_q   <= 1'b0;
        end else begin
          addr_q <= addr_q + 1'b1;
        end
      end
      // A position written by the host wins over the end-of-transfer clear.
      if (db) begin
        begin_q      <= AW'(data_in);
        have_begin_q <= 1'b1;
      end
      if (de) begin
        end_q      <= AW'(data_in);
        have_end_q <= 1'b1;
      end
    end
  end

  assign ce     = active_q && da;
  assign dma_ad = addr_q;

  // The host cannot write the position ports while the generator owns the bus.
  a_no_strobe_in_dma: assert property (@(posedge clk) ce |-> !(db || de))
    else $error("fpa_ag: db/de while the generator drives the bus");

endmodule
