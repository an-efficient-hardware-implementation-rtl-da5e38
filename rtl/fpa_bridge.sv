// fpa_bridge: the Fast Physical Addressing interface (one complete card).
//
// The interface turns words of host memory into cycles on a new bus with its
// own address and data lines, so the host needs only four I/O ports however
// large the new bus's address space is (2^DW addresses). It is built from
// the document's parts:
//   fpa_dec  address decoder (host mode / DMA mode, chosen by ce)
//   fpa_ag   DMA address generator
//   tlatch   LD16, holds the new-bus address
//   bufe x2  BUFE16, drive the new-bus address and data
// Host mode (ce = 0): the host writes a new-bus address to port 0x301 (the
// latch is open while that address is on the bus), then data to port 0x302
// (both buffers on: new-bus address = latched word, new-bus data = data_in).
// DMA mode: after begin/end are written to 0x303/0x304 and da is high, the
// generator drives the system address bus (ad_dma, ad_dma_en = ce) and the
// memory returns a word per address on data_in. Address bit 0 makes the word
// a new-bus address, bit 1 new-bus data, so an (address, data) pair costs two
// memory accesses and the new bus runs at Fn = 1/(2*Ta) for access time Ta.
//
// The document's AD port is bidirectional (the host drives it, or the
// generator during DMA). Here it is split into ad_in (the host's address)
// and ad_dma/ad_dma_en (the generator's drive); the decoder sees whichever
// owns the bus. The 3-state outputs are in two-state form (value, enable);
// the rst_n input is this design's addition. The latch is level-sensitive
// by design (see tlatch), and the DMA path is for memory reads only: the
// document's ports carry data one way, from the host to the new bus.
module fpa_bridge
  import pa_pkg::*;
#(
  parameter int unsigned AW = 16,  // system address bus width (>= 12, to hold ports 0x301..0x304)
  parameter int unsigned DW = 16   // system data bus = new-bus data and address width
) (
  input  logic          clk,
  input  logic          rst_n,
  // system bus
  input  logic [AW-1:0] ad_in,      // address driven by the host
  output logic [AW-1:0] ad_dma,     // address driven by the DMA generator
  output logic          ad_dma_en,  // generator owns the system address bus (CE)
  input  logic [DW-1:0] data_in,
  input  logic          da,         // DMA allowed
  // new bus
  output logic [DW-1:0] data_out,
  output logic          data_out_en,
  output logic [DW-1:0] ad_out,
  output logic          ad_out_en
);

  logic          ce, s1, s2, db, de;
  logic [AW-1:0] dma_ad, a_bus;
  logic [DW-1:0] addr_latched;

  // The system address bus as the decoder sees it.
  assign a_bus = ce ? dma_ad : ad_in;

  fpa_dec #(.AW(AW)) u_dec (
    .ce (ce),
    .a  (a_bus),
    .s1 (s1),
    .s2 (s2),
    .db (db),
    .de (de)
  );

  fpa_ag #(.AW(AW), .DW(DW)) u_ag (
    .clk     (clk),
    .rst_n   (rst_n),
    .da      (da),
    .data_in (data_in),
    .db      (db),
    .de      (de),
    .ce      (ce),
    .dma_ad  (dma_ad)
  );

  tlatch #(.W(DW)) u_ld (
    .g (s1),
    .d (data_in),
    .q (addr_latched)
  );

  bufe #(.W(DW)) u_buf_data (
    .en   (s2),
    .a    (data_in),
    .y    (data_out),
    .y_en (data_out_en)
  );

  bufe #(.W(DW)) u_buf_addr (
    .en   (s2),
    .a    (addr_latched),
    .y    (ad_out),
    .y_en (ad_out_en)
  );

  assign ad_dma    = ce ? dma_ad : '0;
  assign ad_dma_en = ce;

endmodule
