// epa_bridge: the Extended Physical Addressing interface on an 8-bit ISA-style
// I/O bus (one complete card).
//
// A new bus with a 16-bit address and 8-bit data is opened behind three
// host I/O ports. A transfer takes two steps:
//  1. The host writes the new-bus address as data. A write to port 0x301
//     opens the low byte of the LD8 address latch pair, a write to 0x303 the
//     high byte. The new-bus buffers stay off (bus released).
//  2. The host writes the data to port 0x302: both BUFE8 stages turn on, the
//     new-bus data equals the system data bus and the new-bus address equals
//     the latched word.
// Decodes are qualified by AEN low (no host DMA cycle in progress) and by
// the active-low I/O strobes. oe is the new bus's cycle strobe: high for a
// write to 0x302 and also for a read of 0x302, in which case the external
// device answers on the system data bus itself while the interface's write
// buffers stay off. clk_out repeats the host clock for the new bus.
//
// The two-step port protocol, the 12-bit host address, the 16-bit new-bus
// address, the latch and buffer parts follow the document. Using 0x303 for
// the high address byte, the active-low strobes, the read use of oe and the
// two-state (value, enable) form of the 3-state outputs are this design's
// choices. Purely combinational apart from the level-sensitive latches,
// which are intended (see tlatch).
module epa_bridge
  import pa_pkg::*;
#(
  parameter int unsigned HAW = 12  // host I/O address width (<= DEC_AW)
) (
  // system bus
  input  logic [HAW-1:0] ad_in,
  input  logic           aen,
  input  logic [7:0]     data_in,
  input  logic           ior_n,
  input  logic           iow_n,
  input  logic           clk_in,
  // new bus
  output logic           oe,
  output logic [7:0]     data_out,
  output logic           data_out_en,
  output logic [15:0]    ad_out,
  output logic           ad_out_en,
  output logic           clk_out
);

  logic              s1, s2, s3;
  logic              wr, rd;
  logic [15:0]       addr_latched;
  logic [DEC_AW-1:0] a16;

  assign a16 = DEC_AW'(ad_in);

  epa_dec u_dec (
    .a  (a16),
    .s1 (s1),
    .s2 (s2),
    .s3 (s3)
  );

  assign wr = !aen && !iow_n;
  assign rd = !aen && !ior_n;

  tlatch #(.W(8)) u_ld_lo (
    .g (s1 && wr),
    .d (data_in),
    .q (addr_latched[7:0])
  );

  tlatch #(.W(8)) u_ld_hi (
    .g (s3 && wr),
    .d (data_in),
    .q (addr_latched[15:8])
  );

  bufe #(.W(8)) u_buf_data (
    .en   (s2 && wr),
    .a    (data_in),
    .y    (data_out),
    .y_en (data_out_en)
  );

  bufe #(.W(16)) u_buf_addr (
    .en   (s2 && (wr || rd)),
    .a    (addr_latched),
    .y    (ad_out),
    .y_en (ad_out_en)
  );

  assign oe      = s2 && (wr || rd);
  assign clk_out = clk_in;

endmodule
