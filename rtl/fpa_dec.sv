// fpa_dec: address decoder of the Fast Physical Addressing interface.
//
// It works in two modes, chosen by CE from the address generator:
//  * CE = 0 (host mode): the host addresses four I/O ports. 0x301 opens the
//    address latch (s1), 0x302 enables the new-bus buffers (s2), 0x303 and
//    0x304 tell the address generator to record the DMA begin (db) and end
//    (de) positions.
//  * CE = 1 (DMA mode): the address generator walks the memory area, and the
//    two lowest address bits say what each word is: bit 0 opens the address
//    latch (the word is a new-bus address), bit 1 enables the buffers (the
//    word is new-bus data). db and de stay low.
// The decode equations are the document's, for a 16-bit address. For a wider
// system address bus (AW > 16, e.g. the 32-bit row of the document's
// characteristics table) the host ports are compared with all AW bits, so
// they still occupy only four addresses; that widening and the packed select
// struct are this design's own. Purely combinational.
module fpa_dec
  import pa_pkg::*;
#(
  parameter int unsigned AW = DEC_AW  // system address width, at least 2
) (
  input  logic              ce,
  input  logic [AW-1:0]     a,
  output logic              s1,
  output logic              s2,
  output logic              db,
  output logic              de
);

  fpa_sel_t sel;

  always_comb begin
    sel.s1 = (!ce && a == AW'(FPA_PORT_ADDR))  || (ce && a[0]);
    sel.s2 = (!ce && a == AW'(FPA_PORT_DATA))  || (ce && a[1]);
    sel.db =  !ce && a == AW'(FPA_PORT_BEGIN);
    sel.de =  !ce && a == AW'(FPA_PORT_END);
  end

  assign s1 = sel.s1;
  assign s2 = sel.s2;
  assign db = sel.db;
  assign de = sel.de;

endmodule
