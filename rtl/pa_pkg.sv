// pa_pkg: constants shared by the Extended (EPA) and Fast (FPA) Physical
// Addressing interfaces.
//
// Both interfaces sit on the host's I/O space and take only a handful of
// port addresses there, whatever size of address space they open on the new
// bus. The port numbers are the ones the two address decoders compare
// against: 0x301 and 0x302 for both interfaces, plus 0x303 in the EPA (high
// byte of the new-bus address, this design's choice) and 0x303/0x304 in the
// FPA (begin and end positions of the DMA area).
package pa_pkg;

  // Width of the host address compared by both decoders.
  localparam int unsigned DEC_AW = 16;

  // Extended Physical Addressing ports.
  localparam logic [DEC_AW-1:0] EPA_PORT_ADDR_LO = 16'h0301; // latch new-bus address, low byte
  localparam logic [DEC_AW-1:0] EPA_PORT_DATA    = 16'h0302; // data transfer: buffers on
  localparam logic [DEC_AW-1:0] EPA_PORT_ADDR_HI = 16'h0303; // latch new-bus address, high byte

  // Fast Physical Addressing ports (host mode, CE = 0).
  localparam logic [DEC_AW-1:0] FPA_PORT_ADDR  = 16'h0301; // latch new-bus address
  localparam logic [DEC_AW-1:0] FPA_PORT_DATA  = 16'h0302; // data transfer: buffers on
  localparam logic [DEC_AW-1:0] FPA_PORT_BEGIN = 16'h0303; // DMA begin position
  localparam logic [DEC_AW-1:0] FPA_PORT_END   = 16'h0304; // DMA end position

  // Select lines produced by the FPA decoder.
  typedef struct packed {
    logic s1;  // open the address latch
    logic s2;  // enable the new-bus buffers
    logic db;  // record DMA begin position
    logic de;  // record DMA end position
  } fpa_sel_t;

endpackage
