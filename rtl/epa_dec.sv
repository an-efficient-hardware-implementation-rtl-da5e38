// epa_dec: address decoder of the Extended Physical Addressing interface.
//
// Compares the host address with three I/O ports: 0x301 (S1) and 0x302 (S2)
// as in the document, and 0x303 (S3). S1 and S3 open the low and high bytes
// of the 16-bit new-bus address latch; S2 enables the new-bus buffers. Giving
// S3 to the high address byte is this design's choice: an 8-bit host data
// bus needs two writes to set a 16-bit new-bus address.
// Purely combinational; qualification with AEN and the I/O strobes is done
// in epa_bridge.
module epa_dec
  import pa_pkg::*;
(
  input  logic [DEC_AW-1:0] a,
  output logic              s1,
  output logic              s2,
  output logic              s3
);

  always_comb begin
    s1 = (a == EPA_PORT_ADDR_LO);
    s2 = (a == EPA_PORT_DATA);
    s3 = (a == EPA_PORT_ADDR_HI);
  end

endmodule
