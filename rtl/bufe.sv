// bufe: multi-bit 3-state buffer with an active-high enable, the BUFE8/BUFE16
// element of both interfaces.
//
// The new bus is shared with the external device, so the interface drives
// it only while the decoder enables the buffer. The buffer is written in
// two-state form: y carries the driven value and y_en says whether it is
// driven. When y_en is low the bus is released (high impedance on a real
// board) and y reads as zero, so that a released bus can never be mistaken
// for a driven one. A board-level wrapper turns (y, y_en) into a tri-state pad.
// Purely combinational.
module bufe #(
  parameter int unsigned W = 16
) (
  input  logic         en,
  input  logic [W-1:0] a,
  output logic [W-1:0] y,
  output logic         y_en
);

  always_comb begin
    y    = en ? a : '0;
    y_en = en;
  end

endmodule
