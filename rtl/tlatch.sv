// tlatch: multi-bit transparent data latch with an active-high gate, the
// LD8/LD16 element of both interfaces.
//
// While g is high q follows d; when g falls, q keeps the last value of d.
// The interfaces drive g straight from an address decode, so the new-bus
// address is captured when the host (or the DMA address generator) moves off
// the latch's port address. This is a level-sensitive latch on purpose: it is
// the storage element of the original schematic, so the latch that the lint
// and synthesis tools report here is intended. (When the gate is an
// expression in the parent, Verilator's lint may instead say it found no
// latch; synthesis still maps the block to latch cells.)
// Interface: g (gate), d (data in), q (data out). No clock, no reset: q is
// undefined until the first time g is high.
module tlatch #(
  parameter int unsigned W = 16
) (
  input  logic         g,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_latch begin
    if (g) q = d;
  end

endmodule
