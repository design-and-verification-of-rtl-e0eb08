// Funnel shifter: the alignment core of the bit movement engine.
// It concatenates two adjacent source words {hi, lo} into a 2W-bit value,
// shifts it right by sh bit positions and returns the low W bits. Feeding it
// consecutive source words lets the engine realign a bit stream that starts
// at any source offset to any destination offset, one output word per call.
// Purely combinational. The document names a funnel shifter as the core of
// the engine; the width parameter and the right-shift orientation (bit 0 of
// a word is the lowest bit address) are this design's choice.
module funnel_shifter #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         hi,
  input  logic [W-1:0]         lo,
  input  logic [$clog2(W)-1:0] sh,
  output logic [W-1:0]         y
);
  logic [2*W-1:0] cat;
  logic [2*W-1:0] shifted;

  always_comb begin
    cat     = {hi, lo};
    shifted = cat >> sh;
    y       = shifted[W-1:0];
  end
endmodule
