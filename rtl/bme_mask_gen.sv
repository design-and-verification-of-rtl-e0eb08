// Mask generator for the destination word merge.
// For a destination word in which the moved field covers bit positions
// lo..hi (inclusive, lo <= hi), it produces the three masks the engine
// applies: keep_lo (old bits below the field), field (the new bits) and
// keep_hi (old bits above the field). The three masks are disjoint and
// together cover the word. Purely combinational.
// The three-mask split follows the document's corner case description; the
// shift-based construction is this design's choice.
module bme_mask_gen #(
  parameter int unsigned W = 32
) (
  input  logic [$clog2(W)-1:0] lo,
  input  logic [$clog2(W)-1:0] hi,
  output logic [W-1:0]         keep_lo,
  output logic [W-1:0]         field,
  output logic [W-1:0]         keep_hi
);
  localparam logic [W-1:0] ONES = '1;

  logic [W-1:0] from_lo;   // ones at positions >= lo
  logic [W-1:0] upto_hi;   // ones at positions <= hi

  always_comb begin
    from_lo = ONES << lo;
    upto_hi = ONES >> ($clog2(W)'(W - 1) - hi);
    field   = from_lo & upto_hi;
    keep_lo = ~from_lo;
    keep_hi = ~upto_hi;
  end
endmodule
