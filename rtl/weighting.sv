// Weighting circuit for one projection.
//
// Gives each edge mark its position counted from the leftmost side (position 0).
// Only the outer boundary is kept: `r_pos` is the position of the first rising
// mark and `f_pos` that of the last falling mark, so several fragments are
// treated as one large object. `found` is 0 when the projection holds no
// object; both positions are then 0. Purely combinational.
//
// Numbering from the leftmost side follows the design; keeping the outermost
// marks and reporting 0 for an empty projection are this design's choices.
module weighting #(
  parameter int unsigned N = 250,
  parameter int unsigned W = 8
) (
  input  logic [N-1:0] rise,
  input  logic [N:0]   fall,
  output logic         found,
  output logic [W-1:0] r_pos,
  output logic [W-1:0] f_pos
);

  always_comb begin
    found = |rise;
    r_pos = '0;
    f_pos = '0;
    for (int i = N - 1; i >= 0; i--) if (rise[i]) r_pos = W'(i);
    for (int i = 0; i <= N; i++)     if (fall[i]) f_pos = W'(i);
  end

endmodule
