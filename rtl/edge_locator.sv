// Edge locator for one projection.
//
// Marks where the projection switches from 0 to 1 (`rise`) and from 1 to 0
// (`fall`), treating the positions just outside the projection as 0. A rising
// mark sits on the first set position of a run; a falling mark sits on the first
// clear position after it, so `fall` has one more bit than the projection
// (position N means "the run reaches the last position"). Purely combinational.
//
// That the locator yields one row of rising and one row of falling marks follows
// the design; where the falling mark is placed is this design's reading of it.
module edge_locator #(
  parameter int unsigned N = 250
) (
  input  logic [N-1:0] proj,
  output logic [N-1:0] rise,
  output logic [N:0]   fall
);

  logic [N+1:0] p;   // projection padded with a 0 on both sides

  assign p = {1'b0, proj, 1'b0};

  always_comb begin
    for (int i = 0; i < N; i++)  rise[i] = p[i+1] & ~p[i];
    for (int i = 0; i <= N; i++) fall[i] = ~p[i+1] & p[i];
  end

endmodule
