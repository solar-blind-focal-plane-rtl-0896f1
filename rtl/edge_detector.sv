// Behavioural model of the focal-plane edge detector (an analog pixel circuit).
//
// The real circuit sits under the photodiode array and mimics the outer retina:
// each photodetector P feeds a horizontal cell H, the H cells form a resistive
// network that smooths the photocurrents, a bipolar cell B takes the difference
// P - H, and a digitizing cell DG compares B with a threshold current I_th. DG
// gives 0 at an edge and 1 everywhere else, so the array delivers a binary image
// with one wire per pixel.
//
// This model works on digitized photocurrents `photo` (PW bits per pixel). H is
// taken as the mean of the 3 x 3 neighbourhood, outside the array counting as
// dark; B is kept scaled by 9 as 8*P minus the sum of the eight neighbours, so a
// bright pixel next to a darker one gives a positive B. A pixel is an edge
// (dg = 0) when B > ITH. The result is the bright side of the object outline.
// The output follows the inputs combinationally, like the continuous-time
// circuit.
//
// P, H, B, DG, the subtraction, the threshold and the 0-at-edge output follow the
// design; the neighbourhood, the scaling, the zero padding and the threshold
// value are this model's own choices.
module edge_detector #(
  parameter int unsigned ROWS = 250,
  parameter int unsigned COLS = 250,
  parameter int unsigned PW   = 8,
  parameter int          ITH  = 128
) (
  input  logic [PW-1:0]   photo [ROWS][COLS],
  output logic [COLS-1:0] dg    [ROWS]
);

  localparam int unsigned BW = PW + 5;

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        logic signed [BW-1:0] b;
        b = BW'(8 * int'(photo[r][c]));
        for (int dr = -1; dr <= 1; dr++) begin
          for (int dc = -1; dc <= 1; dc++) begin
            if ((dr != 0 || dc != 0) && r + dr >= 0 && r + dr < ROWS &&
                c + dc >= 0 && c + dc < COLS)
              b = b - BW'(photo[r+dr][c+dc]);
          end
        end
        dg[r][c] = !(int'(b) > ITH);
      end
    end
  end

endmodule
