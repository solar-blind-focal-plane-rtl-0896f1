// Shared types and constants of the solar-blind UV motion sensor.
//
// The sensor turns a binary edge image into four edge positions (RV, FV, RH, FH)
// and from them into object information (location, velocity, speed, direction,
// size, spreading status). This package holds the records passed between the
// stages and the spreading-status encoding. Field widths are sized for images of
// up to 255 x 255 pixels; positions run from 0 to the image width, because a
// falling edge may sit one past the last column.
package uvs_pkg;

  // Width of one edge position (0 .. 255).
  localparam int unsigned POS_W = 8;
  // Signed width of a velocity in pixel/s (|v| <= 255 * 255).
  localparam int unsigned VEL_W = 18;

  // Four edge positions of one frame. RV/FV come from the vertical projection
  // (one bit per column), RH/FH from the horizontal projection (one bit per row).
  // FV and FH point one past the last set bit, so FV - RV is the object width.
  typedef struct packed {
    logic             present;  // some pixel of the image is set
    logic [POS_W-1:0] rv;
    logic [POS_W-1:0] fv;
    logic [POS_W-1:0] rh;
    logic [POS_W-1:0] fh;
  } edges_t;

  // Object size change between two consecutive frames.
  typedef enum logic [1:0] {
    SPREAD_UNCHANGED = 2'd0,
    SPREAD_BIGGER    = 2'd1,
    SPREAD_SMALLER   = 2'd2,
    SPREAD_LOST      = 2'd3
  } spread_t;

  // Result of the calculation circuit for one frame.
  typedef struct packed {
    logic                    present;
    logic [POS_W-1:0]        ox;      // (RV + FV) / 2, pixels
    logic [POS_W-1:0]        oy;      // (RH + FH) / 2, pixels
    logic signed [VEL_W-1:0] vx;      // pixel/s
    logic signed [VEL_W-1:0] vy;      // pixel/s
    logic [VEL_W-1:0]        op;      // speed sqrt(vx^2 + vy^2), pixel/s
    logic [8:0]              od;      // direction atan2(vy, vx), degrees 0..359
    logic [2*POS_W-1:0]      oz;      // size (FV - RV) * (FH - RH), pixel^2
    spread_t                 spread;
  } info_t;

endpackage
