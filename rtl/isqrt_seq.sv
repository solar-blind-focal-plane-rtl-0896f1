// Sequential integer square root, one result bit per clock.
//
// Computes root = floor(sqrt(rad)) by the restoring digit-by-digit method: each
// step brings down two radicand bits and tries to subtract (4*root + 1) from
// the partial remainder. `start` loads the radicand; `done` pulses W/2
// clock cycles later with the result held on `root` until the next start.
// Used by the calculation circuit for the object speed.
module isqrt_seq #(
  parameter int unsigned W = 36   // radicand width, even
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   rad,
  output logic           done,
  output logic [W/2-1:0] root
);

  localparam int unsigned STEPS = W / 2;

  logic [W-1:0]           r_sh;   // radicand bits not yet used
  logic [W/2+1:0]         rem;    // partial remainder, at most 2*root
  logic [$clog2(STEPS+1)-1:0] cnt;
  logic                   run;
  logic [W/2+3:0]         rem_next;
  logic [W/2+3:0]         trial;

  always_comb begin
    rem_next = {rem, r_sh[W-1 -: 2]};
    trial    = {2'b00, root, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_sh <= '0;
      rem  <= '0;
      root <= '0;
      cnt  <= '0;
      run  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        r_sh <= rad;
        rem  <= '0;
        root <= '0;
        cnt  <= '0;
        run  <= 1'b1;
      end else if (run) begin
        r_sh <= r_sh << 2;
        if (rem_next >= trial) begin
          rem  <= (W/2+2)'(rem_next - trial);
          root <= {root[W/2-2:0], 1'b1};
        end else begin
          rem  <= (W/2+2)'(rem_next);
          root <= {root[W/2-2:0], 1'b0};
        end
        if (cnt == ($clog2(STEPS+1))'(STEPS - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
