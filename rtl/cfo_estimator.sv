// CFO estimator.
//
// Turns one auto-correlation result A = sum r(m) * conj(r(m+1)) into the
// per-sample phase increment that cancels the carrier-frequency offset.
// A CFO of f rotates A by -2*pi*f*N*T, so the compensating phase step per
// sample is angle(A)/N. The angle is found by an iterative CORDIC in
// vectoring mode (one micro-rotation per enabled cycle, ITER iterations,
// angle word of ANGLE_WP bits with 2^ANGLE_WP = 2*pi); the division by N is
// a multiplication by a rounded reciprocal. Vectors in the left half-plane
// are first turned by pi.
//
// Interface: start latches ac_in (any cycle); ITER+1 enabled (ce) cycles later
// done pulses for one cycle with angle (A's phase) and phase_inc (signed,
// 2^PHASE_WP = 2*pi per sample) valid and held until the next start.
//
// The arctangent formula is the design's; the
// CORDIC, its widths and the reciprocal are choices of this implementation.
module cfo_estimator
  import sync_pkg::*;
#(
  parameter int N_P      = N,
  parameter int ITER     = 12,
  parameter int ANGLE_WP = ANGLE_W,
  parameter int PHASE_WP = PHASE_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ce,
  input  logic                       start,
  input  ac_result_t                 ac_in,
  output logic                       done,
  output logic signed [ANGLE_WP-1:0] angle,
  output logic signed [PHASE_WP-1:0] phase_inc
);

  localparam int XW = AC_W + 11;           // headroom for CORDIC gain and pre-scaling
  localparam int RSH = 13;                 // reciprocal precision
  localparam longint RECIP = ((64'sd1 <<< (PHASE_WP - ANGLE_WP + RSH)) + 64'(N_P/2)) / 64'(N_P);

  typedef logic signed [ANGLE_WP-1:0] atan_t [ITER];

  function automatic atan_t make_atan();
    atan_t t;
    real   pi;
    pi = 3.14159265358979323846;
    for (int i = 0; i < ITER; i++)
      t[i] = ANGLE_WP'(int'($atan(1.0 / (2.0 ** i)) / (2.0 * pi) * (2.0 ** ANGLE_WP)));
    return t;
  endfunction

  localparam atan_t ATAN = make_atan();

  logic signed [XW-1:0]       x, y;
  logic signed [ANGLE_WP-1:0] z;
  logic [$clog2(ITER+1)-1:0]  it;
  logic                       busy;
  logic signed [63:0]         prod;

  assign prod = 64'(z) * RECIP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; it <= '0; busy <= 1'b0;
      done <= 1'b0; angle <= '0; phase_inc <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        // pre-scale by 2^8 for resolution; rotate left half-plane by pi
        if (ac_in.re < 0) begin
          x <= -(XW'(ac_in.re) <<< 8);
          y <= -(XW'(ac_in.im) <<< 8);
          z <= ANGLE_WP'(1) <<< (ANGLE_WP-1);
        end else begin
          x <= XW'(ac_in.re) <<< 8;
          y <= XW'(ac_in.im) <<< 8;
          z <= '0;
        end
        it   <= '0;
        busy <= 1'b1;
      end else if (busy && ce) begin
        if (int'(it) == ITER) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          angle     <= z;
          phase_inc <= PHASE_WP'((prod + (64'sd1 <<< (RSH-1))) >>> RSH);
        end else begin
          if (y >= 0) begin
            x <= x + (y >>> it);
            y <= y - (x >>> it);
            z <= z + ATAN[it];
          end else begin
            x <= x - (y >>> it);
            y <= y + (x >>> it);
            z <= z - ATAN[it];
          end
          it <= it + 1'b1;
        end
      end
    end
  end

endmodule
