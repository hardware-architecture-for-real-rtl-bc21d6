// cordic_atan2: iterative vectoring CORDIC giving the phase atan2(y, x).
//
// The vector (x, y) is first turned into the right half plane by a rotation
// of +-pi/2 (the angle register starts at +-pi/2), then ITER micro-rotations
// by +-atan(2^-i) drive y towards zero while the angle register accumulates
// the rotation. Only shifts, adds and a small arctangent table
// (round(atan(2^-i) * 2^12), computed at elaboration) are used.
// Interface: `start` with x, y loads a new vector when `ready`; `done` pulses
// with `phase` (signed Q3.12 radians, -pi..pi) ITER clocks after the edge
// that took `start`. `ready` is also high in the last iteration clock, so a
// unit can take a new vector every ITER clocks.
// Using a CORDIC for the arctangent follows the document; the iterative
// structure, ITER and the angle format are this design's choices.
module cordic_atan2 #(
  parameter int XW      = 24,
  parameter int PH_W    = fc_pkg::PH_W,
  parameter int PH_FRAC = fc_pkg::PH_FRAC,
  parameter int ITER    = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic signed [XW-1:0]   x,
  input  logic signed [XW-1:0]   y,
  output logic                   ready,
  output logic                   done,
  output logic signed [PH_W-1:0] phase
);
  localparam int IW = XW + 2;   // room for the CORDIC gain (1.65)
  localparam int ZW = PH_W + 1;
  localparam int IB = $clog2(ITER);

  typedef logic signed [ZW-1:0] z_t;
  typedef z_t ztab_t [ITER];

  function automatic ztab_t mk_atan();
    ztab_t t;
    real a;
    for (int i = 0; i < ITER; i++) begin
      a = $atan(1.0 / (2.0 ** i)) * (2.0 ** PH_FRAC);
      t[i] = z_t'($rtoi(a + 0.5));
    end
    return t;
  endfunction
  localparam ztab_t ATAN = mk_atan();
  localparam z_t HALF_PI = z_t'($rtoi(1.5707963267948966 * (2.0 ** PH_FRAC) + 0.5));

  logic signed [IW-1:0] xr, yr;
  z_t                   zr;
  logic [IB-1:0]        it;
  logic                 busy;

  assign ready = !busy || (it == IB'(ITER - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; it <= '0;
      xr <= '0; yr <= '0; zr <= '0; phase <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (yr >= 0) begin
          xr <= xr + (yr >>> it);
          yr <= yr - (xr >>> it);
          zr <= zr + ATAN[it];
        end else begin
          xr <= xr - (yr >>> it);
          yr <= yr + (xr >>> it);
          zr <= zr - ATAN[it];
        end
        if (it == IB'(ITER - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          phase <= PH_W'((yr >= 0) ? zr + ATAN[it] : zr - ATAN[it]);
        end
        it <= it + 1'b1;
      end
      if (start && ready) begin
        busy <= 1'b1;
        it   <= '0;
        if (x >= 0) begin
          xr <= IW'(x); yr <= IW'(y); zr <= '0;
        end else if (y >= 0) begin     // rotate by -pi/2
          xr <= IW'(y); yr <= -IW'(x); zr <= HALF_PI;
        end else begin                 // rotate by +pi/2
          xr <= -IW'(y); yr <= IW'(x); zr <= -HALF_PI;
        end
      end
    end
  end
endmodule
