// cordic_unfolded: unfolded CORDIC array, parallel or pipelined.
//
// ITERATIONS processing elements (cordic_stage) are chained; element i
// performs iteration i with a wired shift and a hardwired angle, so the array
// needs neither variable shifters nor an angle ROM. Each element supports
// rotation mode (z driven to 0) and vectoring mode (y driven to 0), chosen
// per operation by `in_mode`, which travels with the data.
//
//   PIPELINED = 0  unfolded parallel: no registers at all, results are a
//                  combinational function of the inputs (clk/rst_n unused).
//   PIPELINED = 1  unfolded pipelined: a register after every element. A new
//                  operation can enter every clock; its result appears after
//                  ITERATIONS rising edges counting the edge that samples it
//                  (out_valid marks it).
//
// Results: rotation  xn = K (x0 cos z0 - y0 sin z0), yn = K (y0 cos z0 +
// x0 sin z0), zn = residual angle; vectoring (x0 > 0) xn = K sqrt(x0^2+y0^2),
// yn = residual, zn = z0 + atan(y0/x0). K and the formats: see cordic_pkg.
// The array and its two forms follow the source design; valid/mode signals
// are this design's choices.
module cordic_unfolded
  import cordic_pkg::*;
#(
  parameter int unsigned WIDTH      = cordic_pkg::DEFAULT_WIDTH,
  parameter int unsigned ITERATIONS = cordic_pkg::DEFAULT_ITERATIONS,
  parameter bit          PIPELINED  = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  cordic_mode_e            in_mode,
  input  logic signed [WIDTH-1:0] x0,
  input  logic signed [WIDTH-1:0] y0,
  input  logic signed [WIDTH-1:0] z0,
  output logic                    out_valid,
  output cordic_mode_e            out_mode,
  output logic signed [WIDTH-1:0] xn,
  output logic signed [WIDTH-1:0] yn,
  output logic signed [WIDTH-1:0] zn
);

  logic                    v [ITERATIONS+1];
  cordic_mode_e            m [ITERATIONS+1];
  logic signed [WIDTH-1:0] x [ITERATIONS+1];
  logic signed [WIDTH-1:0] y [ITERATIONS+1];
  logic signed [WIDTH-1:0] z [ITERATIONS+1];

  assign v[0] = in_valid;
  assign m[0] = in_mode;
  assign x[0] = x0;
  assign y[0] = y0;
  assign z[0] = z0;

  for (genvar i = 0; i < ITERATIONS; i++) begin : g_stage
    cordic_stage #(
      .WIDTH     (WIDTH),
      .STAGE     (i),
      .REGISTERED(PIPELINED)
    ) u_stage (
      .clk, .rst_n,
      .in_valid (v[i]),   .in_mode (m[i]),
      .x_in     (x[i]),   .y_in    (y[i]),   .z_in (z[i]),
      .out_valid(v[i+1]), .out_mode(m[i+1]),
      .x_out    (x[i+1]), .y_out   (y[i+1]), .z_out(z[i+1])
    );
  end

  assign out_valid = v[ITERATIONS];
  assign out_mode  = m[ITERATIONS];
  assign xn        = x[ITERATIONS];
  assign yn        = y[ITERATIONS];
  assign zn        = z[ITERATIONS];

endmodule
