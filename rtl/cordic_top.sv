// cordic_top: the three CORDIC structures side by side.
//
// The design compares three realisations of the same seven-iteration CORDIC
// rotator, and this top holds one of each with its own ports:
//   f_*  folded word-serial core (cordic_folded): one iteration per clock,
//        start/done handshake, rotation mode; result after ITERATIONS edges,
//        one operation at a time.
//   p_*  unfolded parallel core (cordic_unfolded, PIPELINED = 0): purely
//        combinational, rotation or vectoring mode per operation.
//   q_*  unfolded pipelined core (cordic_unfolded, PIPELINED = 1): one
//        operation per clock, result ITERATIONS edges later with q_out_valid.
// The folded and pipelined cores share clk and the active-low asynchronous
// reset rst_n. Mode inputs are 0 for rotation, 1 for vectoring.
// Which cores exist follows the source design; port naming is this design's.
module cordic_top
  import cordic_pkg::*;
#(
  parameter int unsigned WIDTH      = cordic_pkg::DEFAULT_WIDTH,
  parameter int unsigned ITERATIONS = cordic_pkg::DEFAULT_ITERATIONS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // folded word-serial core
  input  logic                    f_start,
  input  logic signed [WIDTH-1:0] f_x0,
  input  logic signed [WIDTH-1:0] f_y0,
  input  logic signed [WIDTH-1:0] f_z0,
  output logic                    f_busy,
  output logic                    f_done,
  output logic signed [WIDTH-1:0] f_xn,
  output logic signed [WIDTH-1:0] f_yn,
  output logic signed [WIDTH-1:0] f_zn,
  // unfolded parallel core
  input  logic                    p_vectoring,
  input  logic signed [WIDTH-1:0] p_x0,
  input  logic signed [WIDTH-1:0] p_y0,
  input  logic signed [WIDTH-1:0] p_z0,
  output logic signed [WIDTH-1:0] p_xn,
  output logic signed [WIDTH-1:0] p_yn,
  output logic signed [WIDTH-1:0] p_zn,
  // unfolded pipelined core
  input  logic                    q_in_valid,
  input  logic                    q_vectoring,
  input  logic signed [WIDTH-1:0] q_x0,
  input  logic signed [WIDTH-1:0] q_y0,
  input  logic signed [WIDTH-1:0] q_z0,
  output logic                    q_out_valid,
  output logic                    q_out_vectoring,
  output logic signed [WIDTH-1:0] q_xn,
  output logic signed [WIDTH-1:0] q_yn,
  output logic signed [WIDTH-1:0] q_zn
);

  cordic_mode_e q_mode_out;

  cordic_folded #(.WIDTH(WIDTH), .ITERATIONS(ITERATIONS)) u_folded (
    .clk, .rst_n,
    .start(f_start), .x0(f_x0), .y0(f_y0), .z0(f_z0),
    .busy (f_busy),  .done(f_done),
    .xn   (f_xn),    .yn  (f_yn), .zn(f_zn)
  );

  // The parallel core has no registers; its valid path is a plain wire.
  cordic_unfolded #(.WIDTH(WIDTH), .ITERATIONS(ITERATIONS), .PIPELINED(1'b0)) u_parallel (
    .clk, .rst_n,
    .in_valid (1'b1),
    .in_mode  (cordic_mode_e'(p_vectoring)),
    .x0(p_x0), .y0(p_y0), .z0(p_z0),
    .out_valid(),
    .out_mode (),
    .xn(p_xn), .yn(p_yn), .zn(p_zn)
  );

  cordic_unfolded #(.WIDTH(WIDTH), .ITERATIONS(ITERATIONS), .PIPELINED(1'b1)) u_pipelined (
    .clk, .rst_n,
    .in_valid (q_in_valid),
    .in_mode  (cordic_mode_e'(q_vectoring)),
    .x0(q_x0), .y0(q_y0), .z0(q_z0),
    .out_valid(q_out_valid),
    .out_mode (q_mode_out),
    .xn(q_xn), .yn(q_yn), .zn(q_zn)
  );

  assign q_out_vectoring = (q_mode_out == MODE_VECTOR);

endmodule
