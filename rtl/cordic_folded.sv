// cordic_folded: folded, word-serial CORDIC rotator (rotation mode).
//
// One hardware iteration is built once and reused ITERATIONS times. Each of
// the three branches has a register, an input multiplexer that loads the
// initial value, and an add/sub unit; the x and y branches also have a
// variable shifter, and the z branch takes its constant from the angle ROM.
// Every clock of an operation performs
//     x' = x - d * (y >>> i)
//     y' = y + d * (x >>> i)
//     z' = z - d * atan(2^-i),     d = +1 if z >= 0, else -1,
// where i is the iteration number held by the FSM. The sign of the z register
// thus sets the operation of all three add/sub units for the next step. The
// results are taken straight from the add/sub outputs during the last
// iteration, when `done` is high (they are also written back to the
// registers, so xn/yn/zn are only meaningful while `done` is high).
//
// Result: xn = K (x0 cos z0 - y0 sin z0), yn = K (y0 cos z0 + x0 sin z0),
// zn = residual angle, K = gain of ITERATIONS iterations (see cordic_pkg).
// Convergence needs |z0| below the sum of the ROM angles (about 99.7 degrees
// for seven iterations).
//
// Timing: `start` is sampled while `busy` is low; `done` is high after
// ITERATIONS rising edges counting the sampling edge, for one cycle.
// The structure, the register/multiplexer/shifter/ROM/FSM split and the
// decision from the z sign follow the source design; the start/done/busy
// handshake, the reset and the number formats are this design's choices.
module cordic_folded #(
  parameter int unsigned WIDTH      = cordic_pkg::DEFAULT_WIDTH,
  parameter int unsigned ITERATIONS = cordic_pkg::DEFAULT_ITERATIONS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [WIDTH-1:0] x0,
  input  logic signed [WIDTH-1:0] y0,
  input  logic signed [WIDTH-1:0] z0,
  output logic                    busy,
  output logic                    done,
  output logic signed [WIDTH-1:0] xn,
  output logic signed [WIDTH-1:0] yn,
  output logic signed [WIDTH-1:0] zn
);

  localparam int unsigned CW  = (ITERATIONS > 1) ? $clog2(ITERATIONS) : 1;
  localparam int unsigned SHW = $clog2(WIDTH);

  logic          load, iterate, last;
  logic [CW-1:0] iter;

  logic signed [WIDTH-1:0] x_q, y_q, z_q;
  logic signed [WIDTH-1:0] x_sh, y_sh, alpha;
  logic signed [WIDTH-1:0] x_sum, y_sum, z_sum;
  logic                    z_neg;
  logic [SHW-1:0]          shamt;

  cordic_fsm #(.ITERATIONS(ITERATIONS)) u_fsm (
    .clk, .rst_n, .start,
    .load, .iterate, .last, .busy, .iter
  );

  // Shift distance = iteration number (ITERATIONS never exceeds WIDTH in a
  // useful configuration; larger counts saturate at the word width).
  always_comb begin
    if (32'(iter) >= WIDTH) shamt = SHW'(WIDTH - 1);
    else                    shamt = SHW'(iter);
  end

  cordic_shifter #(.WIDTH(WIDTH)) u_shx (.d(x_q), .shamt, .q(x_sh));
  cordic_shifter #(.WIDTH(WIDTH)) u_shy (.d(y_q), .shamt, .q(y_sh));

  cordic_angle_rom #(.WIDTH(WIDTH), .DEPTH(ITERATIONS)) u_rom (
    .addr(iter), .angle(alpha)
  );

  // d = -1 when the residual angle is negative.
  assign z_neg = z_q[WIDTH-1];

  cordic_addsub #(.WIDTH(WIDTH)) u_addx (.a(x_q), .b(y_sh),  .sub(!z_neg), .y(x_sum));
  cordic_addsub #(.WIDTH(WIDTH)) u_addy (.a(y_q), .b(x_sh),  .sub(z_neg),  .y(y_sum));
  cordic_addsub #(.WIDTH(WIDTH)) u_addz (.a(z_q), .b(alpha), .sub(!z_neg), .y(z_sum));

  // Branch registers with their initial-value multiplexers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
      z_q <= '0;
    end else if (load) begin
      x_q <= x0;
      y_q <= y0;
      z_q <= z0;
    end else if (iterate) begin
      x_q <= x_sum;
      y_q <= y_sum;
      z_q <= z_sum;
    end
  end

  assign done = last;
  assign xn   = x_sum;
  assign yn   = y_sum;
  assign zn   = z_sum;

endmodule
