// cordic_stage: one processing element of the unfolded CORDIC array.
//
// Stage STAGE always performs iteration i = STAGE, so its shifts are fixed
// wiring (">>> i") and its angle atan(2^-i) is a hardwired constant; no
// shifter logic and no ROM are needed. A multiplexer picks the rotation
// decision: from the sign of z in rotation mode (drive z to 0), from the
// inverted sign of y in vectoring mode (drive y to 0). With d = +1 or -1:
//     x' = x - d * (y >>> i)
//     y' = y + d * (x >>> i)
//     z' = z - d * atan(2^-i)
// computed by three add/sub units.
//
// REGISTERED = 0: purely combinational (the unfolded parallel structure);
// clk and rst_n are then unused. REGISTERED = 1: the outputs, the mode and a
// valid flag pass through a register clocked by clk (the pipelined
// structure); only the valid flag is reset (asynchronous, active low).
// The element's structure follows the source design; the valid flag, the
// mode travelling with the data and the reset are this design's choices.
module cordic_stage
  import cordic_pkg::*;
#(
  parameter int unsigned WIDTH      = cordic_pkg::DEFAULT_WIDTH,
  parameter int unsigned STAGE      = 0,
  parameter bit          REGISTERED = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  cordic_mode_e            in_mode,
  input  logic signed [WIDTH-1:0] x_in,
  input  logic signed [WIDTH-1:0] y_in,
  input  logic signed [WIDTH-1:0] z_in,
  output logic                    out_valid,
  output cordic_mode_e            out_mode,
  output logic signed [WIDTH-1:0] x_out,
  output logic signed [WIDTH-1:0] y_out,
  output logic signed [WIDTH-1:0] z_out
);

  localparam logic signed [WIDTH-1:0] ALPHA = WIDTH'(atan_angle(STAGE, WIDTH));

  logic                    d_neg;  // decision d = -1
  logic signed [WIDTH-1:0] x_sh, y_sh;
  logic signed [WIDTH-1:0] x_nx, y_nx, z_nx;

  // Wired shifts.
  assign x_sh = x_in >>> STAGE;
  assign y_sh = y_in >>> STAGE;

  // Decision multiplexer: sign(z) in rotation, inverted sign(y) in vectoring.
  assign d_neg = (in_mode == MODE_VECTOR) ? !y_in[WIDTH-1] : z_in[WIDTH-1];

  cordic_addsub #(.WIDTH(WIDTH)) u_addx (.a(x_in), .b(y_sh),  .sub(!d_neg), .y(x_nx));
  cordic_addsub #(.WIDTH(WIDTH)) u_addy (.a(y_in), .b(x_sh),  .sub(d_neg),  .y(y_nx));
  cordic_addsub #(.WIDTH(WIDTH)) u_addz (.a(z_in), .b(ALPHA), .sub(!d_neg), .y(z_nx));

  if (REGISTERED) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= in_valid;
    end
    always_ff @(posedge clk) begin
      out_mode <= in_mode;
      x_out    <= x_nx;
      y_out    <= y_nx;
      z_out    <= z_nx;
    end
  end else begin : g_comb
    always_comb begin
      out_valid = in_valid;
      out_mode  = in_mode;
      x_out     = x_nx;
      y_out     = y_nx;
      z_out     = z_nx;
    end
  end

endmodule
