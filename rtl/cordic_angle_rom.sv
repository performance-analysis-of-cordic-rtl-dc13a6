// cordic_angle_rom: look-up table of the elementary rotation angles.
//
// Entry i holds alpha_i = atan(2^-i) as a WIDTH-bit binary angle
// (2^(WIDTH-1) = pi), rounded to nearest; the contents are computed at
// elaboration by cordic_pkg::atan_angle(). The folded core addresses it with
// its iteration counter. Asynchronous read (a small LUT ROM); addresses at or
// above DEPTH read as zero.
module cordic_angle_rom #(
  parameter int unsigned WIDTH = cordic_pkg::DEFAULT_WIDTH,
  parameter int unsigned DEPTH = cordic_pkg::DEFAULT_ITERATIONS,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic [AW-1:0]           addr,
  output logic signed [WIDTH-1:0] angle
);

  logic [WIDTH-1:0] rom [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_rom
    assign rom[i] = WIDTH'(cordic_pkg::atan_angle(i, WIDTH));
  end

  always_comb begin
    if (32'(addr) < DEPTH) angle = rom[addr];
    else                   angle = '0;
  end

endmodule
