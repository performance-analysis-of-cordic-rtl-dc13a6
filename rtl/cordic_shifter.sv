// cordic_shifter: variable-distance arithmetic right shifter (">> n").
//
// Used by the folded (word-serial) core, where the shift distance follows the
// iteration number supplied by the controller. The sign bit is replicated, so
// the result is floor(d / 2^shamt). Purely combinational; synthesis turns it
// into a log2(WIDTH)-level barrel shifter, the part whose depth limits the
// clock of the folded core.
module cordic_shifter #(
  parameter int unsigned WIDTH = cordic_pkg::DEFAULT_WIDTH,
  localparam int unsigned SHW = $clog2(WIDTH)
) (
  input  logic signed [WIDTH-1:0] d,
  input  logic [SHW-1:0]          shamt,
  output logic signed [WIDTH-1:0] q
);

  always_comb q = d >>> shamt;

endmodule
