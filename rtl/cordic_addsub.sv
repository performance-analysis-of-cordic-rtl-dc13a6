// cordic_addsub: the add/subtract unit of a CORDIC branch.
//
// Computes y = a + b or y = a - b on signed WIDTH-bit words, chosen by `sub`
// (the rotation decision of the current iteration). The result wraps modulo
// 2^WIDTH, which is what the angle branch wants for a binary angle and what
// the x/y branches never reach when their inputs respect the gain headroom.
// Purely combinational.
module cordic_addsub #(
  parameter int unsigned WIDTH = cordic_pkg::DEFAULT_WIDTH
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  input  logic                    sub,  // 1: a - b, 0: a + b
  output logic signed [WIDTH-1:0] y
);

  always_comb begin
    if (sub) y = a - b;
    else     y = a + b;
  end

endmodule
