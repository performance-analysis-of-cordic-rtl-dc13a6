// tb_cordic_shifter: every shift distance of a 32-bit shifter with random
// signed data; expected value is floor(d / 2^n) computed by integer division.
module tb_cordic_shifter;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [31:0] d, q;
  logic [4:0] shamt;

  cordic_shifter #(.WIDTH(32)) dut (.d, .shamt, .q);

  function automatic longint floor_div(input longint v, input longint p);
    longint r;
    r = ((v % p) + p) % p;
    return (v - r) / p;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3200; n++) begin
      d = $urandom;
      if (n < 32) d = 32'sh80000000;
      shamt = 5'(n);
      #1;
      checks++;
      if (longint'(q) != floor_div(longint'(d), longint'(1) << shamt)) begin
        failures++;
        $display("FAIL d=%0d shamt=%0d q=%0d", d, shamt, q);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
