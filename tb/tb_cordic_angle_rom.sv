// tb_cordic_angle_rom: reads every entry of a 32-bit and a 16-bit seven-entry
// angle ROM and compares it with round(atan(2^-i) / pi * 2^(W-1)) computed
// with $atan; the unused address 7 must read zero.
module tb_cordic_angle_rom;
  import cordic_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] addr;
  logic signed [31:0] a32;
  logic signed [15:0] a16;

  cordic_angle_rom #(.WIDTH(32), .DEPTH(7)) dut32 (.addr, .angle(a32));
  cordic_angle_rom #(.WIDTH(16), .DEPTH(7)) dut16 (.addr, .angle(a16));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      addr = 3'(i);
      #1;
      checks += 2;
      if (longint'(a32) != ((i < 7) ? angle(i, 32) : 0)) begin
        failures++; $display("FAIL 32-bit entry %0d: %h", i, a32);
      end
      if (longint'(a16) != ((i < 7) ? angle(i, 16) : 0)) begin
        failures++; $display("FAIL 16-bit entry %0d: %h", i, a16);
      end
      @(posedge clk);
    end
    // Spot value: atan(1) = pi/4 is exactly 2^(W-3).
    addr = 3'd0; #1;
    checks++;
    if (a32 != 32'sh20000000) begin failures++; $display("FAIL pi/4"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
