// tb_cordic_addsub: random and corner operands through a 32-bit and a 16-bit
// add/sub unit, checked against 64-bit integer arithmetic wrapped to the
// word width.
module tb_cordic_addsub;
  import cordic_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [31:0] a32, b32, y32;
  logic signed [15:0] a16, b16, y16;
  logic sub;

  cordic_addsub #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .sub, .y(y32));
  cordic_addsub #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .sub, .y(y16));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a32 = $urandom; b32 = $urandom; a16 = 16'($urandom); b16 = 16'($urandom);
      sub = n[0] ^ $urandom_range(0, 1);
      if (n == 0) begin a32 = 32'h7fffffff; b32 = 32'd1; sub = 1'b0; end  // wraps
      if (n == 1) begin a16 = 16'sh8000;    b16 = 16'd1; sub = 1'b1; end  // wraps
      #1;
      check(y32, wrap(sub ? longint'(a32) - longint'(b32) : longint'(a32) + longint'(b32), 32), "32-bit");
      check(y16, wrap(sub ? longint'(a16) - longint'(b16) : longint'(a16) + longint'(b16), 16), "16-bit");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
