// tb_cordic_stage: stage 3 of a 32-bit array, once combinational and once
// registered, fed with random operands in both modes; outputs are compared
// with one step of the reference recurrence. The registered copy must show
// the result, mode and valid one clock later; its valid flag must reset.
module tb_cordic_stage;
  import cordic_pkg::*;
  import cordic_ref_pkg::*;

  localparam int W = 32;
  localparam int S = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid;
  cordic_mode_e in_mode, c_mode, r_mode;
  logic signed [W-1:0] x, y, z, cx, cy, cz, rx, ry, rz;
  logic c_valid, r_valid;
  int n_dpos = 0, n_dneg = 0;

  cordic_stage #(.WIDTH(W), .STAGE(S), .REGISTERED(1'b0)) dut_c (
    .clk, .rst_n, .in_valid, .in_mode, .x_in(x), .y_in(y), .z_in(z),
    .out_valid(c_valid), .out_mode(c_mode), .x_out(cx), .y_out(cy), .z_out(cz));
  cordic_stage #(.WIDTH(W), .STAGE(S), .REGISTERED(1'b1)) dut_r (
    .clk, .rst_n, .in_valid, .in_mode, .x_in(x), .y_in(y), .z_in(z),
    .out_valid(r_valid), .out_mode(r_mode), .x_out(rx), .y_out(ry), .z_out(rz));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t a, e;
    bit   vmode;
    rst_n = 1'b1;
    #1 rst_n = 1'b0; in_valid = 1'b1; in_mode = MODE_ROTATE; x = '0; y = '0; z = '0;
    @(posedge clk);
    #1 check(!r_valid, "registered valid cleared by reset");
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      vmode = $urandom_range(0, 1);
      in_mode = vmode ? MODE_VECTOR : MODE_ROTATE;
      in_valid = $urandom_range(0, 1);
      x = W'($urandom) >>> 1; y = W'($urandom) >>> 1; z = W'($urandom);
      a.x = x; a.y = y; a.z = z;
      e = step(a, S, vmode, W);
      if (vmode ? (a.y >= 0) : (a.z < 0)) n_dneg++; else n_dpos++;
      #1;
      check(cx == W'(e.x) && cy == W'(e.y) && cz == W'(e.z), "combinational result");
      check(c_valid == in_valid && c_mode == in_mode, "combinational valid/mode");
      @(posedge clk);
      #1;
      check(rx == W'(e.x) && ry == W'(e.y) && rz == W'(e.z), "registered result");
      check(r_valid == in_valid && r_mode == in_mode, "registered valid/mode");
    end
    check(n_dpos > 0 && n_dneg > 0, "both rotation directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
