// tb_cordic_fsm: runs the seven-iteration controller through several
// operations and checks load, the iteration count sequence 0..6, last on the
// seventh edge after start, busy, and that a start while busy is ignored.
module tb_cordic_fsm;
  localparam int N = 7;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, load, iterate, last, busy;
  logic [2:0] iter;

  cordic_fsm #(.ITERATIONS(N)) dut (.clk, .rst_n, .start, .load, .iterate, .last, .busy, .iter);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0; start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !load && !last && !iterate, "idle after reset");
    for (int op = 0; op < 4; op++) begin
      start = 1'b1;
      #1 check(load, "load with start in idle");
      @(posedge clk);                    // edge 1 samples start
      #1 start = (op == 2);              // op 2 holds start high while busy
      for (int e = 1; e <= N; e++) begin
        check(busy && iterate, "busy during iterations");
        check(int'(iter) == e - 1, "iteration count");
        check(last == (e == N), "last only on the final iteration");
        check(!load, "no load while busy");
        @(posedge clk);
        #1;
      end
      start = 1'b0;
      // Back in idle after the final iteration.
      check(!busy && !last, "idle after operation");
      repeat (op) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
