// cordic_fsm: controller of the folded (word-serial) CORDIC core.
//
// Two states. In IDLE a `start` pulse asserts `load` for that cycle, so the
// datapath registers take the initial x0/y0/z0 through their input
// multiplexers, and the FSM enters ITER with the iteration counter at zero.
// In ITER `iterate` is high and `iter` gives both the shift distance of the
// x/y shifters and the address of the angle ROM; the counter advances every
// clock. `last` is high during iteration ITERATIONS-1; the FSM then returns to
// IDLE. A `start` seen outside IDLE is ignored.
// Timing: counting the edge that samples `start` as the first, `last` is high
// after the ITERATIONS-th rising edge; one result every ITERATIONS+1 cycles
// when started back to back.
// Reset (asynchronous, active low) and the start handshake are this design's
// choices; the source only states that an FSM keeps track of the shift
// distances and the ROM addresses.
module cordic_fsm #(
  parameter int unsigned ITERATIONS = cordic_pkg::DEFAULT_ITERATIONS,
  localparam int unsigned CW = (ITERATIONS > 1) ? $clog2(ITERATIONS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          load,
  output logic          iterate,
  output logic          last,
  output logic          busy,
  output logic [CW-1:0] iter
);

  typedef enum logic {
    S_IDLE = 1'b0,
    S_ITER = 1'b1
  } state_e;

  state_e state;

  always_comb begin
    load    = (state == S_IDLE) && start;
    iterate = (state == S_ITER);
    last    = (state == S_ITER) && (32'(iter) == ITERATIONS - 1);
    busy    = (state == S_ITER);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      iter  <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          iter <= '0;
          if (start) state <= S_ITER;
        end
        S_ITER: begin
          if (last) begin
            state <= S_IDLE;
            iter  <= '0;
          end else begin
            iter <= iter + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The counter never leaves the range of valid iterations.
  a_iter_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 32'(iter) < ITERATIONS);

endmodule
