// barrier_ctrl: the coprocessor's part of a system-wide barrier.
//
// When the pipeline executes a BARRIER instruction (bar_start) the
// controller waits until the coprocessor is drained: every FIFO (Inst, Data,
// Data8, MM interface, Head, Out, In) is empty and the pipeline, MMIC,
// packet controller and transmitter are idle, which is the all_empty input.
// While it is drained it raises executed_barrier. When the system reports
// have_others_done (every coprocessor and router has reached the barrier)
// it raises barrier_done to the CPU until the CPU answers with
// barrier_done_ack, and then releases the pipeline (pending low).
// executed_barrier is withdrawn again if a late packet makes the
// coprocessor busy before the others are done.
// The signal names and the drain condition follow the design; the state
// machine around them is this design's.
module barrier_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic bar_start,
  input  logic all_empty,
  input  logic have_others_done,
  input  logic barrier_done_ack,
  output logic executed_barrier,
  output logic barrier_done,
  output logic pending
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_DONE} state_e;
  state_e state;

  assign executed_barrier = (state == S_WAIT) && all_empty;
  assign barrier_done     = (state == S_DONE);
  assign pending          = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (bar_start) state <= S_WAIT;
        S_WAIT: if (executed_barrier && have_others_done) state <= S_DONE;
        S_DONE: if (barrier_done_ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
