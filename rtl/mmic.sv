// mmic: main memory interface controller of the coprocessor.
//
// Every transfer between the coprocessor and main memory is a task triplet
// {direction, length, address} queued in the MM interface FIFO (an
// async_fifo of TASK_DEPTH entries). Direction 0 copies length words from
// main memory into the Out FIFO (data of an outgoing PUT); direction 1
// copies length words from the In FIFO into main memory (data of a received
// PUT packet).
//
// The controller asks the CPU for the memory bus with mm_req while it has
// work and uses it only while mm_gnt is high. It runs tasks back to back
// for as long as it holds the bus. If the CPU takes the bus back in the
// middle of a task, the task is suspended (current address and remaining
// count are kept) and resumes where it stopped at the next grant.
//
// Memory timing: one word per cycle; a read returns mm_rdata the cycle after
// the address (synchronous block RAM). A read whose data returns after the
// grant is dropped is still captured. Reads are issued only while the Out
// FIFO has room for the word in flight. wr_done pulses when a direction-1
// task finishes (the packet controller waits for it).
// The task triplets, the request/grant protocol and suspend/resume follow
// the design; the memory timing and the done pulse are this design's.
module mmic #(
  parameter int unsigned TASK_DEPTH = 16,
  parameter int unsigned OUT_DEPTH  = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // task input
  input  logic              task_we,
  input  mpi_pkg::mm_task_t task_in,
  output logic              task_full,
  output logic              task_idle,
  // main memory bus
  output logic              mm_req,
  input  logic              mm_gnt,
  output logic              mm_en,
  output logic              mm_we,
  output logic [31:0]       mm_addr,
  output logic [31:0]       mm_wdata,
  input  logic [31:0]       mm_rdata,
  // Out FIFO write side
  output logic              out_we,
  output logic [31:0]       out_wdata,
  input  logic              out_full,
  input  logic [$clog2(OUT_DEPTH):0] out_level,
  // In FIFO read side
  output logic              in_rd,
  input  logic [31:0]       in_rdata,
  input  logic              in_empty,
  // status
  output logic              busy,
  output logic              wr_done,
  output logic              suspended
);
  import mpi_pkg::*;

  mm_task_t   tq_head;
  logic       tq_empty, tq_rd;

  async_fifo #(.WIDTH($bits(mm_task_t)), .DEPTH(TASK_DEPTH)) u_task_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(task_we), .wdata(task_in),
    .full(task_full), .wr_level(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(tq_rd), .rdata(tq_head),
    .empty(tq_empty), .idle(task_idle)
  );

  logic        active;     // a task is loaded
  logic        dir;
  logic [7:0]  remaining;
  logic [31:0] addr;
  logic        rd_inflight;

  logic can_read, can_write;
  // Room for this word plus the one possibly in flight.
  assign can_read  = active && (dir == MM_READ) && mm_gnt && (remaining != 0) &&
                     (32'(out_level) + 32'(rd_inflight) + 1 < OUT_DEPTH) && !out_full;
  assign can_write = active && (dir == MM_WRITE) && mm_gnt && (remaining != 0) && !in_empty;

  assign tq_rd    = !active && !tq_empty;
  assign mm_req   = active || !tq_empty;
  assign mm_en    = can_read || can_write;
  assign mm_we    = can_write;
  assign mm_addr  = addr;
  assign mm_wdata = in_rdata;
  assign in_rd    = can_write;

  assign out_we    = rd_inflight;
  assign out_wdata = mm_rdata;

  assign busy      = active || rd_inflight;
  assign suspended = active && !mm_gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      dir         <= 1'b0;
      remaining   <= '0;
      addr        <= '0;
      rd_inflight <= 1'b0;
      wr_done     <= 1'b0;
    end else begin
      wr_done     <= 1'b0;
      rd_inflight <= can_read;
      if (tq_rd) begin
        active    <= 1'b1;
        dir       <= tq_head.dir;
        remaining <= tq_head.len;
        addr      <= tq_head.addr;
      end else if (active) begin
        if (can_read || can_write) begin
          remaining <= remaining - 1'b1;
          addr      <= addr + 1'b1;
        end
        if (remaining == 0 || ((can_read || can_write) && remaining == 1)) begin
          active  <= 1'b0;
          wr_done <= (dir == MM_WRITE);
        end
      end
    end
  end

endmodule
