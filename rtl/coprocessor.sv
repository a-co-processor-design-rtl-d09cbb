// coprocessor: MPI communication coprocessor that sits on a CPU's system bus.
//
// The CPU hands over one-sided communication (PUT-1, PUT-n, GET), address
// registration, barrier and a few bookkeeping instructions by storing
// opcodes and operands into the coprocessor (cpu_if). The coprocessor
//   * translates local 32-bit addresses to 8-bit global ones and back with
//     its registration table (reg_table),
//   * builds packets in its instruction engine (cop_pipeline): headers go to
//     the Head FIFO, PUT-n data is fetched from main memory by the MMIC into
//     the Out FIFO, and tx_ctrl sends header plus data on the output bus,
//   * executes packets arriving on the input bus (In FIFO, pkt_ctrl): PUT
//     data is written to main memory by the MMIC, a GET is answered with a
//     PUT-n issued through the instruction engine,
//   * takes part in system barriers (barrier_ctrl).
// Every queue is an async_fifo; here they all run on one clock.
//
// Interfaces:
//   CPU bus    cs/we/a/op/wdata, ready stalls the CPU while a FIFO is full.
//   memory     mm_req/mm_gnt bus request and grant, then mm_en/mm_we/mm_addr/
//              mm_wdata, mm_rdata one cycle after a read.
//   rx / tx    data transfer buses: 32-bit data, valid, and a full flag from
//              the receiver; a word moves on a clock edge with valid && !full.
//   barrier    executed_barrier out, have_others_done in, barrier_done to the
//              CPU, barrier_done_ack from it.
// FIFO sizes default to the implemented configuration of the design
// (Inst/Data/Data8 64 words, Head and MM-interface FIFOs 16, In and Out
// memories 512). The priority of the instruction engine over the packet
// controller at the shared registration table and MMIC is this design's.
module coprocessor #(
  parameter int unsigned INST_DEPTH  = 64,
  parameter int unsigned DATA_DEPTH  = 64,
  parameter int unsigned DATA8_DEPTH = 64,
  parameter int unsigned HEAD_DEPTH  = 16,
  parameter int unsigned TASK_DEPTH  = 16,
  parameter int unsigned IN_DEPTH    = 512,
  parameter int unsigned OUT_DEPTH   = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU bus
  input  logic        cs,
  input  logic        we,
  input  logic [1:0]  a,
  input  logic [7:0]  op,
  input  logic [31:0] wdata,
  output logic        ready,
  // main memory bus
  output logic        mm_req,
  input  logic        mm_gnt,
  output logic        mm_en,
  output logic        mm_we,
  output logic [31:0] mm_addr,
  output logic [31:0] mm_wdata,
  input  logic [31:0] mm_rdata,
  // receive bus
  input  logic [31:0] rx_data,
  input  logic        rx_valid,
  output logic        rx_full,
  // transmit bus
  output logic [31:0] tx_data,
  output logic        tx_valid,
  input  logic        tx_full,
  // barrier
  output logic        executed_barrier,
  input  logic        have_others_done,
  output logic        barrier_done,
  input  logic        barrier_done_ack,
  // status
  output logic [7:0]  pid,
  output logic [7:0]  nprocs,
  output logic        running,
  output logic        aborted,
  output logic [15:0] lookup_miss,
  output logic        mm_suspended,
  output logic        pkt_sent,
  output logic        got_put,
  output logic        got_get
);
  import mpi_pkg::*;

  // ---------------- CPU interface and input FIFOs ----------------
  logic        inst_we, data_we, d8_we;
  logic [7:0]  inst_wdata;
  logic [31:0] data_wdata;
  logic [23:0] d8_wdata;
  logic        inst_full, data_full, d8_full;
  logic        inst_empty, data_empty, d8_empty;
  logic        inst_rd, data_rd, d8_rd;
  logic [7:0]  inst_op;
  logic [31:0] data_word;
  logic [23:0] d8_word;
  logic        inst_idle, data_idle, d8_idle;

  cpu_if u_cpu_if (
    .clk, .rst_n, .cs, .we, .a, .op, .wdata, .ready,
    .inst_we, .inst_wdata, .inst_full,
    .data_we, .data_wdata, .data_full,
    .d8_we, .d8_wdata, .d8_full
  );

  async_fifo #(.WIDTH(8), .DEPTH(INST_DEPTH)) u_inst_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(inst_we), .wdata(inst_wdata),
    .full(inst_full), .wr_level(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(inst_rd), .rdata(inst_op),
    .empty(inst_empty), .idle(inst_idle));

  async_fifo #(.WIDTH(32), .DEPTH(DATA_DEPTH)) u_data_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(data_we), .wdata(data_wdata),
    .full(data_full), .wr_level(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(data_rd), .rdata(data_word),
    .empty(data_empty), .idle(data_idle));

  async_fifo #(.WIDTH(24), .DEPTH(DATA8_DEPTH)) u_data8_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(d8_we), .wdata(d8_wdata),
    .full(d8_full), .wr_level(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(d8_rd), .rdata(d8_word),
    .empty(d8_empty), .idle(d8_idle));

  // ---------------- instruction engine ----------------
  logic        inj_valid, inj_ack;
  logic [31:0] inj_src, inj_dst;
  logic [7:0]  inj_len, inj_dpid;
  logic        p_rt_start, p_rt_claim;
  rt_mode_e    p_rt_mode;
  logic [31:0] p_rt_data_in;
  logic        p_task_we;
  mm_task_t    p_task;
  logic        head_we, head_full, head_empty, head_rd, head_idle;
  logic [31:0] head_wdata, head_rdata;
  logic        bar_start, bar_pending, pipe_idle;
  logic [4:0]  rt_match_addr;
  logic        rt_match_hit, rt_busy;
  logic        task_full;

  cop_pipeline u_pipe (
    .clk, .rst_n,
    .inst_empty, .inst_op, .inst_rd,
    .data_empty, .data_word, .data_rd,
    .d8_empty, .d8_word, .d8_rd,
    .inj_valid, .inj_src, .inj_dst, .inj_len, .inj_dpid, .inj_ack,
    .rt_start(p_rt_start), .rt_mode(p_rt_mode), .rt_data_in(p_rt_data_in),
    .rt_match_addr, .rt_match_hit, .rt_busy, .rt_claim(p_rt_claim),
    .task_we(p_task_we), .task_out(p_task), .task_full,
    .head_we, .head_wdata, .head_full,
    .bar_start, .bar_pending,
    .pid, .nprocs, .running, .aborted, .idle(pipe_idle), .lookup_miss
  );

  // ---------------- registration table, shared ----------------
  logic        pc_rt_req, pc_rt_gnt;
  logic [4:0]  pc_rt_gaddr;
  logic [31:0] rt_data_out;

  assign pc_rt_gnt = pc_rt_req && !p_rt_claim && !rt_busy;

  reg_table u_rt (
    .clk, .rst_n,
    .start        (p_rt_start || pc_rt_gnt),
    .mode         (p_rt_start ? p_rt_mode : RT_LOOKUP),
    .rt_addr      (pc_rt_gaddr),
    .rt_data_in   (p_rt_data_in),
    .rt_data_out  (rt_data_out),
    .rt_match_addr(rt_match_addr),
    .rt_match_hit (rt_match_hit),
    .reg_addr     (),
    .reg_ok       (),
    .busy         (rt_busy),
    .full         (),
    .status       ()
  );

  // ---------------- MMIC, shared task port ----------------
  logic        pc_task_req, pc_task_ack, wr_done;
  mm_task_t    pc_task;
  logic        out_we, out_full, out_empty, out_rd, out_idle;
  logic [31:0] out_wdata, out_rdata;
  logic [$clog2(OUT_DEPTH):0] out_level;
  logic        in_empty, in_idle, mm_in_rd, pc_in_rd;
  logic [31:0] in_rdata;
  logic        mm_busy, task_idle;

  assign pc_task_ack = pc_task_req && !p_task_we && !task_full;

  mmic #(.TASK_DEPTH(TASK_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_mmic (
    .clk, .rst_n,
    .task_we   (p_task_we || pc_task_ack),
    .task_in   (p_task_we ? p_task : pc_task),
    .task_full (task_full),
    .task_idle (task_idle),
    .mm_req, .mm_gnt, .mm_en, .mm_we, .mm_addr, .mm_wdata, .mm_rdata,
    .out_we, .out_wdata, .out_full, .out_level,
    .in_rd(mm_in_rd), .in_rdata, .in_empty,
    .busy(mm_busy), .wr_done, .suspended(mm_suspended)
  );

  async_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(out_we), .wdata(out_wdata),
    .full(out_full), .wr_level(out_level),
    .rclk(clk), .rrst_n(rst_n), .rd_en(out_rd), .rdata(out_rdata),
    .empty(out_empty), .idle(out_idle));

  async_fifo #(.WIDTH(32), .DEPTH(HEAD_DEPTH)) u_head_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(head_we), .wdata(head_wdata),
    .full(head_full), .wr_level(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(head_rd), .rdata(head_rdata),
    .empty(head_empty), .idle(head_idle));

  // ---------------- receive side ----------------
  async_fifo #(.WIDTH(32), .DEPTH(IN_DEPTH)) u_in_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(rx_valid), .wdata(rx_data),
    .full(rx_full), .wr_level(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(pc_in_rd || mm_in_rd), .rdata(in_rdata),
    .empty(in_empty), .idle(in_idle));

  logic pc_idle;

  pkt_ctrl u_pc (
    .clk, .rst_n,
    .in_empty, .in_rdata, .in_rd(pc_in_rd),
    .rt_req(pc_rt_req), .rt_gaddr(pc_rt_gaddr), .rt_gnt(pc_rt_gnt), .rt_data(rt_data_out),
    .task_req(pc_task_req), .task_out(pc_task), .task_ack(pc_task_ack), .wr_done,
    .inj_valid, .inj_src, .inj_dst, .inj_len, .inj_dpid, .inj_ack,
    .idle(pc_idle), .got_put, .got_get
  );

  // ---------------- transmit side ----------------
  logic tx_idle;

  tx_ctrl u_tx (
    .clk, .rst_n,
    .head_empty, .head_rdata, .head_rd,
    .out_empty, .out_rdata, .out_rd,
    .tx_data, .tx_valid, .tx_full,
    .idle(tx_idle), .pkt_sent
  );

  // ---------------- barrier ----------------
  logic all_empty;
  assign all_empty = inst_idle && data_idle && d8_idle && task_idle && head_idle &&
                     out_idle && in_idle && pipe_idle && pc_idle && tx_idle && !mm_busy;

  barrier_ctrl u_bar (
    .clk, .rst_n, .bar_start, .all_empty, .have_others_done, .barrier_done_ack,
    .executed_barrier, .barrier_done, .pending(bar_pending)
  );

endmodule
