// ctm: coprocessor test module, one node of the multi-coprocessor test
// systems: a coprocessor plus what stands in for its CPU and main memory.
//
// Contents:
//   * the coprocessor;
//   * main memory: a dual-port RAM of MEM_WORDS words, port A on the CAD
//     (coprocessor address/data) bus at addresses 0..MEM_WORDS-1, port B on
//     the host LAD bus;
//   * the interface logic that plays the CPU: an Address bus FIFO and a
//     Data bus FIFO that the host fills with MOV addresses and data. When
//     the system is enabled the control logic pops one pair per cycle and
//     performs the MOV on the coprocessor: opcode = address bits 31:24,
//     A1:A0 = address bits 1:0. It stops after a BARRIER MOV until the
//     coprocessor reports barrier_done, which it acknowledges;
//   * the CAD bus arbiter: MOVs go first; the coprocessor's MMIC gets the
//     bus (mm_gnt) whenever it asks and no MOV can be issued in that cycle,
//     so a MOV arriving mid-transfer suspends the MMIC;
//   * a CNT_W-bit system counter that runs from system enable until the
//     coprocessor's barrier completes;
//   * a debug memory (debug_mem, DBG_WORDS words) that records every word
//     the node receives on its link, so the host can watch the packets.
// LAD bus (word addresses, BASE a multiple of 0x1000): BASE+0x100 system
// counter (read), BASE+0x101 number of words in the debug memory (read),
// BASE+0x200.. main memory (read/write), BASE+0x400 Address bus FIFO
// (write), BASE+0x600 Data bus FIFO (write), BASE+0x800.. debug memory
// (read). Reads return data the cycle after lad_re.
// The memory map, sizes and counter width are the design's; the one-MOV-per-
// cycle control logic, the MOV-first arbitration, watching the receive link
// and the debug word count at BASE+0x101 are this design's.
module ctm #(
  parameter logic [15:0] BASE      = 16'h0000,
  parameter int unsigned MEM_WORDS = 512,
  parameter int unsigned IF_DEPTH  = 512,
  parameter int unsigned CNT_W     = 10,
  parameter int unsigned DBG_WORDS = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sys_en,
  // LAD bus
  input  logic [15:0]      lad_addr,
  input  logic             lad_we,
  input  logic             lad_re,
  input  logic [31:0]      lad_wdata,
  output logic [31:0]      lad_rdata,
  // network links
  input  logic [31:0]      rx_data,
  input  logic             rx_valid,
  output logic             rx_full,
  output logic [31:0]      tx_data,
  output logic             tx_valid,
  input  logic             tx_full,
  // system barrier
  output logic             executed_barrier,
  input  logic             have_others_done,
  output logic             barrier_done,
  // observation
  output logic [CNT_W-1:0] sys_count,
  output logic             mm_suspended,
  output logic             pkt_sent,
  output logic             got_put,
  output logic             got_get,
  output logic [15:0]      lookup_miss,
  output logic             mov_waiting
);
  import mpi_pkg::*;
  localparam int unsigned MW = $clog2(MEM_WORDS);

  // ---------------- LAD decode ----------------
  logic       sel, sel_cnt, sel_dcnt, sel_mem, sel_afifo, sel_dfifo, sel_dbg;
  assign sel       = (lad_addr[15:12] == BASE[15:12]);
  assign sel_cnt   = sel && (lad_addr[11:8] == 4'h1) && !lad_addr[0];
  assign sel_dcnt  = sel && (lad_addr[11:8] == 4'h1) && lad_addr[0];
  assign sel_dbg   = sel && lad_addr[11];
  assign sel_mem   = sel && (lad_addr[11:9] == 3'b001);
  assign sel_afifo = sel && (lad_addr[11:9] == 3'b010);
  assign sel_dfifo = sel && (lad_addr[11:9] == 3'b011);

  // ---------------- MOV FIFOs ----------------
  logic        af_empty, df_empty, af_full, df_full, mov_fire;
  logic [31:0] af_word, df_word;

  async_fifo #(.WIDTH(32), .DEPTH(IF_DEPTH)) u_addr_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(lad_we && sel_afifo), .wdata(lad_wdata),
    .full(af_full), .wr_level(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(mov_fire), .rdata(af_word),
    .empty(af_empty), .idle());

  async_fifo #(.WIDTH(32), .DEPTH(IF_DEPTH)) u_data_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(lad_we && sel_dfifo), .wdata(lad_wdata),
    .full(df_full), .wr_level(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(mov_fire), .rdata(df_word),
    .empty(df_empty), .idle());

  // ---------------- control logic (CPU stand-in) ----------------
  logic wait_bar, cop_ready, mov_pending;
  logic mm_req, mm_gnt, mm_en, mm_we;
  logic [31:0] mm_addr, mm_wdata, mm_rdata;
  logic cop_barrier_done;

  assign mov_pending = sys_en && !wait_bar && !af_empty && !df_empty;
  assign mov_fire    = mov_pending && cop_ready;
  assign mm_gnt      = mm_req && !mov_fire;
  assign mov_waiting = mov_pending && !cop_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_bar <= 1'b0;
    end else if (mov_fire && af_word[1:0] == SEL_INST && af_word[31:24] == OP_BARRIER) begin
      wait_bar <= 1'b1;
    end else if (cop_barrier_done) begin
      wait_bar <= 1'b0;
    end
  end

  coprocessor u_cop (
    .clk, .rst_n,
    .cs(mov_pending), .we(mov_pending), .a(af_word[1:0]), .op(af_word[31:24]),
    .wdata(df_word), .ready(cop_ready),
    .mm_req, .mm_gnt, .mm_en, .mm_we, .mm_addr, .mm_wdata, .mm_rdata,
    .rx_data, .rx_valid, .rx_full,
    .tx_data, .tx_valid, .tx_full,
    .executed_barrier, .have_others_done,
    .barrier_done(cop_barrier_done), .barrier_done_ack(cop_barrier_done),
    .pid(), .nprocs(), .running(), .aborted(),
    .lookup_miss, .mm_suspended, .pkt_sent, .got_put, .got_get
  );
  assign barrier_done = cop_barrier_done;

  // ---------------- main memory ----------------
  logic [31:0] mem [MEM_WORDS];
  logic [31:0] lad_mem_q;

  // Port A (CAD bus) and port B (LAD bus); port A wins a same-address write.
  always_ff @(posedge clk) begin
    if (lad_we && sel_mem) mem[lad_addr[MW-1:0]] <= lad_wdata;
    if (mm_en && mm_gnt && mm_we) mem[mm_addr[MW-1:0]] <= mm_wdata;
    if (mm_en && mm_gnt) mm_rdata <= mem[mm_addr[MW-1:0]];
    lad_mem_q <= mem[lad_addr[MW-1:0]];
  end

  // ---------------- system counter ----------------
  logic stopped;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sys_count <= '0;
      stopped   <= 1'b0;
    end else if (sys_en && !stopped) begin
      sys_count <= sys_count + 1'b1;
      if (cop_barrier_done) stopped <= 1'b1;
    end
  end

  // ---------------- debug memory on the receive link ----------------
  localparam int unsigned DW = $clog2(DBG_WORDS);
  logic [31:0] dbg_q;
  logic [DW:0] dbg_count;

  debug_mem #(.DEPTH(DBG_WORDS)) u_dbg (
    .clk, .rst_n,
    .link_data(rx_data), .link_valid(rx_valid), .link_full(rx_full),
    .rd_addr(lad_addr[DW-1:0]), .rd_en(lad_re && sel_dbg), .rd_data(dbg_q),
    .count(dbg_count), .overflow()
  );

  // ---------------- LAD read ----------------
  logic rd_cnt_q, rd_dcnt_q, rd_mem_q, rd_dbg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_cnt_q  <= 1'b0;
      rd_dcnt_q <= 1'b0;
      rd_mem_q  <= 1'b0;
      rd_dbg_q  <= 1'b0;
    end else begin
      rd_cnt_q  <= lad_re && sel_cnt;
      rd_dcnt_q <= lad_re && sel_dcnt;
      rd_mem_q  <= lad_re && sel_mem;
      rd_dbg_q  <= lad_re && sel_dbg;
    end
  end
  assign lad_rdata = rd_mem_q  ? lad_mem_q :
                     rd_dbg_q  ? dbg_q :
                     rd_cnt_q  ? 32'(sys_count) :
                     rd_dcnt_q ? 32'(dbg_count) : 32'h0;

endmodule
