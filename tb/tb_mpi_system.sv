// tb_mpi_system: end-to-end test of the four-node system at its default
// sizes (four coprocessor test modules and a 4x4 router).
//
// The host side of the test loads, over the LAD bus, a small MPI program
// into every node's MOV FIFOs and seeds each node's main memory, sets the
// global system enable and waits for the system barrier. The program on
// node k:
//   SET_PID k, SET_NPROCS 4, BEGIN
//   REGISTER 0x100 (global 0, exchange buffer), 0x000 (global 1, source
//   array), 0x1F8 (global 2, GET buffer), 0x1FF then DEREGISTER 0x1FF and
//   REGISTER 0x1F0 (reuses slot 3)
//   total exchange: H words from 0x000 to every node j (itself included)
//   at 0x100 with offset k*H, as H/P PUT-n packets of P words
//   PUT-1 of word 0xABC00+k to node k+1 at 0x1F0
//   GET of G words from node k+1's 0x000 + 2 into its own 0x1F8
//   100 NOPs (they fill the Inst FIFO), BARRIER, END
// Node k's source array holds k*1000 + w. Afterwards every destination
// word is read back over the LAD bus and compared with that formula.
// It also counts how often each mechanism happened (MMIC suspension, GET
// answered by a reply PUT, PUT received, system barrier, CPU stalled by a
// full FIFO) and counts a failure for any that never did. Link stalls (a
// full receiver holding back a sender) are counted and reported; with this
// traffic they need not occur, and tb_router and tb_coprocessor force them.
module tb_mpi_system;
  import mpi_pkg::*;

  localparam int N = 4;
  localparam int H = 60;   // words per node pair in the total exchange
  localparam int P = 15;   // words per PUT-n packet (H/P packets per pair)
  localparam int G = 8;    // words per GET

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] lad_addr = '0;
  logic        lad_we = 1'b0, lad_re = 1'b0;
  logic [31:0] lad_wdata = '0, lad_rdata;
  logic [N-1:0] barrier_done, mm_suspended, pkt_sent, got_put, got_get, mov_waiting, link_stall;
  logic [N-1:0][9:0] sys_count;
  logic sys_en, system_barrier;

  mpi_system dut (
    .clk, .rst_n, .lad_addr, .lad_we, .lad_re, .lad_wdata, .lad_rdata,
    .cfg_we(1'b0), .cfg_dpid(8'h00), .cfg_port(2'd0),
    .sys_en, .barrier_done, .system_barrier, .sys_count, .mm_suspended,
    .pkt_sent, .got_put, .got_get, .mov_waiting, .link_stall
  );

  int checks = 0, failures = 0;
  int n_susp = 0, n_get = 0, n_put = 0, n_bar = 0, n_pkt = 0, n_stall = 0, n_movwait = 0;
  int cycle = 0;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    n_susp    <= n_susp + $countones(mm_suspended);
    n_get     <= n_get + $countones(got_get);
    n_put     <= n_put + $countones(got_put);
    n_pkt     <= n_pkt + $countones(pkt_sent);
    n_bar     <= n_bar + $countones(barrier_done);
    n_stall   <= n_stall + $countones(link_stall);
    n_movwait <= n_movwait + $countones(mov_waiting);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic lad_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    lad_addr = a; lad_wdata = d; lad_we = 1'b1;
    @(negedge clk);
    lad_we = 1'b0;
  endtask

  task automatic lad_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    lad_addr = a; lad_re = 1'b1;
    @(negedge clk);
    lad_re = 1'b0;
    d = lad_rdata;
  endtask

  function automatic logic [15:0] base(input int k);
    return 16'(k * 'h1000);
  endfunction

  task automatic mov(input int k, input logic [7:0] opc, input logic [1:0] a, input logic [31:0] d);
    lad_write(base(k) + 16'h400, {opc, 22'h0, a});
    lad_write(base(k) + 16'h600, d);
  endtask

  task automatic mov_d8(input int k, input logic [7:0] dpid, input logic [7:0] len, input logic [7:0] off);
    mov(k, 8'h00, SEL_DATA8, 32'(dpid));
    mov(k, 8'h00, SEL_DATA8, 32'(len));
    mov(k, 8'h00, SEL_DATA8, 32'(off));
  endtask

  task automatic load_program(input int k);
    int nx;
    nx = (k + 1) % N;
    mov(k, OP_SET_PID, SEL_INST, 32'(k));
    mov(k, OP_SET_NPROCS, SEL_INST, 32'(N));
    mov(k, OP_BEGIN, SEL_INST, 32'h0);
    mov(k, OP_REGISTER, SEL_INST, 32'h100);
    mov(k, OP_REGISTER, SEL_INST, 32'h000);
    mov(k, OP_REGISTER, SEL_INST, 32'h1F8);
    mov(k, OP_REGISTER, SEL_INST, 32'h1FF);
    mov(k, OP_DEREGISTER, SEL_INST, 32'h1FF);
    mov(k, OP_REGISTER, SEL_INST, 32'h1F0);
    for (int j = 0; j < N; j++)
      for (int p = 0; p < H / P; p++) begin
        mov(k, OP_PUTN_A, SEL_INST, 32'h100);
        mov(k, OP_PUTN_B, SEL_INST, 32'(p * P));
        mov_d8(k, 8'(j), 8'(P), 8'(k * H + p * P));
      end
    mov(k, OP_PUT1_A, SEL_INST, 32'h1F0);
    mov(k, OP_PUT1_B, SEL_INST, 32'hABC00 + 32'(k));
    mov_d8(k, 8'(nx), 8'd1, 8'd0);
    mov(k, OP_GET_A, SEL_INST, 32'h1F8);
    mov(k, OP_GET_B, SEL_INST, 32'h000);
    mov_d8(k, 8'(nx), 8'(G), 8'd2);
    // A run of NOPs arrives faster (one MOV per cycle) than the pipeline
    // retires them, so the Inst FIFO fills and stalls the MOV stream.
    for (int i = 0; i < 100; i++) mov(k, OP_NOP, SEL_INST, 32'h0);
    mov(k, OP_BARRIER, SEL_INST, 32'h0);
    mov(k, OP_END, SEL_INST, 32'h0);
  endtask

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    int t0, t_bar;
    bit [N-1:0] seen_done;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // Seed source arrays and clear destination areas.
    for (int k = 0; k < N; k++) begin
      for (int w = 0; w < H; w++) lad_write(base(k) + 16'h200 + 16'(w), 32'(k * 1000 + w));
      for (int w = 0; w < 16; w++) lad_write(base(k) + 16'h200 + 16'h100 + 16'(w), 32'hDEAD_0000);
      for (int w = 0; w < G; w++)  lad_write(base(k) + 16'h200 + 16'h1F8 + 16'(w), 32'hDEAD_0000);
      load_program(k);
    end
    lad_write(16'h0050, 32'h1);
    t0 = cycle;
    seen_done = '0;
    while (seen_done != '1) begin
      @(posedge clk);
      seen_done |= barrier_done;
    end
    t_bar = cycle - t0;
    $display("system barrier reached %0d cycles after system enable", t_bar);
    repeat (20) @(posedge clk);

    for (int j = 0; j < N; j++) begin
      // Total exchange results.
      for (int k = 0; k < N; k++)
        for (int w = 0; w < H; w++) begin
          lad_read(base(j) + 16'h200 + 16'h100 + 16'(k * H + w), rd);
          check(rd == 32'(k * 1000 + w), $sformatf("node %0d exchange word from %0d[%0d] = %0d", j, k, w, rd));
        end
      // PUT-1 from node j-1.
      lad_read(base(j) + 16'h200 + 16'h1F0, rd);
      check(rd == 32'hABC00 + 32'((j + N - 1) % N), $sformatf("node %0d PUT-1 word %h", j, rd));
      // GET from node j+1, starting at its word 2.
      for (int w = 0; w < G; w++) begin
        lad_read(base(j) + 16'h200 + 16'h1F8 + 16'(w), rd);
        check(rd == 32'(((j + 1) % N) * 1000 + 2 + w), $sformatf("node %0d GET word %0d = %0d", j, w, rd));
      end
      // System counter stopped at the barrier.
      lad_read(base(j) + 16'h100, rd);
      check(rd != 0, $sformatf("node %0d system counter %0d", j, rd));
    end

    $display("mechanisms: mmic_suspend=%0d get_reply=%0d put_rx=%0d packets=%0d barrier_done=%0d link_stall=%0d cpu_stall=%0d",
             n_susp, n_get, n_put, n_pkt, n_bar, n_stall, n_movwait);
    check(n_susp > 0, "MMIC suspend/resume never happened");
    check(n_get == N, "every GET answered once");
    check(n_put == N * N * (H / P) + N + N, "PUT packets received (exchange, PUT-1, GET replies)");
    check(n_pkt == N * N * (H / P) + N + N + N, "packets sent");
    check(n_bar == N, "every node saw barrier_done once");
    check(n_movwait > 0, "a full coprocessor FIFO never stalled the MOV stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
