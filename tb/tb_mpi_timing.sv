// tb_mpi_timing: single-instruction and PUT-n / GET-n timing on a
// two-node system (mpi_system with N = 2, otherwise default sizes).
//
// Each case follows the measurement the original design used. Node 0 runs
// one instruction followed by BARRIER, while node 1 runs only BARRIER. Both
// nodes first run the same set-up, which is SET_PID, SET_NPROCS, BEGIN and
// REGISTER of 0x100 (global 0, destination) and 0x000 (global 1, source).
// The DEREGISTER case also registers 0x1F0 in its set-up.
// The cases are: BARRIER alone, REGISTER, DEREGISTER, and PUT-n and GET-n
// for n = 1, 2, 4, 8, 16 and 30.
//
// The system is reset before every case. The time of a case is the larger
// of the two nodes' system counters. The cost of the instruction is that
// time minus the time of the set-up followed by BARRIER, plus the time of
// BARRIER alone. This counts from the instruction's first MOV, as the
// original figures do. The results are printed next to the original
// figures, which come from a pipeline with overlapped stages and are
// smaller. This design runs its pipeline stages one after another.
//
// Checks:
//   * the transferred words arrive;
//   * every case reaches the barrier;
//   * GET-n costs more than PUT-n;
//   * the cost grows by one cycle per word, with a 1-cycle tolerance,
//     from n = 16 to n = 30;
//   * REGISTER and DEREGISTER cost more than BARRIER alone.
module tb_mpi_timing;
  import mpi_pkg::*;

  localparam int N = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] lad_addr = '0;
  logic        lad_we = 1'b0, lad_re = 1'b0;
  logic [31:0] lad_wdata = '0, lad_rdata;
  logic [N-1:0] barrier_done, mm_suspended, pkt_sent, got_put, got_get, mov_waiting, link_stall;
  logic [N-1:0][9:0] sys_count;
  logic sys_en, system_barrier;

  mpi_system #(.N(N)) dut (
    .clk, .rst_n, .lad_addr, .lad_we, .lad_re, .lad_wdata, .lad_rdata,
    .cfg_we(1'b0), .cfg_dpid(8'h00), .cfg_port(1'b0),
    .sys_en, .barrier_done, .system_barrier, .sys_count, .mm_suspended,
    .pkt_sent, .got_put, .got_get, .mov_waiting, .link_stall
  );

  typedef enum int {C_BARRIER, C_SETUP, C_SETUP_D, C_REG, C_DEREG, C_PUT, C_GET} case_e;

  int checks = 0, failures = 0;

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

  function automatic logic [31:0] src_word(input int run, input int k, input int w);
    return {8'hA5, 8'(run), 8'(k), 8'(w)};
  endfunction

  // Runs one case from reset and returns the larger system counter.
  task automatic run_case(input int run, input case_e c, input int n, output int t);
    logic [31:0] rd;
    int guard;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Let the registration-table CAMs finish clearing after reset.
    repeat (600) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      for (int w = 0; w < 32; w++) begin
        lad_write(base(k) + 16'h200 + 16'(w), src_word(run, k, w));
        lad_write(base(k) + 16'h300 + 16'(w), 32'hDEAD_0000);
      end
      if (c != C_BARRIER) begin
        mov(k, OP_SET_PID, SEL_INST, 32'(k));
        mov(k, OP_SET_NPROCS, SEL_INST, 32'(N));
        mov(k, OP_BEGIN, SEL_INST, 32'h0);
        mov(k, OP_REGISTER, SEL_INST, 32'h100);
        mov(k, OP_REGISTER, SEL_INST, 32'h000);
        if (c == C_DEREG || c == C_SETUP_D) mov(k, OP_REGISTER, SEL_INST, 32'h1F0);
      end
      if (k == 0) begin
        case (c)
          C_REG:   mov(k, OP_REGISTER, SEL_INST, 32'h1F0);
          C_DEREG: mov(k, OP_DEREGISTER, SEL_INST, 32'h1F0);
          C_PUT: begin
            mov(k, OP_PUTN_A, SEL_INST, 32'h100);
            mov(k, OP_PUTN_B, SEL_INST, 32'h000);
            mov_d8(k, 8'd1, 8'(n), 8'd0);
          end
          C_GET: begin
            mov(k, OP_GET_A, SEL_INST, 32'h100);
            mov(k, OP_GET_B, SEL_INST, 32'h000);
            mov_d8(k, 8'd1, 8'(n), 8'd0);
          end
          default: ;
        endcase
      end
      mov(k, OP_BARRIER, SEL_INST, 32'h0);
    end
    lad_write(16'h0050, 32'h1);
    guard = 0;
    while (!system_barrier && guard < 5000) begin
      @(posedge clk);
      guard++;
    end
    check(guard < 5000, $sformatf("case %0d n=%0d reached the system barrier", c, n));
    repeat (20) @(posedge clk);
    t = 0;
    for (int k = 0; k < N; k++) begin
      lad_read(base(k) + 16'h100, rd);
      if (int'(rd) > t) t = int'(rd);
    end
    // Data check for transfers: PUT lands on node 1, GET on node 0.
    if (c == C_PUT || c == C_GET) begin
      int dst_node, src_node;
      dst_node = (c == C_PUT) ? 1 : 0;
      src_node = 1 - dst_node;
      for (int w = 0; w < n; w++) begin
        lad_read(base(dst_node) + 16'h300 + 16'(w), rd);
        check(rd == src_word(run, src_node, w),
              $sformatf("case %0d n=%0d word %0d = %h", c, n, w, rd));
      end
      lad_read(base(dst_node) + 16'h300 + 16'(n), rd);
      check(rd == 32'hDEAD_0000, $sformatf("case %0d n=%0d wrote past its end", c, n));
    end
  endtask

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run, t_bar, t_setup, t_setup_d, t_reg, t_dereg, t;
    int sizes[6] = '{1, 2, 4, 8, 16, 30};
    int ref_put[6] = '{31, 32, 34, 38, 46, 59};
    int ref_get[6] = '{44, 46, 48, 52, 60, 73};
    int t_put[6], t_get[6];
    run = 0;
    run_case(run++, C_BARRIER, 0, t_bar);
    run_case(run++, C_SETUP, 0, t_setup);
    run_case(run++, C_REG, 0, t);
    t_reg = t - t_setup + t_bar;
    // DEREGISTER needs a registered 0x1F0: its set-up registers it on both
    // nodes, and that longer set-up is its baseline.
    run_case(run++, C_SETUP_D, 0, t_setup_d);
    run_case(run++, C_DEREG, 0, t);
    t_dereg = t - t_setup_d + t_bar;
    for (int i = 0; i < 6; i++) begin
      run_case(run++, C_PUT, sizes[i], t);
      t_put[i] = t - t_setup + t_bar;
      run_case(run++, C_GET, sizes[i], t);
      t_get[i] = t - t_setup + t_bar;
    end

    $display("instruction      cycles to barrier   original design");
    $display("Barrier          %6d              8", t_bar);
    $display("Registration     %6d             10", t_reg);
    $display("Deregistration   %6d             11", t_dereg);
    for (int i = 0; i < 6; i++)
      $display("PUT-%-2d / GET-%-2d  %6d / %-6d     %0d / %0d",
               sizes[i], sizes[i], t_put[i], t_get[i], ref_put[i], ref_get[i]);

    check(t_reg > t_bar, "REGISTER costs more than BARRIER alone");
    check(t_dereg > t_bar, "DEREGISTER costs more than BARRIER alone");
    for (int i = 0; i < 6; i++)
      check(t_get[i] > t_put[i], $sformatf("GET-%0d costs more than PUT-%0d", sizes[i], sizes[i]));
    for (int i = 1; i < 6; i++) begin
      check(t_put[i] >= t_put[i-1], $sformatf("PUT-%0d not faster than PUT-%0d", sizes[i], sizes[i-1]));
      check(t_get[i] >= t_get[i-1], $sformatf("GET-%0d not faster than GET-%0d", sizes[i], sizes[i-1]));
    end
    check(t_put[5] - t_put[4] >= 13 && t_put[5] - t_put[4] <= 15,
          $sformatf("PUT-n grows one cycle per word (16 -> 30: %0d)", t_put[5] - t_put[4]));
    check(t_get[5] - t_get[4] >= 13 && t_get[5] - t_get[4] <= 15,
          $sformatf("GET-n grows one cycle per word (16 -> 30: %0d)", t_get[5] - t_get[4]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
