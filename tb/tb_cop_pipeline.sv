// tb_cop_pipeline: instruction engine test with a real registration table
// and models of the Inst, Data and Data8 FIFOs, the MMIC task port and the
// Head FIFO (both of which report full at random).
// Program: SET_PID 5, SET_NPROCS 4, BEGIN, REGISTER 0x100/0x200/0x300,
// PUT-1, PUT-n, GET, DEREGISTER 0x200, PUT-n to the freed address (a lookup
// miss), BARRIER, then END, which must wait until the barrier is released.
// A PUT-n request from the packet controller is injected mid-program.
// Checked: every header word and data word in the Head FIFO, every MMIC
// task, the pid/nprocs/running registers, the miss counter, the barrier
// hold-off, and the cycle count of a lone PUT-1 with no back-pressure.
module tb_cop_pipeline;
  import mpi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic inst_empty, inst_rd, data_empty, data_rd, d8_empty, d8_rd;
  logic [7:0] inst_op;
  logic [31:0] data_word;
  logic [23:0] d8_word;
  logic inj_valid = 0, inj_ack;
  logic [31:0] inj_src = '0, inj_dst = '0;
  logic [7:0] inj_len = '0, inj_dpid = '0;
  logic rt_start, rt_claim, rt_match_hit, rt_busy;
  rt_mode_e rt_mode;
  logic [31:0] rt_data_in;
  logic [4:0] rt_match_addr;
  logic task_we, task_full = 0, head_we, head_full = 0, bar_start, bar_pending = 0;
  mm_task_t task_out;
  logic [31:0] head_wdata;
  logic [7:0] pid, nprocs;
  logic running, aborted, idle;
  logic [15:0] lookup_miss;

  cop_pipeline dut (.*);

  reg_table u_rt (
    .clk, .rst_n, .start(rt_start), .mode(rt_mode), .rt_addr(5'd0), .rt_data_in,
    .rt_data_out(), .rt_match_addr, .rt_match_hit, .reg_addr(), .reg_ok(),
    .busy(rt_busy), .full(), .status()
  );

  int checks = 0, failures = 0;
  logic [7:0]  iq [64];
  logic [31:0] dq [64];
  logic [23:0] d8q [64];
  int ih = 0, it = 0, dh = 0, dt = 0, d8h = 0, d8t = 0;
  logic [31:0] heads [$];
  mm_task_t tasks [$];
  bit random_full = 1;

  assign inst_empty = (ih == it);
  assign inst_op    = iq[ih];
  assign data_empty = (dh == dt);
  assign data_word  = dq[dh];
  assign d8_empty   = (d8h == d8t);
  assign d8_word    = d8q[d8h];

  always @(posedge clk) begin
    if (inst_rd) ih <= ih + 1;
    if (data_rd) dh <= dh + 1;
    if (d8_rd) d8h <= d8h + 1;
    if (rst_n && head_we && !head_full) heads.push_back(head_wdata);
    if (rst_n && task_we && !task_full) tasks.push_back(task_out);
  end
  always @(negedge clk) if (random_full) begin
    head_full = ($urandom_range(0, 3) == 0);
    task_full = ($urandom_range(0, 3) == 0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ins(input opcode_e o, input logic [31:0] d);
    iq[it] = o; it++; dq[dt] = d; dt++;
  endtask
  task automatic d8(input logic [7:0] dp, input logic [7:0] l, input logic [7:0] off);
    d8q[d8t] = {dp, l, off}; d8t++;
  endtask

  initial begin
    logic [31:0] h;
    mm_task_t t;
    int c0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ins(OP_SET_PID, 5); ins(OP_SET_NPROCS, 4); ins(OP_BEGIN, 0);
    ins(OP_REGISTER, 32'h100); ins(OP_REGISTER, 32'h200); ins(OP_REGISTER, 32'h300);
    ins(OP_PUT1_A, 32'h300); ins(OP_PUT1_B, 32'hCAFE_0001); d8(8'd2, 8'd1, 8'd7);
    ins(OP_PUTN_A, 32'h200); ins(OP_PUTN_B, 32'h040); d8(8'd3, 8'd20, 8'd4);
    ins(OP_GET_A, 32'h100); ins(OP_GET_B, 32'h300); d8(8'd1, 8'd9, 8'd2);
    ins(OP_DEREGISTER, 32'h200);
    ins(OP_PUTN_A, 32'h200); ins(OP_PUTN_B, 32'h050); d8(8'd0, 8'd3, 8'd0);
    ins(OP_BARRIER, 0);
    // Injected PUT-n while the program runs.
    wait (heads.size() >= 2);
    @(negedge clk);
    inj_valid = 1; inj_src = 32'h080; inj_dst = 32'h100; inj_len = 8'd6; inj_dpid = 8'd9;
    wait (inj_ack); @(negedge clk); inj_valid = 0;
    // Barrier holds off the next instruction.
    wait (bar_start); @(negedge clk);
    bar_pending = 1;
    ins(OP_END, 0);
    repeat (20) @(posedge clk);
    check(running, "END not executed while the barrier is pending");
    bar_pending = 0;
    repeat (20) @(posedge clk);
    check(!running, "END executed after the barrier");
    check(pid == 5 && nprocs == 4, "pid / nprocs registers");
    // Head FIFO contents. Slots: 0x100 -> 0, 0x200 -> 1, 0x300 -> 2.
    check(heads.size() == 7, $sformatf("%0d head words", heads.size()));
    h = heads.pop_front(); check(h == {8'd2, PKT_PUT1, 5'd2, 8'd7, 8'd2}, $sformatf("PUT-1 header %h", h));
    h = heads.pop_front(); check(h == 32'hCAFE_0001, "PUT-1 data word");
    // The injected PUT-n comes between instructions; find both PUT-n headers.
    for (int k = 0; k < 5; k++) begin
      h = heads.pop_front();
      case (h[23:21])
        PKT_PUTN: begin
          if (h[31:24] == 8'd3)      check(h == {8'd3, PKT_PUTN, 5'd21, 8'd4, 8'd1}, $sformatf("PUT-n header %h", h));
          else if (h[31:24] == 8'd9) check(h == {8'd9, PKT_PUTN, 5'd7, 8'd0, 8'd0}, $sformatf("injected PUT-n header %h", h));
          else                       check(h == {8'd0, PKT_PUTN, 5'd4, 8'd0, 8'd0}, $sformatf("miss PUT-n header %h", h));
        end
        PKT_GET: begin
          check(h == {8'd1, PKT_GET, 5'd2, 8'd2, 8'd2}, $sformatf("GET header 1 %h", h));
          h = heads.pop_front(); k++;
          check(h == {8'd5, 8'd9, 8'd0, 8'd0}, $sformatf("GET header 2 %h", h));
        end
        default: check(0, $sformatf("unexpected head word %h", h));
      endcase
    end
    check(tasks.size() == 3, "three MMIC tasks");
    foreach (tasks[i])
      check(tasks[i] == '{dir: MM_READ, len: 8'd20, addr: 32'h040} ||
            tasks[i] == '{dir: MM_READ, len: 8'd6,  addr: 32'h080} ||
            tasks[i] == '{dir: MM_READ, len: 8'd3,  addr: 32'h050}, $sformatf("MMIC task %p", tasks[i]));
    check(lookup_miss == 1, $sformatf("one lookup miss (%0d)", lookup_miss));
    // Cycle count of a lone PUT-1 with no back-pressure: F D DF F D DF EX1
    // (lookup) EX1 (result) EX2 EX2 = 10 cycles from fetch to the data word.
    random_full = 0; head_full = 0; task_full = 0;
    repeat (5) @(posedge clk);
    heads.delete();
    @(negedge clk);
    ins(OP_PUT1_A, 32'h300); ins(OP_PUT1_B, 32'h1); d8(8'd2, 8'd1, 8'd0);
    c0 = $time;
    wait (heads.size() == 2);
    check(($time - c0 + 5) / 10 == 10, $sformatf("PUT-1 in %0d cycles", ($time - c0 + 5) / 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
