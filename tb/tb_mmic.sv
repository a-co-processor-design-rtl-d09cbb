// tb_mmic: main memory interface controller test.
// A memory model answers reads one cycle after the address; the grant is
// withdrawn at random, so tasks are suspended mid-transfer and must resume
// where they stopped. Read tasks must deliver the right words, in order,
// into the Out FIFO model (whose room is limited, so the room check is
// exercised); write tasks must copy the In FIFO model's words to memory and
// pulse wr_done once each. With the grant held, a read task must move one
// word per cycle.
module tb_mmic;
  import mpi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int OUTD = 16;
  logic task_we = 0, task_full, task_idle;
  mm_task_t task_in = '0;
  logic mm_req, mm_gnt = 0, mm_en, mm_we;
  logic [31:0] mm_addr, mm_wdata, mm_rdata = '0;
  logic out_we, out_full;
  logic [31:0] out_wdata;
  logic [$clog2(OUTD):0] out_level;
  logic in_rd, in_empty;
  logic [31:0] in_rdata;
  logic busy, wr_done, suspended;

  mmic #(.TASK_DEPTH(16), .OUT_DEPTH(OUTD)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] mem [256];
  logic [31:0] outq [$], exp_out [$];
  logic [31:0] in_mem [64];
  int in_head = 0, in_tail = 0;
  int n_done = 0, n_susp = 0, drain = 1;
  bit random_gnt = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory and FIFO models.
  assign out_level = ($clog2(OUTD)+1)'(outq.size());
  assign out_full  = outq.size() >= OUTD;
  assign in_empty  = (in_head == in_tail);
  assign in_rdata  = in_mem[in_head];
  always @(posedge clk) begin
    if (mm_en && mm_gnt) begin
      if (mm_we) mem[mm_addr[7:0]] <= mm_wdata;
      mm_rdata <= mem[mm_addr[7:0]];
    end
    if (out_we) outq.push_back(out_wdata);
    if (in_rd) in_head <= in_head + 1;
    if (drain && outq.size() > 0 && $urandom_range(0, 3) != 0) begin
      logic [31:0] w;
      w = outq.pop_front();
      check(exp_out.size() > 0 && w == exp_out[0], $sformatf("out word %h", w));
      if (exp_out.size() > 0) void'(exp_out.pop_front());
    end
    if (wr_done) n_done <= n_done + 1;
    if (suspended) n_susp <= n_susp + 1;
  end
  always @(negedge clk) if (random_gnt) mm_gnt = mm_req && ($urandom_range(0, 3) != 0);

  task automatic push_task(input logic dir, input int len, input int addr);
    @(negedge clk);
    while (task_full) @(negedge clk);
    task_we = 1; task_in = '{dir: dir, len: 8'(len), addr: 32'(addr)};
    @(negedge clk);
    task_we = 0;
  endtask

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 32'hA000_0000 + i;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Read tasks.
    for (int t = 0; t < 6; t++) begin
      int len, addr;
      len = $urandom_range(1, 30); addr = $urandom_range(0, 200);
      for (int w = 0; w < len; w++) exp_out.push_back(32'hA000_0000 + addr + w);
      push_task(MM_READ, len, addr);
    end
    wait (exp_out.size() == 0 && !busy);
    check(1, "read tasks drained");
    // Write tasks.
    for (int t = 0; t < 4; t++) begin
      int len, addr;
      len = 8; addr = 16 + 8 * t;
      for (int w = 0; w < len; w++) begin in_mem[in_tail] = 32'hB000_0000 + 32'(t * 100 + w); in_tail++; end
      push_task(MM_WRITE, len, addr);
    end
    wait (n_done == 4);
    repeat (3) @(posedge clk);
    for (int t = 0; t < 4; t++)
      for (int w = 0; w < 8; w++)
        check(mem[16 + 8 * t + w] == 32'hB000_0000 + 32'(t * 100 + w), $sformatf("memory word %0d = %h", 16 + 8 * t + w, mem[16 + 8 * t + w]));
    check(n_susp > 0, "a transfer was suspended and resumed");
    check(n_done == 4, "one wr_done per write task");
    // Throughput with a steady grant: 10 words in 10 cycles.
    random_gnt = 0; mm_gnt = 1;
    for (int w = 0; w < 10; w++) exp_out.push_back(32'hA000_0000 + 50 + w);
    push_task(MM_READ, 10, 50);
    begin
      int c0, c1;
      wait (out_we); c0 = $time;
      wait (!busy); c1 = $time;
      check((c1 - c0) / 10 <= 11, $sformatf("one word per cycle (%0d cycles)", (c1 - c0) / 10));
    end
    wait (exp_out.size() == 0);
    check(task_idle && !busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
