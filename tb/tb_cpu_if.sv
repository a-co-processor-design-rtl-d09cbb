// tb_cpu_if: CPU write port test. Checks that an A=00 write pushes the
// opcode and data word into the Inst and Data FIFOs together, that every
// third A=01 write pushes {dpid, length, offset} into the Data8 FIFO, that
// writes without cs do nothing and that ready drops while a target FIFO is
// full (and the write is then not taken).
module tb_cpu_if;
  import mpi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cs = 0, we = 0, ready;
  logic [1:0] a = '0;
  logic [7:0] op = '0, inst_wdata;
  logic [31:0] wdata = '0, data_wdata;
  logic inst_we, data_we, d8_we, inst_full = 0, data_full = 0, d8_full = 0;
  logic [23:0] d8_wdata;

  cpu_if dut (.*);

  int checks = 0, failures = 0;
  logic [7:0]  inst_q [$];
  logic [31:0] data_q [$];
  logic [23:0] d8_q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (inst_we) inst_q.push_back(inst_wdata);
    if (data_we) data_q.push_back(data_wdata);
    if (d8_we)   d8_q.push_back(d8_wdata);
  end

  task automatic wr(input logic [1:0] aa, input logic [7:0] o, input logic [31:0] d, input bit sel = 1);
    @(negedge clk);
    cs = sel; we = 1; a = aa; op = o; wdata = d;
    @(negedge clk);
    cs = 0; we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(SEL_INST, OP_PUTN_A, 32'h0000_0100);
    wr(SEL_INST, OP_PUTN_B, 32'h0000_0040);
    wr(SEL_DATA8, 8'h00, 32'hFFFF_FF03);
    wr(SEL_DATA8, 8'h00, 32'h0000_001E);
    check(d8_q.size() == 0, "no Data8 push before the third byte");
    wr(SEL_DATA8, 8'h00, 32'h0000_0007);
    wr(SEL_INST, OP_BARRIER, 32'h0, 0);       // cs low: ignored
    check(inst_q.size() == 2 && data_q.size() == 2, "two instruction words");
    check(inst_q[0] == OP_PUTN_A && inst_q[1] == OP_PUTN_B, "opcodes in order");
    check(data_q[0] == 32'h100 && data_q[1] == 32'h40, "operands in order");
    check(d8_q.size() == 1 && d8_q[0] == 24'h03_1E_07, $sformatf("Data8 word %h", d8_q[0]));
    // Full Inst FIFO stalls the CPU.
    inst_full = 1;
    @(negedge clk);
    cs = 1; we = 1; a = SEL_INST; op = OP_BEGIN; wdata = 0;
    #1 check(!ready && !inst_we && !data_we, "ready low while Inst FIFO full");
    @(negedge clk);
    inst_full = 0;
    #1 check(ready && inst_we, "write goes through once there is room");
    @(negedge clk);
    cs = 0; we = 0;
    check(inst_q.size() == 3 && inst_q[2] == OP_BEGIN, "stalled write taken once");
    // Full Data8 FIFO stalls only the third byte.
    d8_full = 1;
    wr(SEL_DATA8, 8'h00, 32'h11);
    wr(SEL_DATA8, 8'h00, 32'h22);
    @(negedge clk);
    cs = 1; we = 1; a = SEL_DATA8; wdata = 32'h33;
    #1 check(!ready && !d8_we, "third byte waits for Data8 room");
    d8_full = 0;
    #1 check(ready && d8_we && d8_wdata == 24'h112233, "third byte pushes when room");
    @(negedge clk);
    cs = 0; we = 0;
    check(d8_q.size() == 2, "one Data8 push");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
