// tb_ctm: one coprocessor test module (BASE 0x3000) in loop-back: its
// transmit bus feeds its own receive bus and have_others_done is its own
// executed_barrier, so it is a one-process MPI system.
// The host loads main memory and a MOV program over the LAD bus, raises
// sys_en and later reads memory and the system counter back.
// Program: pid 0 of 1; register 0x100, 0x000, 0x1F0, 0x1F8; two PUT-n of
// 20 words 0x000 -> 0x100 and 0x014 -> 0x114; PUT-1 to 0x1F0; GET of 4
// words from 0x002 into 0x1F8; BARRIER.
// Checked: memory after the transfers; LAD writes to another base are
// ignored; the MMIC is suspended by MOVs while it holds the CAD bus; the
// control logic holds the END MOV behind BARRIER until barrier_done; the
// counter stops when the barrier
// completes and reads the same later; a BARRIER-only program's count; the
// debug memory holds every word that crossed the receive link, in order,
// and its word count (BASE+0x101) matches.
module tb_ctm;
  import mpi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [15:0] B = 16'h3000;
  logic sys_en = 0;
  logic [15:0] lad_addr = '0;
  logic lad_we = 0, lad_re = 0;
  logic [31:0] lad_wdata = '0, lad_rdata;
  logic [31:0] rx_data, tx_data;
  logic rx_valid, rx_full, tx_valid, tx_full;
  logic executed_barrier, barrier_done;
  logic [9:0] sys_count;
  logic mm_suspended, pkt_sent, got_put, got_get, mov_waiting;
  logic [15:0] lookup_miss;

  ctm #(.BASE(B)) dut (.*, .have_others_done(executed_barrier));
  assign rx_data  = tx_data;
  assign rx_valid = tx_valid;
  assign tx_full  = rx_full;

  int checks = 0, failures = 0;
  int n_susp = 0, n_bar = 0, n_put = 0, n_get = 0;
  logic [31:0] rx_log[$];
  always @(posedge clk) if (rst_n && rx_valid && !rx_full) rx_log.push_back(rx_data);
  always @(posedge clk) if (rst_n) begin
    n_susp += mm_suspended; n_bar += barrier_done; n_put += got_put; n_get += got_get;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
  task automatic mov(input logic [7:0] opc, input logic [1:0] a, input logic [31:0] d);
    lad_write(B + 16'h400, {opc, 22'h0, a});
    lad_write(B + 16'h600, d);
  endtask
  task automatic mov_d8(input logic [7:0] dpid, input logic [7:0] len, input logic [7:0] off);
    mov(8'h00, SEL_DATA8, 32'(dpid)); mov(8'h00, SEL_DATA8, 32'(len)); mov(8'h00, SEL_DATA8, 32'(off));
  endtask
  task automatic do_reset();
    sys_en = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (!dut.u_cop.u_rt.busy);
  endtask

  initial begin
    logic [31:0] rd, c1, c2;
    do_reset();
    for (int w = 0; w < 512; w++) lad_write(B + 16'h200 + 16'(w), 32'h5000 + w);
    lad_write(16'h1200 + 16'h005, 32'hBAD);          // another node's memory
    mov(OP_SET_PID, SEL_INST, 0); mov(OP_SET_NPROCS, SEL_INST, 1); mov(OP_BEGIN, SEL_INST, 0);
    mov(OP_REGISTER, SEL_INST, 32'h100); mov(OP_REGISTER, SEL_INST, 32'h000);
    mov(OP_REGISTER, SEL_INST, 32'h1F0); mov(OP_REGISTER, SEL_INST, 32'h1F8);
    mov(OP_PUTN_A, SEL_INST, 32'h100); mov(OP_PUTN_B, SEL_INST, 32'h000); mov_d8(8'd0, 8'd20, 8'd0);
    mov(OP_PUTN_A, SEL_INST, 32'h100); mov(OP_PUTN_B, SEL_INST, 32'h014); mov_d8(8'd0, 8'd20, 8'd20);
    mov(OP_PUT1_A, SEL_INST, 32'h1F0); mov(OP_PUT1_B, SEL_INST, 32'hFACE); mov_d8(8'd0, 8'd1, 8'd0);
    mov(OP_GET_A, SEL_INST, 32'h1F8); mov(OP_GET_B, SEL_INST, 32'h000); mov_d8(8'd0, 8'd4, 8'd2);
    // Filler MOVs (NOPs) that compete with the MMIC for the CAD bus.
    for (int k = 0; k < 30; k++) mov(OP_NOP, SEL_INST, 0);
    mov(OP_BARRIER, SEL_INST, 0);
    mov(OP_END, SEL_INST, 0);
    @(negedge clk);
    sys_en = 1;
    wait (n_bar == 1);
    check(dut.u_cop.running, "END held behind the BARRIER until barrier_done");
    repeat (200) @(posedge clk);
    check(!dut.u_cop.running, "END executed after barrier_done");
    lad_read(B + 16'h100, c1);
    repeat (50) @(posedge clk);
    lad_read(B + 16'h100, c2);
    $display("ctm: barrier after %0d cycles, %0d MMIC suspensions", c1, n_susp);
    check(c1 == c2 && c1 != 0, $sformatf("counter stopped at %0d / %0d", c1, c2));
    check(n_susp > 0, "MOVs suspended the MMIC");
    check(n_put == 4 && n_get == 1, $sformatf("PUT %0d GET %0d received", n_put, n_get));
    for (int w = 0; w < 40; w++) begin
      lad_read(B + 16'h200 + 16'h100 + 16'(w), rd);
      check(rd == 32'h5000 + w, $sformatf("PUT-n word %0d = %h", w, rd));
    end
    lad_read(B + 16'h200 + 16'h1F0, rd);
    check(rd == 32'hFACE, "PUT-1 word");
    for (int w = 0; w < 4; w++) begin
      lad_read(B + 16'h200 + 16'h1F8 + 16'(w), rd);
      check(rd == 32'h5002 + w, $sformatf("GET word %0d = %h", w, rd));
    end
    lad_read(B + 16'h200 + 16'h005, rd);
    check(rd == 32'h5005, "write to another base ignored");
    check(lookup_miss == 0, "no lookup miss");
    // Debug memory: 2 PUT-n of 21 words, PUT-1 and GET of 2, reply of 5.
    lad_read(B + 16'h101, rd);
    check(int'(rd) == rx_log.size() && rx_log.size() == 51,
          $sformatf("debug memory holds %0d words, link moved %0d", rd, rx_log.size()));
    for (int w = 0; w < rx_log.size(); w++) begin
      lad_read(B + 16'h800 + 16'(w), rd);
      check(rd == rx_log[w], $sformatf("debug word %0d = %h, link moved %h", w, rd, rx_log[w]));
    end

    // BARRIER-only program.
    do_reset();
    mov(OP_BARRIER, SEL_INST, 0);
    @(negedge clk);
    sys_en = 1;
    wait (n_bar == 2);
    repeat (20) @(posedge clk);
    lad_read(B + 16'h100, c1);
    $display("ctm: BARRIER alone counts %0d cycles", c1);
    check(c1 == 11, $sformatf("BARRIER-only count %0d", c1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
