// tb_coprocessor: one coprocessor in loop-back (its transmit bus feeds its
// own receive bus through a link that stalls at random), a main-memory
// model whose bus grant is withheld at random, and a CPU bus driver.
// Program: pid 0 of 1 process; register 0x100, 0x000, 0x1F0, 0x1F8; PUT-n of
// 20 words 0x000 -> 0x100; PUT-1 to 0x1F0; GET of 4 words from 0x002 into
// 0x1F8; BARRIER; deregister 0x1F0 and PUT-1 to it again (a lookup miss, delivered
// to slot 0 = 0x100); BARRIER; END.
// Checked: memory contents after every transfer, packet / PUT / GET pulse
// counts, lookup misses, barrier handshake, running flag; then, with no
// stalls, the latency of a lone PUT-1 and of a lone BARRIER against the
// cycle counts of this implementation.
module tb_coprocessor;
  import mpi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cs = 0, we = 0, ready;
  logic [1:0] a = '0;
  logic [7:0] op = '0;
  logic [31:0] wdata = '0;
  logic mm_req, mm_gnt, mm_en, mm_we;
  logic [31:0] mm_addr, mm_wdata, mm_rdata;
  logic [31:0] rx_data, tx_data;
  logic rx_valid, rx_full, tx_valid, tx_full;
  logic executed_barrier, barrier_done, barrier_done_ack;
  logic [7:0] pid, nprocs;
  logic running, aborted, mm_suspended, pkt_sent, got_put, got_get;
  logic [15:0] lookup_miss;
  logic stall = 0, deny = 0;
  bit   randomize = 1;

  coprocessor dut (
    .*, .have_others_done(executed_barrier)
  );

  // loop-back link
  assign rx_data  = tx_data;
  assign rx_valid = tx_valid && !stall;
  assign tx_full  = rx_full || stall;
  // memory model
  logic [31:0] mem [512];
  assign mm_gnt = mm_req && !deny;
  always @(posedge clk) begin
    if (mm_en && mm_we) mem[mm_addr[8:0]] <= mm_wdata;
    if (mm_en) mm_rdata <= mem[mm_addr[8:0]];
  end
  always @(negedge clk) if (randomize) begin
    stall = ($urandom_range(0, 3) == 0);
    deny  = ($urandom_range(0, 3) == 0);
  end
  assign barrier_done_ack = barrier_done;

  int checks = 0, failures = 0;
  int n_sent = 0, n_put = 0, n_get = 0, n_susp = 0, n_bar = 0;
  always @(posedge clk) if (rst_n) begin
    n_sent += pkt_sent; n_put += got_put; n_get += got_get; n_susp += mm_suspended; n_bar += barrier_done;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: sent=%0d put=%0d get=%0d exec_bar=%0d st=%s ih=%0d", n_sent, n_put, n_get, executed_barrier, dut.u_pipe.state.name(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] o, input logic [1:0] sel, input logic [31:0] d);
    @(negedge clk);
    cs = 1; we = 1; a = sel; op = o; wdata = d;
    @(posedge clk);
    while (!ready) @(posedge clk);
    @(negedge clk);
    cs = 0; we = 0;
  endtask
  task automatic wr_d8(input logic [7:0] dp, input logic [7:0] l, input logic [7:0] off);
    wr(8'h00, SEL_DATA8, 32'(dp)); wr(8'h00, SEL_DATA8, 32'(l)); wr(8'h00, SEL_DATA8, 32'(off));
  endtask
  task automatic put1(input logic [31:0] dst, input logic [31:0] d);
    wr(OP_PUT1_A, SEL_INST, dst); wr(OP_PUT1_B, SEL_INST, d); wr_d8(8'd0, 8'd1, 8'd0);
  endtask
  task automatic do_reset();
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (!dut.u_rt.busy);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    int t0, t1, lat_put1, lat_bar;
    foreach (mem[i]) mem[i] = 32'h1000 + i;
    do_reset();
    wr(OP_SET_PID, SEL_INST, 0); wr(OP_SET_NPROCS, SEL_INST, 1); wr(OP_BEGIN, SEL_INST, 0);
    wr(OP_REGISTER, SEL_INST, 32'h100); wr(OP_REGISTER, SEL_INST, 32'h000);
    wr(OP_REGISTER, SEL_INST, 32'h1F0); wr(OP_REGISTER, SEL_INST, 32'h1F8);
    wr(OP_PUTN_A, SEL_INST, 32'h100); wr(OP_PUTN_B, SEL_INST, 32'h000); wr_d8(8'd0, 8'd20, 8'd0);
    put1(32'h1F0, 32'hABCD_0001);
    wr(OP_GET_A, SEL_INST, 32'h1F8); wr(OP_GET_B, SEL_INST, 32'h000); wr_d8(8'd0, 8'd4, 8'd2);
    // The CPU issues nothing after BARRIER until barrier_done: the barrier
    // waits for every FIFO, the Inst FIFO included, to drain.
    wr(OP_BARRIER, SEL_INST, 0);
    wait (n_bar == 1);
    // Deregister only once no packet for the slot can be in flight.
    wr(OP_DEREGISTER, SEL_INST, 32'h1F0);
    put1(32'h1F0, 32'hABCD_0002);
    wr(OP_BARRIER, SEL_INST, 0);
    wait (n_bar == 2);
    wr(OP_END, SEL_INST, 0);
    repeat (300) @(posedge clk);
    check(pid == 0 && nprocs == 1, "pid / nprocs");
    check(!running && !aborted, "END executed");
    // PUT-n 0x000..0x013 -> 0x100..; the late miss PUT-1 then lands in 0x100.
    check(mem[9'h100] == 32'hABCD_0002, $sformatf("miss PUT-1 at slot 0 address: %h", mem[9'h100]));
    for (int i = 1; i < 20; i++)
      check(mem[9'h100 + i] == 32'h1000 + i, $sformatf("PUT-n word %0d = %h", i, mem[9'h100 + i]));
    check(mem[9'h114] == 32'h1114, "PUT-n does not overrun");
    check(mem[9'h1F0] == 32'hABCD_0001, $sformatf("PUT-1 word %h", mem[9'h1F0]));
    for (int i = 0; i < 4; i++)
      check(mem[9'h1F8 + i] == 32'h1002 + i, $sformatf("GET word %0d = %h", i, mem[9'h1F8 + i]));
    check(mem[9'h1FC] == 32'h11FC, "GET does not overrun");
    check(n_sent == 5, $sformatf("packets sent %0d (PUT-n, PUT-1, GET, reply, PUT-1)", n_sent));
    check(n_put == 4, $sformatf("PUTs received %0d", n_put));
    check(n_get == 1, $sformatf("GETs received %0d", n_get));
    check(lookup_miss == 1, $sformatf("lookup misses %0d", lookup_miss));
    check(n_bar == 2, "two barrier_done pulses");

    // Latencies with no stalls, measured from the clock edge that takes the
    // last CPU write of the instruction.
    randomize = 0; stall = 0; deny = 0;
    do_reset();
    wr(OP_REGISTER, SEL_INST, 32'h1F0);
    repeat (20) @(posedge clk);
    wr(OP_PUT1_A, SEL_INST, 32'h1F0); wr(OP_PUT1_B, SEL_INST, 32'h5); wr(8'h00, SEL_DATA8, 0); wr(8'h00, SEL_DATA8, 1);
    @(negedge clk); cs = 1; we = 1; a = SEL_DATA8; wdata = 0;
    @(posedge clk); t0 = $time; @(negedge clk); cs = 0; we = 0;
    wait (got_put); t1 = $time;
    lat_put1 = (t1 - t0) / 10;
    repeat (20) @(posedge clk);
    check(mem[9'h1F0] == 32'h5, "timed PUT-1 delivered");
    @(negedge clk); cs = 1; we = 1; a = SEL_INST; op = OP_BARRIER; wdata = 0;
    @(posedge clk); t0 = $time; @(negedge clk); cs = 0; we = 0;
    wait (barrier_done); t1 = $time;
    lat_bar = (t1 - t0) / 10;
    $display("latency: PUT-1 %0d cycles to got_put, BARRIER %0d cycles to barrier_done", lat_put1, lat_bar);
    check(lat_put1 == 23, "PUT-1 latency");
    check(lat_bar == 8, "BARRIER latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
