// tb_pkt_ctrl: packet controller test with models of the In FIFO, the
// registration table RAM lookup (global g maps to 0x1000 + 0x100*g, the
// grant is withheld at random), the MMIC task port and the pipeline's
// injection port. A PUT-1, a PUT-n and a GET are delivered: the PUTs must
// produce write tasks {In FIFO -> memory, packet length - 1, local + offset}
// and wait for wr_done; the GET must produce a PUT-n request with the local
// source (+ offset), local destination, length and requester id.
module tb_pkt_ctrl;
  import mpi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_empty, in_rd, rt_req, rt_gnt, task_req, task_ack, wr_done = 0;
  logic [31:0] in_rdata, rt_data = '0;
  logic [4:0] rt_gaddr;
  mm_task_t task_out;
  logic inj_valid, inj_ack = 0, idle, got_put, got_get;
  logic [31:0] inj_src, inj_dst;
  logic [7:0] inj_len, inj_dpid;

  pkt_ctrl dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] iq [32];
  int ih = 0, it = 0;
  mm_task_t tasks [$];
  int n_inj = 0;

  assign in_empty = (ih == it);
  assign in_rdata = iq[ih];
  always @(negedge clk) rt_gnt = rt_req && ($urandom_range(0, 1) == 1);
  assign task_ack = task_req;

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
    if (in_rd) ih <= ih + 1;
    if (rt_req && rt_gnt) rt_data <= 32'h1000 + 32'h100 * rt_gaddr;
    if (task_req && task_ack) tasks.push_back(task_out);
    if (inj_valid && inj_ack) begin
      n_inj <= n_inj + 1;
      check(inj_src == 32'h1000 + 32'h100 * 5 + 3, $sformatf("GET source %h", inj_src));
      check(inj_dst == 32'h1000 + 32'h100 * 7, $sformatf("GET destination %h", inj_dst));
      check(inj_len == 8'd12 && inj_dpid == 8'd2, "GET length and requester");
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // PUT-1 to global 4, offset 2, data word.
    iq[it++] = {8'd1, PKT_PUT1, 5'd2, 8'd2, 8'd4};
    iq[it++] = 32'hDDDD_0001;
    wait (tasks.size() == 1);
    check(tasks[0].dir == MM_WRITE && tasks[0].len == 1 && tasks[0].addr == 32'h1402, "PUT-1 task");
    repeat (5) @(posedge clk);
    check(ih == 1, "data word left for the MMIC");
    check(!idle, "waits for the MMIC");
    ih = 2;                      // the MMIC drains the data word
    @(negedge clk); wr_done = 1; @(negedge clk); wr_done = 0;
    // PUT-n of 6 words to global 3, offset 16.
    iq[it++] = {8'd1, PKT_PUTN, 5'd7, 8'd16, 8'd3};
    for (int w = 0; w < 6; w++) iq[it++] = 32'hEEEE_0000 + w;
    wait (tasks.size() == 2);
    check(tasks[1].dir == MM_WRITE && tasks[1].len == 6 && tasks[1].addr == 32'h1310, "PUT-n task");
    ih = ih + 6;
    @(negedge clk); wr_done = 1; @(negedge clk); wr_done = 0;
    // GET: source global 5 offset 3, requester 2 wants 12 words into global 7.
    iq[it++] = {8'd1, PKT_GET, 5'd2, 8'd3, 8'd5};
    iq[it++] = {8'd2, 8'd12, 8'd0, 8'd7};
    wait (inj_valid);
    repeat (3) @(posedge clk);
    @(negedge clk); inj_ack = 1; @(negedge clk); inj_ack = 0;
    repeat (3) @(posedge clk);
    check(n_inj == 1, "one injected PUT-n");
    check(idle && ih == it, "idle with the In FIFO drained");
    check(tasks.size() == 2, "GET makes no MMIC task");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
