// tb_router: 4x4 router with random packet traffic on every input and
// random back-pressure on every output.
// Each source sends packets of random length (1 to 31 words, header
// included) to random destination ids; the header carries the length in
// bits 20:16 and the destination id in bits 31:24, the payload words carry
// a tag (source, sequence number, word index). One routing entry is
// rewritten through the configuration port (id 7 -> port 2) before traffic.
// Checked: every packet leaves on the output its routing entry names, whole
// and uninterrupted, and packets from one source to one output keep their
// order; no packet is lost or duplicated; router_barrier is high only when
// the router is empty; an output held full makes the inputs stall (rx_full)
// without losing data; the latency of one packet through an idle router.
module tb_router;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0][31:0] rx_data, tx_data;
  logic [N-1:0] rx_valid, rx_full, tx_valid, tx_full;
  logic cfg_we = 0;
  logic [7:0] cfg_dpid = '0;
  logic [1:0] cfg_port = '0;
  logic router_barrier;

  router dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int route(input logic [7:0] d);
    return (d == 8'd7) ? 2 : d % N;
  endfunction

  // Expected packets per (source, output): first word of each packet.
  logic [31:0] expq [N][N][$];
  int sent_words = 0, recv_words = 0, stall_cycles = 0, pkts_recv = 0;
  bit  hold_full = 0, rand_full = 1;
  int  npk = 150;

  // Sources.
  logic [31:0] src_word [N];
  logic        src_valid [N];
  for (genvar s = 0; s < N; s++) begin : g_src
    assign rx_data[s]  = src_word[s];
    assign rx_valid[s] = src_valid[s];
  end
  task automatic send_pkt(input int s, input logic [7:0] d, input int len, input int seq);
    for (int w = 0; w < len; w++) begin
      @(negedge clk);
      src_word[s]  = (w == 0) ? {d, 3'b010, 5'(len), 8'(seq), 8'(s)} : {8'(s), 8'(seq), 16'(w)};
      src_valid[s] = 1'b1;
      @(posedge clk);
      while (rx_full[s]) begin stall_cycles++; @(posedge clk); end
      sent_words++;
    end
    @(negedge clk);
    src_valid[s] = 1'b0;
  endtask

  // Sinks: reassemble packets per output.
  int         rem [N];
  logic [7:0] cur_src [N];
  logic [7:0] cur_seq [N];
  int         widx [N];
  initial foreach (rem[j]) rem[j] = 0;
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) if (tx_valid[j] && !tx_full[j]) begin
      recv_words++;
      if (rem[j] == 0) begin
        logic [31:0] h;
        int s;
        h = tx_data[j];
        s = h[7:0];
        check(route(h[31:24]) == j, $sformatf("packet %h on output %0d", h, j));
        check(expq[s][j].size() > 0 && expq[s][j][0] == h,
              $sformatf("out %0d: header %h, expected %h", j, h, expq[s][j].size() ? expq[s][j][0] : 0));
        if (expq[s][j].size() > 0) void'(expq[s][j].pop_front());
        rem[j] = h[20:16] - 1;
        widx[j] = 1;
        cur_src[j] = h[7:0]; cur_seq[j] = h[15:8];
        pkts_recv++;
      end else begin
        check(tx_data[j] == {cur_src[j], cur_seq[j], 16'(widx[j])},
              $sformatf("out %0d: payload %h interrupted or corrupt", j, tx_data[j]));
        rem[j]--;
        widx[j]++;
      end
    end
  end
  always @(negedge clk)
    for (int j = 0; j < N; j++) tx_full[j] = hold_full || (rand_full && $urandom_range(0, 2) == 0);

  initial begin
    int t0, lat;
    foreach (src_valid[s]) begin src_valid[s] = 0; src_word[s] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_we = 1; cfg_dpid = 8'd7; cfg_port = 2'd2;
    @(negedge clk);
    cfg_we = 0;
    repeat (5) @(posedge clk);
    check(router_barrier, "router_barrier high when empty");

    // Latency through an idle router with no back-pressure.
    rand_full = 0;
    @(negedge clk);
    expq[1][3].push_back({8'd3, 3'b010, 5'd1, 8'd0, 8'd1});
    src_word[1] = {8'd3, 3'b010, 5'd1, 8'd0, 8'd1}; src_valid[1] = 1;
    @(posedge clk); t0 = $time; sent_words++;
    @(negedge clk); src_valid[1] = 0;
    check(!router_barrier, "router_barrier low with a packet inside");
    wait (tx_valid[3]);
    lat = ($time - t0) / 10;
    $display("router latency: %0d cycles from input edge to output valid", lat);
    check(lat == 13, $sformatf("router latency %0d", lat));
    repeat (5) @(posedge clk);

    // Back-pressure: hold every output full and send until the inputs stall.
    hold_full = 1;
    fork
      for (int k = 0; k < 40; k++) begin
        expq[0][1].push_back({8'd1, 3'b010, 5'd20, 8'(k), 8'd0});
        send_pkt(0, 8'd1, 20, k);
      end
      begin
        repeat (2000) @(posedge clk);
        check(rx_full[0], "input 0 stalls while its output is held full");
        check(recv_words == 1, "nothing leaves while the output is full");
        hold_full = 0;
      end
    join
    rand_full = 1;

    // Random traffic from all sources.
    for (int s0 = 0; s0 < N; s0++) begin
      automatic int s = s0;
      fork
        for (int k = 0; k < npk; k++) begin
          logic [7:0] d;
          int len;
          d   = ($urandom_range(0, 4) == 0) ? 8'd7 : 8'($urandom_range(0, 7));
          len = $urandom_range(1, 31);
          expq[s][route(d)].push_back({d, 3'b010, 5'(len), 8'(k), 8'(s)});
          send_pkt(s, d, len, k);
          if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(posedge clk);
        end
      join_none
    end
    wait fork;
    for (int c = 0; c < 50000 && !(router_barrier && recv_words == sent_words); c++) @(posedge clk);
    check(recv_words == sent_words, $sformatf("words sent %0d received %0d", sent_words, recv_words));
    for (int s = 0; s < N; s++) for (int j = 0; j < N; j++)
      check(expq[s][j].size() == 0, $sformatf("%0d packets %0d->%0d not delivered", expq[s][j].size(), s, j));
    check(router_barrier, "router_barrier high after traffic");
    $display("router: %0d packets, %0d words, %0d input stall cycles", pkts_recv, recv_words, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
