// tb_crossbar: 4x4 buffered crossbar, each input sending whole packets to
// random columns while honouring row_full, outputs stalled at random.
// Checked: each output carries uninterrupted packets, words intact, packets
// from one input to one output in order; nothing lost; a write is never
// lost to a full crosspoint; idle only when empty; the latency of one word
// from an input through an idle crosspoint to its output.
module tb_crossbar;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0][1:0]  in_sel;
  logic [N-1:0][31:0] in_data, out_data;
  logic [N-1:0]       in_valid, out_valid, out_full;
  logic [N-1:0][N-1:0] row_full;
  logic idle;

  crossbar #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit rand_full = 0;
  always @(negedge clk) out_full = rand_full ? 4'($urandom) & 4'($urandom) : '0;

  logic [31:0] expq [N][N][$];
  int sent = 0, recv = 0;
  int rem [N];
  logic [7:0] cur [N];
  initial foreach (rem[j]) rem[j] = 0;
  always @(posedge clk) if (rst_n) for (int j = 0; j < N; j++) if (out_valid[j] && !out_full[j]) begin
    recv++;
    if (rem[j] == 0) begin
      int i;
      i = out_data[j][7:0];
      check(expq[i][j].size() > 0 && expq[i][j][0] == out_data[j], $sformatf("out %0d header %h", j, out_data[j]));
      if (expq[i][j].size() > 0) void'(expq[i][j].pop_front());
      rem[j] = out_data[j][20:16] - 1;
      cur[j] = out_data[j][15:8];
    end else begin
      check(out_data[j][31:24] == 8'hAA && out_data[j][23:16] == cur[j], $sformatf("out %0d payload %h", j, out_data[j]));
      rem[j]--;
    end
  end

  task automatic send(input int i, input int j, input int len, input int seq);
    for (int w = 0; w < len; w++) begin
      @(negedge clk);
      in_sel[i] = 2'(j);
      in_data[i] = (w == 0) ? {8'(j), 3'b010, 5'(len), 8'(seq), 8'(i)} : {8'hAA, 8'(seq), 16'(w)};
      in_valid[i] = !row_full[i][j];
      @(posedge clk);
      while (!in_valid[i]) begin
        @(negedge clk); in_valid[i] = !row_full[i][j]; @(posedge clk);
      end
      sent++;
    end
    @(negedge clk);
    in_valid[i] = 0;
  endtask

  initial begin
    int t0, lat;
    in_valid = '0; in_sel = '0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(idle, "idle after reset");
    // Latency of a one-word packet.
    expq[2][1].push_back({8'd1, 3'b010, 5'd1, 8'd0, 8'd2});
    @(negedge clk);
    in_sel[2] = 2'd1; in_data[2] = {8'd1, 3'b010, 5'd1, 8'd0, 8'd2}; in_valid[2] = 1;
    @(posedge clk); t0 = $time; sent++;
    @(negedge clk); in_valid[2] = 0;
    check(!idle, "not idle with a word inside");
    wait (out_valid[1]);
    lat = ($time - t0) / 10;
    $display("crossbar latency: %0d cycles", lat);
    check(lat == 2, $sformatf("crossbar latency %0d", lat));
    repeat (5) @(posedge clk);
    rand_full = 1;
    for (int i0 = 0; i0 < N; i0++) begin
      automatic int i = i0;
      fork
        for (int k = 0; k < 200; k++) begin
          int j, len;
          j = $urandom_range(0, N - 1);
          len = $urandom_range(1, 31);
          expq[i][j].push_back({8'(j), 3'b010, 5'(len), 8'(k), 8'(i)});
          send(i, j, len, k);
        end
      join_none
    end
    wait fork;
    for (int c = 0; c < 20000 && !(idle && recv == sent); c++) @(posedge clk);
    check(recv == sent, $sformatf("words in %0d out %0d", sent, recv));
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      check(expq[i][j].size() == 0, $sformatf("%0d packets %0d->%0d missing", expq[i][j].size(), i, j));
    check(idle, "idle after traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
