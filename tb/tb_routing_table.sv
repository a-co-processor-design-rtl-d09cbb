// tb_routing_table: shared routing lookup with its round-robin access
// controller (N=4).
// Checked: after reset entry d routes to d mod 4; configuration writes
// change single entries; each cycle exactly one requester is granted and
// port_out is the table entry of that requester's dpid; a requester held
// high is granted within N cycles (round-robin access); a lookup takes the
// cycle of the grant (one per cycle).
module tb_routing_table;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] req = '0, gnt;
  logic [N-1:0][7:0] dpid = '0;
  logic [1:0] port_out;
  logic cfg_we = 0;
  logic [7:0] cfg_dpid = '0;
  logic [1:0] cfg_port = '0;

  routing_table #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] model [256];
  int wait_cnt [N];

  initial begin
    foreach (model[d]) model[d] = 2'(d % N);
    foreach (wait_cnt[i]) wait_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Reset contents.
    for (int d = 0; d < 256; d++) begin
      @(negedge clk);
      req = 4'b0001; dpid[0] = 8'(d);
      #1 check(gnt == 4'b0001 && port_out == model[d], $sformatf("reset entry %0d -> %0d", d, port_out));
    end
    req = '0;
    // Random configuration writes and lookups.
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      cfg_we = ($urandom_range(0, 3) == 0);
      cfg_dpid = 8'($urandom); cfg_port = 2'($urandom);
      req = 4'($urandom);
      foreach (dpid[i]) dpid[i] = 8'($urandom_range(0, 15));
      #1;
      check($countones(gnt) == (req != 0) && (gnt & ~req) == 0, $sformatf("grant %b for requests %b", gnt, req));
      for (int i = 0; i < N; i++) if (gnt[i])
        check(port_out == model[dpid[i]], $sformatf("lookup %0d -> %0d, expected %0d", dpid[i], port_out, model[dpid[i]]));
      @(posedge clk);
      if (cfg_we) model[cfg_dpid] = cfg_port;
    end
    cfg_we = 0;
    // Round-robin access: all requests held, each granted once per N cycles.
    @(negedge clk);
    req = '1;
    for (int c = 0; c < 4 * N; c++) begin
      #1;
      for (int i = 0; i < N; i++) if (gnt[i]) wait_cnt[i]++;
      @(negedge clk);
    end
    foreach (wait_cnt[i]) check(wait_cnt[i] == 4, $sformatf("requester %0d granted %0d of %0d", i, wait_cnt[i], 4 * N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
