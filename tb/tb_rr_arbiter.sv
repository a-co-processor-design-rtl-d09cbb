// tb_rr_arbiter: round-robin arbiter with N=4 and N=5 against a reference
// pointer model, driven by random requests and random advance.
// Checked every cycle: gnt is one-hot and a requester, gnt_idx matches gnt,
// any is the OR of req, and the grant is the first requester at or after
// the model's pointer. Fairness: with every request held high and advance
// every cycle, each requester is granted exactly once in any N cycles.
module tb_rr_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  logic [3:0] req4 = '0, gnt4;
  logic [1:0] idx4;
  logic       any4, adv4 = 0;
  logic [4:0] req5 = '0, gnt5;
  logic [2:0] idx5;
  logic       any5, adv5 = 0;

  rr_arbiter #(.N(4)) u4 (.clk, .rst_n, .req(req4), .advance(adv4), .gnt(gnt4), .gnt_idx(idx4), .any(any4));
  rr_arbiter #(.N(5)) u5 (.clk, .rst_n, .req(req5), .advance(adv5), .gnt(gnt5), .gnt_idx(idx5), .any(any5));

  int ptr4 = 0, ptr5 = 0;

  function automatic int first_from(input int ptr, input logic [7:0] req, input int n);
    for (int k = 0; k < n; k++) if (req[(ptr + k) % n]) return (ptr + k) % n;
    return -1;
  endfunction

  task automatic check_cycle();
    int e4, e5;
    e4 = first_from(ptr4, 8'(req4), 4);
    e5 = first_from(ptr5, 8'(req5), 5);
    check(any4 == |req4 && any5 == |req5, "any");
    if (e4 < 0) check(gnt4 == 0, "N=4 no grant without request");
    else check(gnt4 == 4'(1 << e4) && idx4 == 2'(e4), $sformatf("N=4 req %b ptr %0d gnt %b", req4, ptr4, gnt4));
    if (e5 < 0) check(gnt5 == 0, "N=5 no grant without request");
    else check(gnt5 == 5'(1 << e5) && idx5 == 3'(e5), $sformatf("N=5 req %b ptr %0d gnt %b", req5, ptr5, gnt5));
    @(posedge clk);
    if (adv4 && e4 >= 0) ptr4 = (e4 + 1) % 4;
    if (adv5 && e5 >= 0) ptr5 = (e5 + 1) % 5;
  endtask

  initial begin
    int seen4 [4];
    int seen5 [5];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      req4 = 4'($urandom); req5 = 5'($urandom);
      adv4 = $urandom_range(0, 1); adv5 = $urandom_range(0, 1);
      #1 check_cycle();
    end
    // Fairness with all requests held.
    @(negedge clk);
    req4 = '1; req5 = '1; adv4 = 1; adv5 = 1;
    for (int r = 0; r < 10; r++) begin
      foreach (seen4[i]) seen4[i] = 0;
      foreach (seen5[i]) seen5[i] = 0;
      for (int c = 0; c < 20; c++) begin
        @(negedge clk);
        seen4[idx4]++; seen5[idx5]++;
      end
      foreach (seen4[i]) check(seen4[i] == 5, $sformatf("N=4 requester %0d granted %0d of 20", i, seen4[i]));
      foreach (seen5[i]) check(seen5[i] == 4, $sformatf("N=5 requester %0d granted %0d of 20", i, seen5[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
