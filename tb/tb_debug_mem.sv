// tb_debug_mem: self-checking test of the link watcher, at DEPTH = 32.
//
// The test drives random link traffic with random back-pressure. A word
// held back by full is not a transfer and must not be recorded. The
// testbench keeps its own list of the words that moved, and then checks:
//   * count, including its saturation at DEPTH;
//   * the overflow flag;
//   * every stored word, read back through the read port with its
//     one-cycle latency;
//   * that a reset starts recording again at address 0.
module tb_debug_mem;

  localparam int DEPTH = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] link_data = '0;
  logic        link_valid = 1'b0, link_full = 1'b0;
  logic [4:0]  rd_addr = '0;
  logic        rd_en = 1'b0;
  logic [31:0] rd_data;
  logic [5:0]  count;
  logic        overflow;

  debug_mem #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] moved[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Model: every transfer on the link, in order.
  always @(posedge clk) if (rst_n && link_valid && !link_full) moved.push_back(link_data);

  task automatic traffic(input int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      link_valid = ($urandom % 3) != 0;
      link_full  = ($urandom % 4) == 0;
      link_data  = $urandom;
    end
    @(negedge clk);
    link_valid = 1'b0;
    link_full  = 1'b0;
  endtask

  task automatic read_back(input int n);
    for (int a = 0; a < n; a++) begin
      @(negedge clk);
      rd_addr = 5'(a); rd_en = 1'b1;
      @(negedge clk);
      rd_en = 1'b0;
      check(rd_data == moved[a], $sformatf("word %0d = %h, expected %h", a, rd_data, moved[a]));
    end
  endtask

  task automatic restart();
    @(negedge clk);
    rst_n = 1'b0;
    moved.delete();
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      restart();
      check(count == 0 && !overflow, "empty after reset");
      // Short rounds stay below DEPTH, long ones overflow it.
      traffic((round % 2 == 0) ? 1 + $urandom % 30 : 60 + $urandom % 40);
      @(negedge clk);
      n = moved.size();
      check(int'(count) == ((n < DEPTH) ? n : DEPTH), $sformatf("count %0d for %0d transfers", count, n));
      check(overflow == (n > DEPTH), $sformatf("overflow %0d for %0d transfers", overflow, n));
      read_back((n < DEPTH) ? n : DEPTH);
    end
    // A word held back by full is never recorded.
    restart();
    @(negedge clk);
    link_valid = 1'b1; link_full = 1'b1; link_data = 32'hBAD0_0001;
    repeat (5) @(negedge clk);
    link_full = 1'b0; link_data = 32'h600D_0001;
    @(negedge clk);
    link_valid = 1'b0;
    @(negedge clk);
    check(count == 1, "one transfer recorded after a held word");
    read_back(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
