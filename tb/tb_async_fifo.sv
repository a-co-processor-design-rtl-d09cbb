// tb_async_fifo: dual-clock FIFO test with unrelated write and read clocks.
// Random pushes and pops are compared with a queue model; the FIFO must
// report full after DEPTH writes with no reads, deliver words in order,
// report empty once drained, and raise idle only after both sides settle.
module tb_async_fifo;
  localparam int W = 16, D = 8;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  logic wr_en = 0, rd_en = 0, full, empty, idle;
  logic [W-1:0] wdata = '0, rdata;
  logic [$clog2(D):0] wr_level;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Writer.
  int n_written = 0;
  bit  fill_phase = 1;
  always @(negedge wclk) if (wrst_n) begin
    wr_en = 0;
    if (fill_phase ? 1 : ($urandom_range(0, 2) != 0)) begin
      if (n_written < 300 && !full) begin
        wr_en = 1;
        wdata = W'($urandom);
      end
    end
  end
  always @(posedge wclk) if (wr_en && !full) begin
    model.push_back(wdata);
    n_written++;
  end

  // Reader.
  int n_read = 0;
  always @(negedge rclk) if (rrst_n) rd_en = !fill_phase && ($urandom_range(0, 1) == 1);
  always @(posedge rclk) if (rd_en && !empty) begin
    logic [W-1:0] exp;
    exp = model.pop_front();
    check(rdata == exp, $sformatf("read %0d got %h exp %h", n_read, rdata, exp));
    n_read++;
  end

  initial begin
    repeat (2) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    check(empty && idle && !full, "empty after reset");
    // Fill with no reads: full after exactly D writes.
    wait (n_written == D);
    repeat (4) @(posedge wclk);
    check(full, "full after DEPTH writes");
    check(n_written == D, "no write accepted when full");
    check(wr_level == D, "write-side level at DEPTH");
    check(!idle, "not idle while holding data");
    fill_phase = 0;
    wait (n_read == 300);
    repeat (8) @(posedge wclk);
    check(empty, "empty after draining");
    check(idle, "idle after both sides settle");
    check(model.size() == 0, "model drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
