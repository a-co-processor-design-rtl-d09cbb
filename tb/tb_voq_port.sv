// tb_voq_port: one router input port with a routing-table model that grants
// at random and random crosspoint-full flags.
// Packets of random length (1..31 words, length in header bits 20:16) and
// random destination id arrive on the receive bus; the model routes id d to
// output d mod 4.
// Checked: every packet leaves on the crosspoint column of its route, as one
// uninterrupted burst (xb_sel constant for the whole packet), words intact
// and packets in order per column; no word is sent into a full crosspoint;
// rx_full stalls the bus when the port fills (Header FIFO or Input Memory)
// while the crosspoints are held full; idle only when empty.
module tb_voq_port;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] rx_data = '0, xb_data;
  logic rx_valid = 0, rx_full, rt_req, rt_gnt, xb_valid, idle;
  logic [7:0] rt_dpid;
  logic [1:0] rt_port, xb_sel;
  logic [N-1:0] xb_full;
  logic gnt_en;

  voq_port #(.N(N)) dut (.*);

  assign rt_gnt  = rt_req && gnt_en;
  assign rt_port = rt_dpid[1:0];

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

  bit hold = 0;
  always @(negedge clk) begin
    gnt_en  = $urandom_range(0, 1);
    xb_full = hold ? '1 : 4'($urandom) & 4'($urandom);
  end

  logic [31:0] expq [N][$];
  int sent = 0, recv = 0, rem = 0, stalls = 0;
  logic [1:0] burst_col;
  always @(posedge clk) if (rst_n && xb_valid) begin
    if (xb_full[xb_sel]) begin
      // not taken this cycle
    end else begin
      recv++;
      if (rem == 0) begin
        check(expq[xb_sel].size() > 0 && xb_data == expq[xb_sel][0],
              $sformatf("column %0d header %h", xb_sel, xb_data));
        if (expq[xb_sel].size() > 0) void'(expq[xb_sel].pop_front());
        rem = xb_data[20:16] - 1;
        burst_col = xb_sel;
      end else begin
        check(xb_sel == burst_col, "packet burst interrupted");
        check(xb_data[31:16] == 16'hBEEF, "payload word");
        rem--;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(idle, "idle after reset");
    // Fill the port with the crosspoints held full until the bus stalls.
    hold = 1;
    fork
      begin
        wait (rx_full && rx_valid);
        repeat (50) @(posedge clk);
        check(recv == 0, "nothing sent into full crosspoints");
        check(rx_full, "bus stays stalled");
        hold = 0;
      end
    join_none
    for (int k = 0; k < 300; k++) begin
      logic [7:0] d;
      int len;
      d = 8'($urandom);
      len = $urandom_range(1, 31);
      expq[d % N].push_back({d, 3'b010, 5'(len), 16'(k)});
      for (int w = 0; w < len; w++) begin
        @(negedge clk);
        rx_valid = 1;
        rx_data = (w == 0) ? {d, 3'b010, 5'(len), 16'(k)} : {16'hBEEF, 16'(w)};
        @(posedge clk);
        while (rx_full) begin stalls++; @(posedge clk); end
        sent++;
        if (k == 100 && w == 0) begin
          check(!idle, "not idle with packets inside");
        end
      end
      @(negedge clk);
      rx_valid = 0;
    end
    for (int c = 0; c < 20000 && !(idle && recv == sent); c++) @(posedge clk);
    check(stalls > 0, "the port filled and stalled the bus");
    check(recv == sent, $sformatf("words in %0d out %0d", sent, recv));
    foreach (expq[j]) check(expq[j].size() == 0, $sformatf("column %0d missing %0d packets", j, expq[j].size()));
    check(idle, "idle after traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
