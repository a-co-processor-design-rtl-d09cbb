// tb_cam32x9: writes random 9-bit words (two-cycle erase + write) to all
// addresses, overwrites some, and checks every match row (one-hot decoded,
// including multi-matches), the RAM read port, the state between the erase
// and write cycles, match_enable holding and match_rst clearing.
module tb_cam32x9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] addr = '0;
  logic [8:0] data_in = '0, data_match = '0, data_out;
  logic write_enable = 0, write_ram = 0, write_erase = 0, match_enable = 0, match_rst = 0;
  logic [31:0] match;
  logic init_busy;

  cam32x9 dut (.*);

  int checks = 0, failures = 0;
  logic [8:0] model [32];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write9(input logic [4:0] a, input logic [8:0] v);
    @(negedge clk);
    addr = a; data_in = v; write_enable = 1; write_ram = 1; write_erase = 0;
    @(negedge clk);
    write_ram = 0; write_erase = 1;
    @(negedge clk);
    write_enable = 0; write_erase = 0;
    model[a] = v;
  endtask

  function automatic logic [31:0] expect_row(input logic [8:0] v);
    logic [31:0] r = '0;
    for (int a = 0; a < 32; a++) r[a] = (model[a] == v);
    return r;
  endfunction

  task automatic lookup(input logic [8:0] v);
    @(negedge clk);
    data_match = v; match_enable = 1;
    @(negedge clk);
    match_enable = 0;
    check(match == expect_row(v), $sformatf("match %0d got %h exp %h", v, match, expect_row(v)));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(init_busy, "clearing after reset");
    wait (!init_busy);
    for (int a = 0; a < 32; a++) write9(5'(a), 9'($urandom_range(0, 40)));
    for (int i = 0; i < 60; i++) write9(5'($urandom), 9'($urandom_range(0, 40)));
    for (int v = 0; v <= 41; v++) lookup(9'(v));
    for (int i = 0; i < 40; i++) lookup(9'($urandom));
    // RAM lookup.
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); addr = 5'(a); #1;
      check(data_out == model[a], $sformatf("data_out[%0d]", a));
    end
    // Between erase and write the old value is gone and the new not yet in.
    begin
      logic [8:0] old;
      old = model[7];
      @(negedge clk);
      addr = 7; data_in = 9'h1AB; write_enable = 1; write_ram = 1; write_erase = 0;
      @(negedge clk);
      write_enable = 0; write_ram = 0;
      data_match = old; match_enable = 1;
      @(negedge clk);
      check(match[7] == 1'b0, "old value erased after erase cycle");
      data_match = 9'h1AB;
      @(negedge clk);
      match_enable = 0;
      check(match[7] == 1'b0, "new value not yet written after erase cycle");
      write_enable = 1; write_erase = 1;
      @(negedge clk);
      write_enable = 0; write_erase = 0;
      model[7] = 9'h1AB;
      lookup(9'h1AB);
    end
    // Hold and clear.
    lookup(model[3]);
    @(negedge clk); data_match = 9'h1FF;
    @(negedge clk);
    check(match == expect_row(model[3]), "match held without match_enable");
    match_rst = 1;
    @(negedge clk); match_rst = 0;
    check(match == '0, "match_rst clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
