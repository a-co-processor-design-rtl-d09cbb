// tb_cam32x32: fills the 32 x 32 CAM with random words (some repeated, some
// sharing bytes with others), then checks CAM lookups (hit, lowest matching
// address, full match vector), misses for words that share only some bytes
// with stored ones (each byte position in turn), and RAM lookups.
module tb_cam32x32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] addr = '0, match_addr;
  logic [31:0] data_in = '0, data_match = '0, match, data_out;
  logic write_enable = 0, write_ram = 0, write_erase = 0, match_enable = 0, match_rst = 0, match_hit, init_busy;

  cam32x32 dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [32];

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

  task automatic write32(input logic [4:0] a, input logic [31:0] v);
    @(negedge clk);
    addr = a; data_in = v; write_enable = 1; write_ram = 1; write_erase = 0;
    @(negedge clk);
    write_ram = 0; write_erase = 1;
    @(negedge clk);
    write_enable = 0; write_erase = 0;
    model[a] = v;
  endtask

  task automatic lookup(input logic [31:0] v);
    logic [31:0] exp = '0;
    int first = -1;
    for (int a = 31; a >= 0; a--) if (model[a] == v) begin exp[a] = 1; first = a; end
    @(negedge clk);
    data_match = v; match_enable = 1;
    @(negedge clk);
    match_enable = 0;
    check(match == exp, $sformatf("match vector for %h", v));
    check(match_hit == (first >= 0), $sformatf("hit for %h", v));
    if (first >= 0) check(match_addr == 5'(first), $sformatf("match_addr for %h: %0d exp %0d", v, match_addr, first));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(init_busy, "clearing after reset");
    wait (!init_busy);
    for (int a = 0; a < 32; a++) write32(5'(a), {8'($urandom_range(18, 19)), 8'($urandom_range(0, 3)), 8'h56, 8'($urandom_range(0, 7))});
    write32(5'd20, 32'hCAFE_F00D);
    write32(5'd9,  32'hCAFE_F00D);
    for (int a = 0; a < 32; a++) lookup(model[a]);
    lookup(32'hCAFE_F00D);
    lookup(32'hCAFE_F00E);        // three bytes match, one does not
    lookup(32'h1203_5608);
    lookup(32'hFFFF_FFFF);
    // Words that differ from a stored one in exactly one byte must miss
    // unless stored themselves.
    for (int k = 0; k < 64; k++) begin
      int b;
      logic [31:0] v;
      b = $urandom_range(0, 3);
      v = model[$urandom_range(0, 31)];
      v[8*b +: 8] = v[8*b +: 8] ^ 8'(1 << $urandom_range(0, 7));
      lookup(v);
    end
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); addr = 5'(a); #1;
      check(data_out == model[a], $sformatf("data_out[%0d] %h exp %h", a, data_out, model[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
