// tb_reg_table: registration table test.
// Replays the worked example of the design (register 2000, 5000, 10000 get
// global addresses 0, 1, 2; deregistering 5000 frees 1; registering 2345
// reuses 1), checks the busy lengths (1 cycle for a registration, 2 for a
// deregistration, so 2 and 3 cycles per operation), combined RAM and CAM
// lookups, deregistration of an unknown word, filling the table to full,
// and a random register/deregister/lookup sequence against a model.
module tb_reg_table;
  import mpi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  rt_mode_e mode = RT_NOP;
  logic [4:0] rt_addr = '0, rt_match_addr, reg_addr;
  logic [31:0] rt_data_in = '0, rt_data_out, status;
  logic rt_match_hit, reg_ok, busy, full;

  reg_table dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [32];
  logic        used [32];

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

  // Issue an operation and return the number of cycles until the table
  // accepts the next one.
  task automatic op(input rt_mode_e m, input logic [31:0] d, output int cycles);
    @(negedge clk);
    while (busy) @(negedge clk);
    mode = m; rt_data_in = d; start = 1;
    @(negedge clk);
    start = 0; mode = RT_NOP;
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
  endtask

  task automatic do_reg(input logic [31:0] d, input int exp_slot);
    int c;
    op(RT_REG, d, c);
    if (exp_slot >= 0) begin
      check(reg_ok && reg_addr == 5'(exp_slot), $sformatf("register %0d -> slot %0d (exp %0d)", d, reg_addr, exp_slot));
      check(c == 2, $sformatf("registration takes 2 cycles, took %0d", c));
      model[exp_slot] = d; used[exp_slot] = 1;
    end else begin
      check(!reg_ok, "registration refused when full");
    end
  endtask

  task automatic do_dereg(input logic [31:0] d);
    int c;
    op(RT_DEREG, d, c);
    check(c == 3, $sformatf("deregistration takes 3 cycles, took %0d", c));
    for (int s = 0; s < 32; s++) if (used[s] && model[s] == d) begin used[s] = 0; break; end
  endtask

  task automatic do_lookup(input logic [31:0] d, input logic [4:0] a);
    int c, exp;
    exp = -1;
    for (int s = 31; s >= 0; s--) if (used[s] && model[s] == d) exp = s;
    @(negedge clk);
    while (busy) @(negedge clk);
    mode = RT_LOOKUP; rt_data_in = d; rt_addr = a; start = 1;
    @(negedge clk);
    start = 0;
    check(rt_match_hit == (exp >= 0), $sformatf("CAM hit for %0d", d));
    if (exp >= 0) check(rt_match_addr == 5'(exp), $sformatf("CAM lookup %0d -> %0d exp %0d", d, rt_match_addr, exp));
    if (used[a]) check(rt_data_out == model[a], $sformatf("RAM lookup slot %0d -> %0d exp %0d", a, rt_data_out, model[a]));
  endtask

  function automatic int first_free();
    for (int s = 0; s < 32; s++) if (!used[s]) return s;
    return -1;
  endfunction

  initial begin
    for (int s = 0; s < 32; s++) begin used[s] = 0; model[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(busy, "busy while the CAM clears");
    wait (!busy);
    // Worked example.
    do_reg(2000, 0);
    do_reg(5000, 1);
    do_reg(10000, 2);
    do_lookup(5000, 0);
    do_dereg(5000);
    do_lookup(5000, 2);
    check(status[2:0] == 3'b101, "slot 1 freed");
    do_reg(2345, 1);
    do_lookup(2345, 1);
    do_lookup(10000, 1);
    do_dereg(777);                 // not registered: nothing changes
    check(status[2:0] == 3'b111, "unknown deregistration changes nothing");
    do_lookup(0, 0);               // freed slots hold zero but never match
    // Fill the table.
    while (first_free() >= 0) do_reg(32'h1000_0000 + 32'($urandom_range(0, 9999)) * 4, first_free());
    check(full, "full after 32 registrations");
    do_reg(32'h5555, -1);
    // Random mix.
    for (int i = 0; i < 300; i++) begin
      int r, s;
      r = $urandom_range(0, 2);
      s = $urandom_range(0, 31);
      if (r == 0 && used[s]) do_dereg(model[s]);
      else if (r == 1 && first_free() >= 0) do_reg(32'($urandom), first_free());
      else do_lookup(used[s] ? model[s] : 32'($urandom), 5'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
