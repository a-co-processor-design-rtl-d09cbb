// tb_prio_enc: the next-vacant-slot encoder against its truth table (the
// lowest clear status bit wins; all ones gives 31 and full), exhaustively
// for the 33 "ones then a zero" patterns and for random status words.
module tb_prio_enc;
  logic [31:0] status = '0;
  logic [4:0]  index;
  logic        full;
  prio_enc #(.N(32)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 32; k++) begin
      status = (k == 32) ? '1 : ((32'h1 << k) - 1);
      status |= (k < 31) ? ($urandom << (k + 1)) : '0;
      #1;
      check(index == ((k == 32) ? 5'd31 : 5'(k)), $sformatf("k=%0d index %0d", k, index));
      check(full == (k == 32), $sformatf("k=%0d full", k));
    end
    for (int i = 0; i < 200; i++) begin
      int exp;
      status = $urandom | $urandom;
      exp = 31;
      for (int b = 31; b >= 0; b--) if (!status[b]) exp = b;
      #1;
      check(index == 5'(exp), $sformatf("random %h index %0d exp %0d", status, index, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
