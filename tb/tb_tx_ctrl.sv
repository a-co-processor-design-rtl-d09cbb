// tb_tx_ctrl: packet transmitter test. Head FIFO and Out FIFO models hold a
// PUT-1, a PUT-n whose data arrives late in the Out FIFO, a GET and a second
// PUT-n; the receiver's full flag toggles at random. The word stream on the
// bus must be exactly the packets in header order, each PUT-n carrying its
// Out FIFO words, and pkt_sent must pulse once per packet.
module tb_tx_ctrl;
  import mpi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic head_empty, head_rd, out_empty, out_rd, tx_valid, tx_full = 0, idle, pkt_sent;
  logic [31:0] head_rdata, out_rdata, tx_data;

  tx_ctrl dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] hq [32], oq [32], exp [64];
  int hh = 0, ht = 0, oh = 0, ot = 0, ne = 0, nrx = 0, npkt = 0;

  assign head_empty = (hh == ht);
  assign head_rdata = hq[hh];
  assign out_empty  = (oh == ot);
  assign out_rdata  = oq[oh];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (head_rd) hh <= hh + 1;
    if (out_rd) oh <= oh + 1;
    if (tx_valid && !tx_full) begin
      check(nrx < ne && tx_data == exp[nrx], $sformatf("word %0d = %h exp %h", nrx, tx_data, exp[nrx]));
      nrx <= nrx + 1;
    end
    if (pkt_sent) npkt <= npkt + 1;
  end
  always @(negedge clk) tx_full = ($urandom_range(0, 2) == 0);

  function automatic logic [31:0] hdr(input pkt_type_e t, input int plen, input int g);
    return {8'd3, t, 5'(plen), 8'd9, 8'(g)};
  endfunction

  task automatic head(input logic [31:0] w);
    hq[ht] = w; ht++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // PUT-1
    head(hdr(PKT_PUT1, 2, 1)); head(32'h1111_0001);
    exp[0] = hdr(PKT_PUT1, 2, 1); exp[1] = 32'h1111_0001;
    // PUT-n of 4 words, data comes later
    head(hdr(PKT_PUTN, 5, 2));
    exp[2] = hdr(PKT_PUTN, 5, 2);
    for (int w = 0; w < 4; w++) exp[3 + w] = 32'h2222_0000 + w;
    // GET
    head(hdr(PKT_GET, 2, 4)); head({8'd1, 8'd6, 8'd0, 8'd5});
    exp[7] = hdr(PKT_GET, 2, 4); exp[8] = {8'd1, 8'd6, 8'd0, 8'd5};
    // PUT-n of 2 words
    head(hdr(PKT_PUTN, 3, 6));
    exp[9] = hdr(PKT_PUTN, 3, 6);
    exp[10] = 32'h3333_0000; exp[11] = 32'h3333_0001;
    ne = 12;
    repeat (20) @(posedge clk);
    check(nrx == 3, $sformatf("PUT-n waits for its data (%0d words sent)", nrx));
    for (int w = 0; w < 4; w++) begin oq[ot] = 32'h2222_0000 + w; ot++; end
    oq[ot] = 32'h3333_0000; ot++;
    oq[ot] = 32'h3333_0001; ot++;
    wait (nrx == ne);
    repeat (5) @(posedge clk);
    check(npkt == 4, $sformatf("pkt_sent pulses %0d", npkt));
    check(idle, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
