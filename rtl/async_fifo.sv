// async_fifo: dual-clock first-in first-out buffer, the building block of
// every queue in the coprocessor and the router.
//
// Write and read sides have their own clocks and active-low resets. Pointers
// are one bit wider than the address and cross between domains as Gray code
// through two flip-flop synchronisers, so full and empty are conservative
// (they may stay asserted a little longer than needed, never too short).
// Reads are first-word-fall-through: rdata shows the oldest word whenever
// empty is low, and rd_en pops it at the next rclk edge. A write with
// full high or a read with empty high is ignored.
//
// Besides full/empty the FIFO reports wr_level (words held, as seen from the
// write side) and an idle flag for barrier detection: idle is high only when
// both sides agree the FIFO is empty, so a word can never be in flight
// between the write and read domains while idle is high.
//
// The dual-clock structure and the configurable size and width follow the
// design; the pointer scheme is the usual Gray-code one. DEPTH must be a
// power of two.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic [$clog2(DEPTH):0] wr_level,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,

  output logic             idle
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rq1_wgray, rq2_wgray;   // write pointer seen by the read side
  logic [AW:0] wq1_rgray, wq2_rgray;   // read pointer seen by the write side

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  // Write domain.
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin      <= '0;
      wgray     <= '0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
    end else begin
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wdata;
  end

  assign full     = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
  assign wr_level = wbin - gray2bin(wq2_rgray);

  // Read domain.
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin      <= '0;
      rgray     <= '0;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
    end else begin
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign empty = (rgray == rq2_wgray);
  assign rdata = mem[rbin[AW-1:0]];

  assign idle = empty && (wgray == wq2_rgray);

endmodule
