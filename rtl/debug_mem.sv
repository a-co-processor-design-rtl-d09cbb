// debug_mem: link watcher for the test systems. It is a dual-port RAM that
// records, in order, every word that crosses one packet link. The host
// reads it back over the LAD bus.
//
// How it works: port A watches the link and writes each word that moves
// (valid && !full, the link's transfer rule) at the next address. Port B is
// a read port for the host. Recording starts at address 0 after reset. When
// all DEPTH words are used, it stops, so the first DEPTH words of traffic
// are kept. `count` says how many words are valid (it saturates at DEPTH),
// and `overflow` says that traffic was lost after that.
//
// Interface: link_* taps the link and drives nothing onto it. rd_addr /
// rd_en form the read port, and rd_data is valid in the cycle after rd_en.
// Timing: a word is stored on the same clock edge on which it moves.
//
// The idea of a block RAM on a link, read back by the host, follows the
// original test systems. The depth, the stop-when-full rule and the word
// count are this design's choices.
module debug_mem #(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // watched link
  input  logic [31:0]              link_data,
  input  logic                     link_valid,
  input  logic                     link_full,
  // host read port
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  input  logic                     rd_en,
  output logic [31:0]              rd_data,
  // status
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];
  logic        take;

  assign take = link_valid && !link_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (take) begin
      if (count < (AW+1)'(DEPTH)) count <= count + 1'b1;
      else                        overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (take && count < (AW+1)'(DEPTH)) mem[count[AW-1:0]] <= link_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
