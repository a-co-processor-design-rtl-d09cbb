// cam32x32: 32-word by 32-bit CAM/RAM built from four cascaded cam32x9.
//
// Each cam32x9 stores one byte of the 32-bit word; its ninth data bit is tied
// to 0, as in the design. A word matches when all four bytes match, so the
// 32-bit match vector is the AND of the four byte match vectors, and a
// 32-to-5 encoder gives match_addr (the lowest matching address when several
// match). match_hit tells whether any address matched.
//
// Operations (same timing as cam32x9):
//   RAM lookup  addr -> data_out, combinational
//   CAM lookup  data_match -> match/match_addr, registered at the clock edge
//               with match_enable
//   WRITE32     addr, data_in, two cycles (erase, then write) driven through
//               write_enable / write_ram / write_erase
// init_busy is high for the 512 cycles after reset while the match arrays
// are cleared.
module cam32x32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  addr,
  input  logic [31:0] data_in,
  input  logic        write_enable,
  input  logic        write_ram,
  input  logic        write_erase,
  input  logic [31:0] data_match,
  input  logic        match_enable,
  input  logic        match_rst,
  output logic [31:0] match,
  output logic [4:0]  match_addr,
  output logic        match_hit,
  output logic [31:0] data_out,
  output logic        init_busy
);
  logic [31:0] byte_match [4];
  logic [8:0]  byte_out   [4];
  logic [3:0]  byte_init;

  for (genvar b = 0; b < 4; b++) begin : g_byte
    cam32x9 u_cam (
      .clk          (clk),
      .rst_n        (rst_n),
      .addr         (addr),
      .data_in      ({1'b0, data_in[8*b +: 8]}),
      .write_enable (write_enable),
      .write_ram    (write_ram),
      .write_erase  (write_erase),
      .data_match   ({1'b0, data_match[8*b +: 8]}),
      .match_enable (match_enable),
      .match_rst    (match_rst),
      .match        (byte_match[b]),
      .data_out     (byte_out[b]),
      .init_busy    (byte_init[b])
    );
    assign data_out[8*b +: 8] = byte_out[b][7:0];
  end

  assign match = byte_match[0] & byte_match[1] & byte_match[2] & byte_match[3];

  // 32-to-5 encoder, lowest set bit wins.
  always_comb begin
    match_addr = '0;
    for (int i = 31; i >= 0; i--) begin
      if (match[i]) match_addr = 5'(i);
    end
  end
  assign match_hit = |match;
  assign init_busy = |byte_init;

endmodule
