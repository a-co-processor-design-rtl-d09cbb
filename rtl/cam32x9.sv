// cam32x9: 32-word by 9-bit content-addressable memory that is also a RAM.
//
// Each stored 9-bit word is kept "one-hot decoded": a 512 x 32 bit array in
// which row v, column a is 1 when address a holds value v. A match therefore
// reads one 32-bit row (the row selected by the 9-bit search value), giving
// all matching addresses at once, single or multiple. This is the dual-port
// block RAM arrangement of the design: port A is 16K x 1 and is addressed by
// {9-bit value, 5-bit address}; port B is 512 x 32 and is addressed by the
// search value.
//
// A separate 32 x 9 erase RAM remembers the value at each address so a word
// can be removed in one cycle. A write takes two cycles, as in the design:
//   cycle 1 (erase): write_erase=0, write_ram=1. The old value from the erase
//                    RAM selects the bit that is cleared; the new value is
//                    stored into the erase RAM.
//   cycle 2 (write): write_erase=1, write_ram=0. The erase RAM now returns
//                    the new value and the matching bit is set.
// Both cycles need write_enable=1 and an unchanged addr.
//
// Match port: on a clock edge with match_enable=1 the row for data_match is
// registered into match; match_rst clears match (the inverted MATCH_RST pin
// of the block RAM is modelled as an active-high clear here). data_out is the
// erase RAM word at addr (asynchronous distributed-RAM read), giving the RAM
// lookup.
//
// After reset the match array is cleared one 32-bit row per cycle through
// its wide port (512 cycles, init_busy high meanwhile; no other operation
// may be issued then), and the erase RAM is reset to zero. On the FPGA the
// configuration-time zero contents of the RAMs give the same state; the
// clearing sequence is this design's.
module cam32x9 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  addr,
  input  logic [8:0]  data_in,
  input  logic        write_enable,
  input  logic        write_ram,
  input  logic        write_erase,   // 0: erase cycle, 1: write cycle
  input  logic [8:0]  data_match,
  input  logic        match_enable,
  input  logic        match_rst,
  output logic [31:0] match,
  output logic [8:0]  data_out,
  output logic        init_busy
);
  logic [31:0] bram [512];     // row = stored value, column = address
  logic [8:0]  erase_ram [32];

  logic [8:0] data_write;
  assign data_write = erase_ram[addr];
  assign data_out   = data_write;

  // Clearing sequence after reset.
  logic [8:0] clr_row;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      clr_row   <= '0;
    end else if (init_busy) begin
      clr_row <= clr_row + 1'b1;
      if (clr_row == 9'd511) init_busy <= 1'b0;
    end
  end

  // Port A: single-bit write at {data_write, addr}; the wide port clears a
  // row during initialisation.
  always_ff @(posedge clk) begin
    if (init_busy) begin
      bram[clr_row] <= '0;
    end else if (write_enable) begin
      bram[data_write][addr] <= write_erase;
    end
  end

  // Erase RAM: takes the new word during the erase cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < 32; a++) erase_ram[a] <= '0;
    end else if (write_enable && write_ram) begin
      erase_ram[addr] <= data_in;
    end
  end

  // Port B: synchronous match read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match <= '0;
    end else if (match_rst) begin
      match <= '0;
    end else if (match_enable) begin
      match <= bram[data_match];
    end
  end

endmodule
