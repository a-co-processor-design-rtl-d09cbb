// reg_table: the registration table that translates between 32-bit local
// addresses and 8-bit global addresses.
//
// A variable is made global by registering its local address: the address is
// stored in the lowest vacant slot of a 32-entry CAM/RAM (cam32x32) and the
// slot number is its global address. A 32-bit memory status register marks
// used slots; prio_enc turns it into the next vacant slot. Deregistration
// finds the address by CAM lookup, writes zero into its slot and frees it.
// Slots are 5 bits; the global address on packets is 8 bits and is the slot
// number with three zero bits on top.
//
// Modes (applied with start=1 while busy=0):
//   RT_LOOKUP  RAM lookup rt_addr -> rt_data_out and CAM lookup rt_data_in ->
//              rt_match_addr / rt_match_hit, both valid the cycle after start.
//   RT_REG     two cycles: erase then write at the next vacant slot; busy is
//              high during the second. reg_addr/reg_ok give the slot used.
//   RT_DEREG   three cycles: CAM lookup, erase, write of zero; busy is high
//              during the last two. A word that is not registered is ignored.
// busy is also high for the 512 cycles after reset while the CAM clears.
// The lookups, the 2-cycle register and 3-cycle deregister and the busy
// lengths follow the design. Masking CAM hits with the status register (so
// freed slots, which hold zero, never match) and refusing a registration
// into a full table are this design's choices.
module reg_table (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  mpi_pkg::rt_mode_e    mode,
  input  logic [4:0]           rt_addr,
  input  logic [31:0]          rt_data_in,
  output logic [31:0]          rt_data_out,
  output logic [4:0]           rt_match_addr,
  output logic                 rt_match_hit,
  output logic [4:0]           reg_addr,
  output logic                 reg_ok,
  output logic                 busy,
  output logic                 full,
  output logic [31:0]          status
);
  import mpi_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_REG_WR, S_DEREG_ER, S_DEREG_WR} state_e;
  state_e state;

  logic [4:0]  enco_addr, fb_addr, hold_addr;
  logic [31:0] cam_match, cam_data_out, vmatch;
  logic        hit;
  logic        dereg_hit;    // the erase cycle of a deregistration found the word
  logic        cam_init;     // CAM clearing after reset

  // CAM control.
  logic [4:0]  c_addr;
  logic [31:0] c_data_in;
  logic        c_we, c_wram, c_werase, c_men;

  prio_enc #(.N(32)) u_enc (.status(status), .index(enco_addr), .full(full));

  assign vmatch = cam_match & status;
  assign hit    = |vmatch;
  always_comb begin
    fb_addr = '0;
    for (int i = 31; i >= 0; i--) if (vmatch[i]) fb_addr = 5'(i);
  end
  assign rt_match_addr = fb_addr;
  assign rt_match_hit  = hit;

  always_comb begin
    c_addr    = rt_addr;
    c_data_in = rt_data_in;
    c_we      = 1'b0;
    c_wram    = 1'b0;
    c_werase  = 1'b0;
    c_men     = 1'b0;
    unique case (state)
      S_IDLE: if (start && !cam_init) begin
        unique case (mode)
          RT_LOOKUP: c_men = 1'b1;
          RT_REG: if (!full) begin
            c_addr = enco_addr; c_we = 1'b1; c_wram = 1'b1;   // erase cycle
          end
          RT_DEREG: c_men = 1'b1;
          default: ;
        endcase
      end
      S_REG_WR: begin
        c_addr = hold_addr; c_we = 1'b1; c_werase = 1'b1;    // write cycle
      end
      S_DEREG_ER: if (hit) begin
        c_addr = fb_addr; c_data_in = '0; c_we = 1'b1; c_wram = 1'b1;
      end
      S_DEREG_WR: if (dereg_hit) begin
        c_addr = hold_addr; c_we = 1'b1; c_werase = 1'b1;
      end
      default: ;
    endcase
  end

  cam32x32 u_cam (
    .clk          (clk),
    .rst_n        (rst_n),
    .addr         (c_addr),
    .data_in      (c_data_in),
    .write_enable (c_we),
    .write_ram    (c_wram),
    .write_erase  (c_werase),
    .data_match   (rt_data_in),
    .match_enable (c_men),
    .match_rst    (1'b0),
    .match        (cam_match),
    .match_addr   (),
    .match_hit    (),
    .data_out     (cam_data_out),
    .init_busy    (cam_init)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      status      <= '0;
      hold_addr   <= '0;
      rt_data_out <= '0;
      reg_addr    <= '0;
      reg_ok      <= 1'b0;
      dereg_hit   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start && !cam_init) begin
          unique case (mode)
            RT_LOOKUP: rt_data_out <= cam_data_out;
            RT_REG: begin
              reg_ok <= !full;
              if (!full) begin
                hold_addr         <= enco_addr;
                reg_addr          <= enco_addr;
                status[enco_addr] <= 1'b1;
                state             <= S_REG_WR;
              end
            end
            RT_DEREG: state <= S_DEREG_ER;
            default: ;
          endcase
        end
        S_REG_WR: state <= S_IDLE;
        S_DEREG_ER: begin
          dereg_hit <= hit;
          hold_addr <= fb_addr;
          if (hit) status[fb_addr] <= 1'b0;
          state <= S_DEREG_WR;
        end
        S_DEREG_WR: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Write cycle of a deregistration only when the erase found the word.
  assign busy = (state != S_IDLE) || cam_init;

endmodule
