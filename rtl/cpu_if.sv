// cpu_if: memory-mapped write port between the main CPU bus and the
// coprocessor's three input FIFOs.
//
// The CPU issues plain MOV (store) instructions. The coprocessor is selected
// by cs; address bits A1:A0 (a) pick the target and the instruction opcode
// rides in the top byte of the address (op):
//   a = 00  the opcode is pushed into the Inst FIFO and the 32-bit data word
//           into the Data FIFO in the same cycle.
//   a = 01  data bits 7:0 go into the Data8 interface register. Every third
//           such write pushes the three collected bytes, in the order
//           {dpid, length, offset}, into the Data8 FIFO as one 24-bit word.
// A write happens on a clock edge with cs && we && ready. ready is low when
// the target FIFO is full, which stalls the CPU bus cycle.
// The two-FIFO write with the opcode on the address bus and the three-byte
// Data8 register follow the design; the A1:A0 codes, the ready stall and
// d8_count being cleared by reset are this design's choices.
module cpu_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cs,
  input  logic        we,
  input  logic [1:0]  a,
  input  logic [7:0]  op,
  input  logic [31:0] wdata,
  output logic        ready,

  output logic        inst_we,
  output logic [7:0]  inst_wdata,
  input  logic        inst_full,
  output logic        data_we,
  output logic [31:0] data_wdata,
  input  logic        data_full,
  output logic        d8_we,
  output logic [23:0] d8_wdata,
  input  logic        d8_full
);
  import mpi_pkg::*;

  logic [1:0]  d8_count;
  logic [15:0] d8_bytes;
  logic        sel_inst, sel_d8;

  assign sel_inst = cs && we && (a == SEL_INST);
  assign sel_d8   = cs && we && (a == SEL_DATA8);

  always_comb begin
    ready = 1'b1;
    if (a == SEL_INST)                       ready = !inst_full && !data_full;
    else if (a == SEL_DATA8 && d8_count == 2) ready = !d8_full;
  end

  assign inst_we    = sel_inst && ready;
  assign inst_wdata = op;
  assign data_we    = sel_inst && ready;
  assign data_wdata = wdata;
  assign d8_we      = sel_d8 && ready && (d8_count == 2);
  assign d8_wdata   = {d8_bytes, wdata[7:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d8_count <= '0;
      d8_bytes <= '0;
    end else if (sel_d8 && ready) begin
      if (d8_count == 2) begin
        d8_count <= '0;
      end else begin
        d8_bytes <= {d8_bytes[7:0], wdata[7:0]};
        d8_count <= d8_count + 1'b1;
      end
    end
  end

endmodule
