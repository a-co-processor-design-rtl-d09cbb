// mpi_pkg: types and constants shared by the MPI coprocessor, its test
// module and the packet router.
//
// Packet headers are 32-bit words on the data transfer bus. The field order
// (destination PID, 3-bit packet type, 5-bit packet length in words, 8-bit
// offset, 8-bit global address) and the type codes 001/010/011 follow the
// packet format description; the instruction opcodes carried in the top byte
// of the CPU address bus are this design's own numbering.
package mpi_pkg;

  // Packet types (3-bit field).
  typedef enum logic [2:0] {
    PKT_NONE = 3'b000,
    PKT_PUT1 = 3'b001,
    PKT_PUTN = 3'b010,
    PKT_GET  = 3'b011
  } pkt_type_e;

  // First header word of every packet.
  typedef struct packed {
    logic [7:0] dpid;    // destination processor id
    pkt_type_e  ptype;   // packet type
    logic [4:0] plen;    // packet length in 32-bit words, header included
    logic [7:0] offset;  // offset added to the local address at the receiver
    logic [7:0] gaddr;   // global address (dest for PUT, source for GET)
  } pkt_hdr_t;

  // Second header word of a GET packet.
  typedef struct packed {
    logic [7:0] myid;    // id of the requester, destination of the reply PUT
    logic [7:0] dlen;    // number of data words requested
    logic [7:0] zero;
    logic [7:0] dgaddr;  // global address of the destination at the requester
  } get_hdr2_t;

  // Coprocessor instruction opcodes (address bits 31:24 of a MOV).
  typedef enum logic [7:0] {
    OP_NOP        = 8'h00,
    OP_BEGIN      = 8'h01,
    OP_END        = 8'h02,
    OP_ABORT      = 8'h03,
    OP_SET_PID    = 8'h04,
    OP_SET_NPROCS = 8'h05,
    OP_REGISTER   = 8'h06,
    OP_DEREGISTER = 8'h07,
    OP_BARRIER    = 8'h08,
    OP_PUT1_A     = 8'h10,  // Put-1 part 1: destination address
    OP_PUT1_B     = 8'h11,  // Put-1 part 2: the data word
    OP_PUTN_A     = 8'h12,  // Put-n part 1: destination address
    OP_PUTN_B     = 8'h13,  // Put-n part 2: source address
    OP_GET_A      = 8'h14,  // Get part 1: destination address
    OP_GET_B      = 8'h15   // Get part 2: source address
  } opcode_e;

  // CPU interface register select (address bits A1:A0).
  localparam logic [1:0] SEL_INST  = 2'b00;  // opcode -> Inst FIFO, data -> Data FIFO
  localparam logic [1:0] SEL_DATA8 = 2'b01;  // byte -> Data8 interface register

  // Registration table modes (Table of RT operations).
  typedef enum logic [1:0] {
    RT_NOP    = 2'b00,
    RT_LOOKUP = 2'b01,
    RT_REG    = 2'b10,
    RT_DEREG  = 2'b11
  } rt_mode_e;

  // Main memory interface controller task triplet.
  typedef struct packed {
    logic        dir;   // 0: main memory -> Out FIFO, 1: In FIFO -> main memory
    logic [7:0]  len;   // words to move
    logic [31:0] addr;  // first main memory word address
  } mm_task_t;

  localparam logic MM_READ  = 1'b0;
  localparam logic MM_WRITE = 1'b1;

endpackage
