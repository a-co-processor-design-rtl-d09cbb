// cop_pipeline: instruction engine of the coprocessor.
//
// Instructions arrive as opcodes in the Inst FIFO with one 32-bit operand
// each in the Data FIFO; PUT and GET also take one 24-bit {dpid, length,
// offset} entry from the Data8 FIFO. PUT-1, PUT-n and GET are sent as two
// instruction words (part A carries the destination address, part B the
// data word or the source address). Every instruction word passes through
// the stages
//   F   fetch the opcode from the Inst FIFO (no program counter),
//   D   decode it with a small ROM (decode_rom) into control fields,
//   DF  read its operands from the Data / Data8 FIFOs,
// and a complete instruction then executes in
//   EX1 registration table: CAM lookup of local addresses to global ones,
//       register / deregister; loading the MMIC with a PUT-n's read task
//       (several cycles: one per lookup and one for the MMIC load),
//   EX2 writing packet header words (and PUT-1's data word) to the Head FIFO.
// Here one stage is active at a time (the stages of consecutive words are
// not overlapped), which keeps the control simple at the cost of a few
// cycles per instruction; see the README for the cycle counts.
//
// PUT-n requests arriving from the packet controller (replies to received
// GETs) are taken in F, between instructions, and go straight to EX1.
// A BARRIER starts barrier_ctrl and stops fetching until it releases; the
// packet controller's requests are still served meanwhile.
// SET_PID / SET_NPROCS load the pid / nprocs registers; BEGIN, END and
// ABORT set and clear the running / aborted flags.
// Registration-table and MMIC ports of this block have priority over the
// packet controller's. A CAM lookup that misses is counted in lookup_miss
// and uses global address 0.
module cop_pipeline (
  input  logic              clk,
  input  logic              rst_n,
  // instruction and operand FIFOs
  input  logic              inst_empty,
  input  logic [7:0]        inst_op,
  output logic              inst_rd,
  input  logic              data_empty,
  input  logic [31:0]       data_word,
  output logic              data_rd,
  input  logic              d8_empty,
  input  logic [23:0]       d8_word,
  output logic              d8_rd,
  // PUT-n injected by the packet controller
  input  logic              inj_valid,
  input  logic [31:0]       inj_src,
  input  logic [31:0]       inj_dst,
  input  logic [7:0]        inj_len,
  input  logic [7:0]        inj_dpid,
  output logic              inj_ack,
  // registration table
  output logic              rt_start,
  output mpi_pkg::rt_mode_e rt_mode,
  output logic [31:0]       rt_data_in,
  input  logic [4:0]        rt_match_addr,
  input  logic              rt_match_hit,
  input  logic              rt_busy,
  output logic              rt_claim,
  // MMIC task
  output logic              task_we,
  output mpi_pkg::mm_task_t task_out,
  input  logic              task_full,
  // Head FIFO
  output logic              head_we,
  output logic [31:0]       head_wdata,
  input  logic              head_full,
  // barrier
  output logic              bar_start,
  input  logic              bar_pending,
  // architectural registers
  output logic [7:0]        pid,
  output logic [7:0]        nprocs,
  output logic              running,
  output logic              aborted,
  output logic              idle,
  output logic [15:0]       lookup_miss
);
  import mpi_pkg::*;

  typedef enum logic [3:0] {
    K_NOP, K_BEGIN, K_END, K_ABORT, K_PID, K_NPROCS, K_REG, K_DEREG,
    K_BAR, K_PUT1, K_PUTN, K_GET
  } kind_e;

  typedef struct packed {
    kind_e kind;
    logic  part_b;   // second word of a two-word instruction
    logic  use_d8;   // reads the Data8 FIFO in DF
  } ctrl_t;

  // Decode ROM.
  function automatic ctrl_t decode_rom(input logic [7:0] opc);
    ctrl_t c;
    c = '{kind: K_NOP, part_b: 1'b0, use_d8: 1'b0};
    unique case (opc)
      OP_BEGIN:      c.kind = K_BEGIN;
      OP_END:        c.kind = K_END;
      OP_ABORT:      c.kind = K_ABORT;
      OP_SET_PID:    c.kind = K_PID;
      OP_SET_NPROCS: c.kind = K_NPROCS;
      OP_REGISTER:   c.kind = K_REG;
      OP_DEREGISTER: c.kind = K_DEREG;
      OP_BARRIER:    c.kind = K_BAR;
      OP_PUT1_A:     c = '{kind: K_PUT1, part_b: 1'b0, use_d8: 1'b1};
      OP_PUT1_B:     c = '{kind: K_PUT1, part_b: 1'b1, use_d8: 1'b0};
      OP_PUTN_A:     c = '{kind: K_PUTN, part_b: 1'b0, use_d8: 1'b1};
      OP_PUTN_B:     c = '{kind: K_PUTN, part_b: 1'b1, use_d8: 1'b0};
      OP_GET_A:      c = '{kind: K_GET,  part_b: 1'b0, use_d8: 1'b1};
      OP_GET_B:      c = '{kind: K_GET,  part_b: 1'b1, use_d8: 1'b0};
      default:       ;
    endcase
    return c;
  endfunction

  typedef enum logic [3:0] {
    S_F, S_D, S_DF, S_EX1, S_EX1_G, S_EX1_S, S_EX1_T, S_RT_WAIT, S_EX2_A, S_EX2_B
  } state_e;
  state_e state;

  logic [7:0]  op;
  ctrl_t       ctrl;
  kind_e       kind;             // kind of the instruction being executed
  logic        have_a;           // part A of a two-word instruction is held
  logic [31:0] dst, src, word;   // destination, source, PUT-1 data / RT operand
  logic [7:0]  dpid, len, offset;
  logic [7:0]  dst_g, src_g;

  logic df_ok;
  assign df_ok = !data_empty && (!ctrl.use_d8 || !d8_empty);

  // Combinational outputs of each state.
  always_comb begin
    inst_rd    = 1'b0;
    data_rd    = 1'b0;
    d8_rd      = 1'b0;
    inj_ack    = 1'b0;
    rt_start   = 1'b0;
    rt_mode    = RT_NOP;
    rt_data_in = dst;
    rt_claim   = 1'b0;
    task_we    = 1'b0;
    task_out   = '{dir: MM_READ, len: len, addr: src};
    head_we    = 1'b0;
    head_wdata = '0;
    bar_start  = 1'b0;
    unique case (state)
      S_F: begin
        if (inj_valid && !have_a)               inj_ack = 1'b1;
        else if (!bar_pending && !inst_empty)   inst_rd = 1'b1;
      end
      S_DF: if (df_ok) begin
        data_rd   = 1'b1;
        d8_rd     = ctrl.use_d8;
        bar_start = (ctrl.kind == K_BAR);
      end
      S_EX1: begin
        rt_claim = 1'b1;
        if (!rt_busy) begin
          rt_start = 1'b1;
          unique case (kind)
            K_REG:   begin rt_mode = RT_REG;   rt_data_in = word; end
            K_DEREG: begin rt_mode = RT_DEREG; rt_data_in = word; end
            default: begin rt_mode = RT_LOOKUP; rt_data_in = dst; end
          endcase
        end
      end
      S_EX1_G: begin
        if (kind == K_GET) begin
          rt_claim   = 1'b1;
          rt_start   = 1'b1;
          rt_mode    = RT_LOOKUP;
          rt_data_in = src;
        end
      end
      S_EX1_T: task_we = !task_full;
      S_RT_WAIT: rt_claim = 1'b1;
      S_EX2_A: begin
        head_we = !head_full;
        unique case (kind)
          K_PUT1:  head_wdata = {dpid, PKT_PUT1, 5'd2, offset, dst_g};
          K_PUTN:  head_wdata = {dpid, PKT_PUTN, 5'(len + 8'd1), offset, dst_g};
          default: head_wdata = {dpid, PKT_GET, 5'd2, offset, src_g};
        endcase
      end
      S_EX2_B: begin
        head_we = !head_full;
        if (kind == K_PUT1) head_wdata = word;
        else                head_wdata = {pid, len, 8'h00, dst_g};
      end
      default: ;
    endcase
  end

  assign idle = (state == S_F) && !have_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_F;
      op          <= '0;
      ctrl        <= '{kind: K_NOP, part_b: 1'b0, use_d8: 1'b0};
      kind        <= K_NOP;
      have_a      <= 1'b0;
      dst         <= '0;
      src         <= '0;
      word        <= '0;
      dpid        <= '0;
      len         <= '0;
      offset      <= '0;
      dst_g       <= '0;
      src_g       <= '0;
      pid         <= '0;
      nprocs      <= '0;
      running     <= 1'b0;
      aborted     <= 1'b0;
      lookup_miss <= '0;
    end else begin
      unique case (state)
        S_F: begin
          if (inj_ack) begin
            kind   <= K_PUTN;
            src    <= inj_src;
            dst    <= inj_dst;
            len    <= inj_len;
            dpid   <= inj_dpid;
            offset <= '0;
            state  <= S_EX1;
          end else if (inst_rd) begin
            op    <= inst_op;
            state <= S_D;
          end
        end
        S_D: begin
          ctrl  <= decode_rom(op);
          state <= S_DF;
        end
        S_DF: if (df_ok) begin
          state <= S_F;
          unique case (ctrl.kind)
            K_BEGIN:  begin running <= 1'b1; aborted <= 1'b0; end
            K_END:    running <= 1'b0;
            K_ABORT:  begin running <= 1'b0; aborted <= 1'b1; end
            K_PID:    pid <= data_word[7:0];
            K_NPROCS: nprocs <= data_word[7:0];
            K_REG, K_DEREG: begin
              kind  <= ctrl.kind;
              word  <= data_word;
              state <= S_EX1;
            end
            K_PUT1, K_PUTN, K_GET: begin
              if (!ctrl.part_b) begin
                dst    <= data_word;
                dpid   <= d8_word[23:16];
                len    <= d8_word[15:8];
                offset <= d8_word[7:0];
                have_a <= 1'b1;
              end else begin
                kind   <= ctrl.kind;
                have_a <= 1'b0;
                if (ctrl.kind == K_PUT1) word <= data_word;
                else                     src  <= data_word;
                state  <= S_EX1;
              end
            end
            default: ;
          endcase
        end
        S_EX1: if (!rt_busy) begin
          state <= (kind == K_REG || kind == K_DEREG) ? S_RT_WAIT : S_EX1_G;
        end
        S_EX1_G: begin
          dst_g <= {3'b000, rt_match_addr};
          if (!rt_match_hit) lookup_miss <= lookup_miss + 1'b1;
          if (kind == K_GET)       state <= S_EX1_S;
          else if (kind == K_PUTN) state <= S_EX1_T;
          else                     state <= S_EX2_A;
        end
        S_EX1_T: if (!task_full) state <= S_EX2_A;
        S_EX1_S: begin
          src_g <= {3'b000, rt_match_addr};
          if (!rt_match_hit) lookup_miss <= lookup_miss + 1'b1;
          state <= S_EX2_A;
        end
        S_RT_WAIT: if (!rt_busy) state <= S_F;
        S_EX2_A: if (!head_full) state <= (kind == K_PUTN) ? S_F : S_EX2_B;
        S_EX2_B: if (!head_full) state <= S_F;
        default: state <= S_F;
      endcase
    end
  end

endmodule
