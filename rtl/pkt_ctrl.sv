// pkt_ctrl: packet controller; executes packets that other coprocessors
// (or this one, in loop-back) deliver into the In FIFO.
//
// PUT-1 / PUT-n: the header gives the global destination address, offset
// and packet length. The controller reads the local address of that global
// from the registration table (RAM lookup), adds the offset and queues an
// MMIC task {In FIFO -> memory, packet length - 1 words, address}. The data
// words that follow the header stay in the In FIFO and are drained by the
// MMIC; the controller waits for the MMIC's wr_done before it looks at the
// next packet.
// GET: from the first header word it looks up the local source address and
// adds the offset; from the second it takes the requester id, the length and
// the requester's global destination, which it also turns into a local
// address. It then hands {source, destination, length, dpid = requester} to
// the instruction pipeline as an injected PUT-n (inj_valid until inj_ack),
// and goes on with the next packet.
// Registration-table access is requested with rt_req and granted by rt_gnt;
// the local address arrives on rt_data the cycle after the grant.
// The sequence of steps follows the design. Offset 0 for the reply PUT,
// ignoring packets of an unknown type and skipping zero-length PUTs are
// this design's choices.
module pkt_ctrl (
  input  logic              clk,
  input  logic              rst_n,
  // In FIFO read side
  input  logic              in_empty,
  input  logic [31:0]       in_rdata,
  output logic              in_rd,
  // registration table RAM lookup
  output logic              rt_req,
  output logic [4:0]        rt_gaddr,
  input  logic              rt_gnt,
  input  logic [31:0]       rt_data,
  // MMIC task
  output logic              task_req,
  output mpi_pkg::mm_task_t task_out,
  input  logic              task_ack,
  input  logic              wr_done,
  // injected PUT-n for a received GET
  output logic              inj_valid,
  output logic [31:0]       inj_src,
  output logic [31:0]       inj_dst,
  output logic [7:0]        inj_len,
  output logic [7:0]        inj_dpid,
  input  logic              inj_ack,
  // status
  output logic              idle,
  output logic              got_put,
  output logic              got_get
);
  import mpi_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_LK1, S_LK1W, S_TASK, S_WAIT, S_H2, S_LK2, S_LK2W, S_INJ
  } state_e;
  state_e state;

  pkt_hdr_t  hdr, in_hdr;
  assign in_hdr = pkt_hdr_t'(in_rdata);
  get_hdr2_t hdr2;
  logic [31:0] addr1;

  assign idle = (state == S_IDLE);

  always_comb begin
    in_rd    = 1'b0;
    rt_req   = 1'b0;
    rt_gaddr = hdr.gaddr[4:0];
    task_req = 1'b0;
    unique case (state)
      S_IDLE: in_rd = !in_empty;
      S_LK1:  rt_req = 1'b1;
      S_TASK: task_req = 1'b1;
      S_H2:   in_rd = !in_empty;
      S_LK2:  begin rt_req = 1'b1; rt_gaddr = hdr2.dgaddr[4:0]; end
      default: ;
    endcase
  end

  assign task_out.dir  = MM_WRITE;
  assign task_out.len  = 8'(hdr.plen) - 8'd1;
  assign task_out.addr = addr1;

  assign inj_valid = (state == S_INJ);
  assign inj_src   = addr1;
  assign inj_dst   = rt_data;
  assign inj_len   = hdr2.dlen;
  assign inj_dpid  = hdr2.myid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      hdr     <= '0;
      hdr2    <= '0;
      addr1   <= '0;
      got_put <= 1'b0;
      got_get <= 1'b0;
    end else begin
      got_put <= 1'b0;
      got_get <= 1'b0;
      unique case (state)
        S_IDLE: if (!in_empty) begin
          hdr <= in_hdr;
          unique case (in_hdr.ptype)
            PKT_PUT1, PKT_PUTN, PKT_GET: state <= S_LK1;
            default: state <= S_IDLE;
          endcase
        end
        S_LK1:  if (rt_gnt) state <= S_LK1W;
        S_LK1W: begin
          addr1 <= rt_data + 32'(hdr.offset);
          if (hdr.ptype == PKT_GET) state <= S_H2;
          else if (hdr.plen <= 5'd1) state <= S_IDLE;
          else state <= S_TASK;
        end
        S_TASK: if (task_ack) state <= S_WAIT;
        S_WAIT: if (wr_done) begin
          got_put <= 1'b1;
          state   <= S_IDLE;
        end
        S_H2: if (!in_empty) begin
          hdr2  <= get_hdr2_t'(in_rdata);
          state <= S_LK2;
        end
        S_LK2:  if (rt_gnt) state <= S_LK2W;
        S_LK2W: state <= S_INJ;
        S_INJ: if (inj_ack) begin
          got_get <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
