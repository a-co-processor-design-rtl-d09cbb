// tx_ctrl: packet transmitter of the coprocessor.
//
// Outgoing packets are assembled from two queues: the Head FIFO holds the
// header words written by the pipeline (and the data word of a PUT-1), the
// Out FIFO holds the data words the MMIC fetched from main memory for a
// PUT-n. For each header at the head of the Head FIFO the transmitter sends
//   PUT-1: the header and the next Head FIFO word (2 words),
//   GET:   both header words from the Head FIFO (2 words),
//   PUT-n: the header, then packet length - 1 words from the Out FIFO,
// so packets leave in the order their headers were written and a PUT-n
// waits for its data. Words go out on a data transfer bus: tx_valid with
// tx_data, moved at the clock edge when tx_full (the receiver's FIFO full
// flag) is low.
// Which queue supplies which word follows the design; the packet-length
// driven sequencing is this design's.
module tx_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        head_empty,
  input  logic [31:0] head_rdata,
  output logic        head_rd,
  input  logic        out_empty,
  input  logic [31:0] out_rdata,
  output logic        out_rd,
  output logic [31:0] tx_data,
  output logic        tx_valid,
  input  logic        tx_full,
  output logic        idle,
  output logic        pkt_sent
);
  import mpi_pkg::*;

  typedef enum logic [1:0] {S_HDR, S_HEAD_DATA, S_OUT_DATA} state_e;
  state_e     state;
  logic [4:0] left;
  logic       fire;
  pkt_hdr_t   h;

  assign h = pkt_hdr_t'(head_rdata);

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = head_rdata;
    head_rd  = 1'b0;
    out_rd   = 1'b0;
    unique case (state)
      S_HDR, S_HEAD_DATA: begin
        tx_valid = !head_empty;
        head_rd  = !head_empty && !tx_full;
      end
      S_OUT_DATA: begin
        tx_valid = !out_empty;
        tx_data  = out_rdata;
        out_rd   = !out_empty && !tx_full;
      end
      default: ;
    endcase
  end

  assign fire = tx_valid && !tx_full;
  assign idle = (state == S_HDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_HDR;
      left     <= '0;
      pkt_sent <= 1'b0;
    end else begin
      pkt_sent <= 1'b0;
      if (fire) begin
        unique case (state)
          S_HDR: begin
            left <= h.plen - 5'd1;
            if (h.plen <= 5'd1) begin
              pkt_sent <= 1'b1;
            end else if (h.ptype == PKT_PUTN) begin
              state <= S_OUT_DATA;
            end else begin
              state <= S_HEAD_DATA;
            end
          end
          S_HEAD_DATA, S_OUT_DATA: begin
            left <= left - 5'd1;
            if (left == 5'd1) begin
              state    <= S_HDR;
              pkt_sent <= 1'b1;
            end
          end
          default: state <= S_HDR;
        endcase
      end
    end
  end

endmodule
