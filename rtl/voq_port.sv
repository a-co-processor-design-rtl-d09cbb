// voq_port: input port (line card) of the router with virtual output queues.
//
// Packets arrive on a data transfer bus into the Input Memory. The first
// word of every packet is its header; as it arrives, its destination id and
// packet length are also put into the Header FIFO, so routing does not wait
// behind the packet data. The VOQ controller takes the next header, asks the
// shared routing table for the output port (rt_req/rt_gnt, port on rt_port)
// and then moves that many words from the Input Memory into the VOQ of that
// output. One routed header is held ahead, so the lookup of the next packet
// overlaps the transfer of the current one.
// The scheduler picks, round robin, a VOQ that is non-empty and whose
// crosspoint buffer in the crossbar is not full (xb_full from the crossbar)
// and sends one whole packet from it: xb_sel names the crosspoint column,
// xb_valid/xb_data carry the words, each moving on a clock edge while the
// crosspoint is not full.
// idle is high when the Input Memory, Header FIFO and all VOQs are empty and
// nothing is being moved; it feeds the router's barrier flag.
// Structure and policy follow the design; the Header FIFO depth and the
// one-header lookahead are this design's.
module voq_port #(
  parameter int unsigned N          = 4,
  parameter int unsigned IN_DEPTH   = 512,
  parameter int unsigned VOQ_DEPTH  = 32,
  parameter int unsigned HDR_DEPTH  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the coprocessor
  input  logic [31:0]          rx_data,
  input  logic                 rx_valid,
  output logic                 rx_full,
  // routing table
  output logic                 rt_req,
  output logic [7:0]           rt_dpid,
  input  logic                 rt_gnt,
  input  logic [$clog2(N)-1:0] rt_port,
  // to the crossbar row
  output logic [$clog2(N)-1:0] xb_sel,
  output logic [31:0]          xb_data,
  output logic                 xb_valid,
  input  logic [N-1:0]         xb_full,
  output logic                 idle
);
  import mpi_pkg::*;
  localparam int unsigned PW = $clog2(N);

  // ---------------- Input Memory and Header FIFO ----------------
  logic [4:0]  rx_left;        // words still to come of the current packet
  logic        rx_is_hdr, hdr_full, hdr_empty, hdr_rd, hdr_idle;
  logic        in_full, in_empty, in_rd, in_idle, rx_fire;
  logic [31:0] in_rdata;
  logic [12:0] hdr_word;
  pkt_hdr_t    rx_hdr;

  assign rx_hdr    = pkt_hdr_t'(rx_data);
  assign rx_is_hdr = (rx_left == 0);
  assign rx_full   = in_full || (rx_is_hdr && hdr_full);
  assign rx_fire   = rx_valid && !rx_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_left <= '0;
    else if (rx_fire) rx_left <= rx_is_hdr ? rx_hdr.plen - 5'd1 : rx_left - 5'd1;
  end

  async_fifo #(.WIDTH(32), .DEPTH(IN_DEPTH)) u_in_mem (
    .wclk(clk), .wrst_n(rst_n), .wr_en(rx_fire), .wdata(rx_data),
    .full(in_full), .wr_level(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(in_rd), .rdata(in_rdata),
    .empty(in_empty), .idle(in_idle));

  async_fifo #(.WIDTH(13), .DEPTH(HDR_DEPTH)) u_hdr_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(rx_fire && rx_is_hdr),
    .wdata({rx_hdr.dpid, rx_hdr.plen}), .full(hdr_full), .wr_level(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(hdr_rd), .rdata(hdr_word),
    .empty(hdr_empty), .idle(hdr_idle));

  // ---------------- VOQ controller ----------------
  logic          nx_valid;      // routed header waiting for the mover
  logic [PW-1:0] nx_port;
  logic [4:0]    nx_len;
  logic          mv_active;
  logic [PW-1:0] mv_port;
  logic [4:0]    mv_left;
  logic          mv_fire;
  logic [N-1:0]  voq_full, voq_empty, voq_idle, voq_rd;
  logic [31:0]   voq_rdata [N];

  assign rt_req  = !hdr_empty && !nx_valid;
  assign rt_dpid = hdr_word[12:5];
  assign hdr_rd  = rt_req && rt_gnt;

  assign mv_fire = mv_active && !in_empty && !voq_full[mv_port];
  assign in_rd   = mv_fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nx_valid  <= 1'b0;
      nx_port   <= '0;
      nx_len    <= '0;
      mv_active <= 1'b0;
      mv_port   <= '0;
      mv_left   <= '0;
    end else begin
      logic take;
      take = nx_valid && (!mv_active || (mv_fire && mv_left == 5'd1));
      if (hdr_rd) begin
        nx_valid <= 1'b1;
        nx_port  <= rt_port;
        nx_len   <= hdr_word[4:0];
      end else if (take) begin
        nx_valid <= 1'b0;
      end
      if (take) begin
        mv_active <= (nx_len != 0);
        mv_port   <= nx_port;
        mv_left   <= nx_len;
      end else if (mv_fire) begin
        mv_left <= mv_left - 5'd1;
        if (mv_left == 5'd1) mv_active <= 1'b0;
      end
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_voq
    async_fifo #(.WIDTH(32), .DEPTH(VOQ_DEPTH)) u_voq (
      .wclk(clk), .wrst_n(rst_n), .wr_en(mv_fire && mv_port == PW'(j)),
      .wdata(in_rdata), .full(voq_full[j]), .wr_level(),
      .rclk(clk), .rrst_n(rst_n), .rd_en(voq_rd[j]), .rdata(voq_rdata[j]),
      .empty(voq_empty[j]), .idle(voq_idle[j]));
  end

  // ---------------- scheduler ----------------
  logic          sc_active;
  logic [PW-1:0] sc_port;
  logic [4:0]    sc_left;
  logic [N-1:0]  elig;
  logic [PW-1:0] pick;
  logic          any_elig, sc_fire, sc_start;
  pkt_hdr_t      sc_hdr;

  assign elig = ~voq_empty & ~xb_full;

  rr_arbiter #(.N(N)) u_sched (
    .clk, .rst_n, .req(elig), .advance(sc_start), .gnt(), .gnt_idx(pick), .any(any_elig)
  );

  assign sc_start = !sc_active && any_elig;
  assign xb_sel   = sc_active ? sc_port : pick;
  assign xb_data  = voq_rdata[xb_sel];
  assign sc_hdr   = pkt_hdr_t'(voq_rdata[pick]);
  assign xb_valid = sc_active ? !voq_empty[sc_port] : any_elig;
  assign sc_fire  = xb_valid && !xb_full[xb_sel];

  always_comb begin
    voq_rd = '0;
    voq_rd[xb_sel] = sc_fire;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc_active <= 1'b0;
      sc_port   <= '0;
      sc_left   <= '0;
    end else if (sc_fire) begin
      if (!sc_active) begin
        sc_port   <= pick;
        sc_left   <= sc_hdr.plen - 5'd1;
        sc_active <= (sc_hdr.plen > 5'd1);
      end else begin
        sc_left <= sc_left - 5'd1;
        if (sc_left == 5'd1) sc_active <= 1'b0;
      end
    end
  end

  assign idle = in_idle && hdr_idle && (&voq_idle) && !nx_valid && !mv_active &&
                !sc_active && (rx_left == 0);

endmodule
