// router: N x N routing element that connects N coprocessors.
//
// Combined input, crosspoint and output buffering: each input has a VOQ port
// (Input Memory, Header FIFO, one virtual output queue per output, round-
// robin scheduler), the VOQ ports share one routing table through its
// access controller, the buffered crossbar holds a FIFO per crosspoint with
// a round-robin arbiter per output, and each output has an Output Memory
// that drives the link to the coprocessor.
// Ports: per port p, rx_* is the data transfer bus from coprocessor p
// (data, valid, full back), tx_* the bus to coprocessor p (data, valid,
// full from the coprocessor's In FIFO). cfg_* rewrites routing entries.
// router_barrier is the AND of the idle flags of every VOQ port, the
// crossbar and the Output Memories: high when no packet is inside.
// Default sizes are the implemented configuration of the design: 4 ports,
// Input Memory 512 words, VOQs, crosspoints and Output Memories 32 words.
module router #(
  parameter int unsigned N          = 4,
  parameter int unsigned IN_DEPTH   = 512,
  parameter int unsigned VOQ_DEPTH  = 32,
  parameter int unsigned XP_DEPTH   = 32,
  parameter int unsigned OUT_DEPTH  = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0][31:0]     rx_data,
  input  logic [N-1:0]           rx_valid,
  output logic [N-1:0]           rx_full,
  output logic [N-1:0][31:0]     tx_data,
  output logic [N-1:0]           tx_valid,
  input  logic [N-1:0]           tx_full,
  input  logic                   cfg_we,
  input  logic [7:0]             cfg_dpid,
  input  logic [$clog2(N)-1:0]   cfg_port,
  output logic                   router_barrier
);
  localparam int unsigned PW = $clog2(N);

  logic [N-1:0]          rt_req, rt_gnt, port_idle, om_idle, om_full, om_empty;
  logic [N-1:0][7:0]     rt_dpid;
  logic [PW-1:0]         rt_port;
  logic [N-1:0][PW-1:0]  xb_sel;
  logic [N-1:0][31:0]    xb_data, xo_data;
  logic [N-1:0]          xb_valid, xo_valid;
  logic [N-1:0][N-1:0]   xb_full;
  logic                  xb_idle;

  routing_table #(.N(N)) u_rt (
    .clk, .rst_n, .req(rt_req), .dpid(rt_dpid), .gnt(rt_gnt), .port_out(rt_port),
    .cfg_we, .cfg_dpid, .cfg_port
  );

  for (genvar p = 0; p < N; p++) begin : g_port
    voq_port #(.N(N), .IN_DEPTH(IN_DEPTH), .VOQ_DEPTH(VOQ_DEPTH)) u_voq (
      .clk, .rst_n,
      .rx_data(rx_data[p]), .rx_valid(rx_valid[p]), .rx_full(rx_full[p]),
      .rt_req(rt_req[p]), .rt_dpid(rt_dpid[p]), .rt_gnt(rt_gnt[p]), .rt_port(rt_port),
      .xb_sel(xb_sel[p]), .xb_data(xb_data[p]), .xb_valid(xb_valid[p]),
      .xb_full(xb_full[p]), .idle(port_idle[p])
    );

    async_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_out_mem (
      .wclk(clk), .wrst_n(rst_n), .wr_en(xo_valid[p]), .wdata(xo_data[p]),
      .full(om_full[p]), .wr_level(),
      .rclk(clk), .rrst_n(rst_n), .rd_en(tx_valid[p] && !tx_full[p]),
      .rdata(tx_data[p]), .empty(om_empty[p]), .idle(om_idle[p]));

    assign tx_valid[p] = !om_empty[p];
  end

  crossbar #(.N(N), .XP_DEPTH(XP_DEPTH)) u_xb (
    .clk, .rst_n,
    .in_sel(xb_sel), .in_data(xb_data), .in_valid(xb_valid), .row_full(xb_full),
    .out_data(xo_data), .out_valid(xo_valid), .out_full(om_full), .idle(xb_idle)
  );

  assign router_barrier = (&port_idle) && xb_idle && (&om_idle);

endmodule
