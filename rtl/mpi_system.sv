// mpi_system: N-coprocessor test system, N coprocessor test modules (ctm)
// connected through one N x N router; the default N = 4 is the design's
// four-coprocessor system.
//
// A host reaches everything over one LAD bus: the system control register
// at 0x0050 (bit 0 = global system enable, which starts every node's MOV
// stream in the same cycle) and, for node k, the ctm registers at base
// k * 0x1000 (system counter, main memory, Address and Data bus FIFOs).
// Node k's coprocessor transmits into router input k and receives from
// router output k; the routing table initially sends dpid d to port d mod N,
// and can be rewritten through cfg_*.
// System barrier: have_others_done, given to every coprocessor, is the AND
// of all coprocessors' executed_barrier and the router's barrier flag (no
// packet inside the router), so a barrier completes only when every node is
// drained and nothing is in flight.
// The observation outputs (counters, barrier_done, per-node events) are
// for test and debug.
module mpi_system #(
  parameter int unsigned N         = 4,
  parameter int unsigned MEM_WORDS = 512,
  parameter int unsigned CNT_W     = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [15:0]             lad_addr,
  input  logic                    lad_we,
  input  logic                    lad_re,
  input  logic [31:0]             lad_wdata,
  output logic [31:0]             lad_rdata,
  input  logic                    cfg_we,
  input  logic [7:0]              cfg_dpid,
  input  logic [$clog2(N)-1:0]    cfg_port,
  output logic                    sys_en,
  output logic [N-1:0]            barrier_done,
  output logic                    system_barrier,
  output logic [N-1:0][CNT_W-1:0] sys_count,
  output logic [N-1:0]            mm_suspended,
  output logic [N-1:0]            pkt_sent,
  output logic [N-1:0]            got_put,
  output logic [N-1:0]            got_get,
  output logic [N-1:0]            mov_waiting,
  output logic [N-1:0]            link_stall
);
  logic [N-1:0][31:0] c2r_data, r2c_data, node_rdata;
  logic [N-1:0]       c2r_valid, c2r_full, r2c_valid, r2c_full;
  logic [N-1:0]       executed;
  logic               router_barrier;
  logic [31:0]        ctrl_q;
  logic               rd_ctrl_q;

  // System control register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q    <= '0;
      rd_ctrl_q <= 1'b0;
    end else begin
      if (lad_we && lad_addr == 16'h0050) ctrl_q <= lad_wdata;
      rd_ctrl_q <= lad_re && lad_addr == 16'h0050;
    end
  end
  assign sys_en = ctrl_q[0];

  assign system_barrier = (&executed) && router_barrier;

  for (genvar k = 0; k < N; k++) begin : g_node
    ctm #(.BASE(16'(k * 16'h1000)), .MEM_WORDS(MEM_WORDS), .CNT_W(CNT_W)) u_ctm (
      .clk, .rst_n, .sys_en,
      .lad_addr, .lad_we, .lad_re, .lad_wdata, .lad_rdata(node_rdata[k]),
      .rx_data(r2c_data[k]), .rx_valid(r2c_valid[k]), .rx_full(r2c_full[k]),
      .tx_data(c2r_data[k]), .tx_valid(c2r_valid[k]), .tx_full(c2r_full[k]),
      .executed_barrier(executed[k]), .have_others_done(system_barrier),
      .barrier_done(barrier_done[k]),
      .sys_count(sys_count[k]), .mm_suspended(mm_suspended[k]),
      .pkt_sent(pkt_sent[k]), .got_put(got_put[k]), .got_get(got_get[k]),
      .lookup_miss(), .mov_waiting(mov_waiting[k])
    );
    assign link_stall[k] = (c2r_valid[k] && c2r_full[k]) || (r2c_valid[k] && r2c_full[k]);
  end

  router #(.N(N)) u_router (
    .clk, .rst_n,
    .rx_data(c2r_data), .rx_valid(c2r_valid), .rx_full(c2r_full),
    .tx_data(r2c_data), .tx_valid(r2c_valid), .tx_full(r2c_full),
    .cfg_we, .cfg_dpid, .cfg_port, .router_barrier
  );

  always_comb begin
    lad_rdata = rd_ctrl_q ? ctrl_q : 32'h0;
    for (int k = 0; k < int'(N); k++) lad_rdata |= node_rdata[k];
  end

endmodule
