// routing_table: RAM-based routing lookup of the router, with its access
// controller.
//
// The table maps each 8-bit destination processor id to an output port of
// the router. All N input ports share it: each raises req[i] with its packet's
// dpid[i]; a round-robin access controller serves one request per cycle,
// raising gnt[i] together with the looked-up port on port_out. cfg_we writes
// entry cfg_dpid with cfg_port. After reset entry d holds d mod N, the
// routing of a single router whose output port j leads to processor j.
// A RAM lookup shared through a request/grant access controller follows the
// design; the reset contents and the configuration port are this design's.
module routing_table #(
  parameter int unsigned N = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           req,
  input  logic [N-1:0][7:0]      dpid,
  output logic [N-1:0]           gnt,
  output logic [$clog2(N)-1:0]   port_out,
  input  logic                   cfg_we,
  input  logic [7:0]             cfg_dpid,
  input  logic [$clog2(N)-1:0]   cfg_port
);
  localparam int unsigned PW = $clog2(N);

  logic [PW-1:0]  table_q [256];
  logic [PW-1:0]  sel;
  logic           any;

  rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .req, .advance(1'b1), .gnt, .gnt_idx(sel), .any
  );

  assign port_out = table_q[dpid[sel]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < 256; d++) table_q[d] <= PW'(d % N);
    end else if (cfg_we) begin
      table_q[cfg_dpid] <= cfg_port;
    end
  end

endmodule
