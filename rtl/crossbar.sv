// crossbar: buffered N x N crossbar of the router.
//
// Every crosspoint (i, j) is a small dual-clock FIFO, so input and output
// sides are decoupled and packets of any length are switched whole, without
// a central scheduler or segmentation into cells.
// Input side: row i receives words from input port i together with the
// column number in_sel[i]; the row decoder writes them only into crosspoint
// (i, in_sel[i]). row_full[i][j] reports crosspoint (i, j) full back to the
// input port's scheduler.
// Output side: column j has a round-robin output arbiter that picks a
// non-empty crosspoint of its column and copies one whole packet from it
// (the packet length is in the header word) to out_data[j]/out_valid[j],
// a word per clock edge while out_full[j] is low. A packet is still sent
// word by word when it has only partly arrived in the crosspoint.
// idle is high when every crosspoint is empty and no column is in the
// middle of a packet (the crossbar's part of the router barrier flag).
// The crosspoint buffers, row decoders and round-robin column arbiters
// follow the design.
module crossbar #(
  parameter int unsigned N        = 4,
  parameter int unsigned XP_DEPTH = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0][$clog2(N)-1:0]  in_sel,
  input  logic [N-1:0][31:0]           in_data,
  input  logic [N-1:0]                 in_valid,
  output logic [N-1:0][N-1:0]          row_full,
  output logic [N-1:0][31:0]           out_data,
  output logic [N-1:0]                 out_valid,
  input  logic [N-1:0]                 out_full,
  output logic                         idle
);
  import mpi_pkg::*;
  localparam int unsigned PW = $clog2(N);

  // xp_*[j][i]: crosspoint of row i in column j
  logic [N-1:0][N-1:0] xp_empty, xp_rd, xp_idle;
  logic [31:0]         xp_rdata [N][N];
  logic [N-1:0]        col_busy;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      async_fifo #(.WIDTH(32), .DEPTH(XP_DEPTH)) u_xp (
        .wclk(clk), .wrst_n(rst_n),
        .wr_en(in_valid[i] && in_sel[i] == PW'(j)),
        .wdata(in_data[i]), .full(row_full[i][j]), .wr_level(),
        .rclk(clk), .rrst_n(rst_n), .rd_en(xp_rd[j][i]), .rdata(xp_rdata[j][i]),
        .empty(xp_empty[j][i]), .idle(xp_idle[j][i]));
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    logic          active, fire, start;
    logic [PW-1:0] src, pick;
    logic [4:0]    left;
    logic          any;
    pkt_hdr_t      hdr;

    rr_arbiter #(.N(N)) u_arb (
      .clk, .rst_n, .req(~xp_empty[j]), .advance(start), .gnt(), .gnt_idx(pick), .any
    );

    assign start        = !active && any && !out_full[j];
    assign hdr          = pkt_hdr_t'(xp_rdata[j][pick]);
    assign out_data[j]  = active ? xp_rdata[j][src] : xp_rdata[j][pick];
    assign out_valid[j] = active ? !xp_empty[j][src] : any;
    assign fire         = out_valid[j] && !out_full[j];

    always_comb begin
      xp_rd[j] = '0;
      xp_rd[j][active ? src : pick] = fire;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active <= 1'b0;
        src    <= '0;
        left   <= '0;
      end else if (fire) begin
        if (!active) begin
          src    <= pick;
          left   <= hdr.plen - 5'd1;
          active <= (hdr.plen > 5'd1);
        end else begin
          left <= left - 5'd1;
          if (left == 5'd1) active <= 1'b0;
        end
      end
    end

    assign col_busy[j] = active;
  end

  assign idle = (&xp_idle) && !(|col_busy);

endmodule
