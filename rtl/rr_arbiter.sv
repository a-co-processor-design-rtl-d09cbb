// rr_arbiter: round-robin arbiter.
//
// Among the asserted req bits it grants the first one at or after the
// position following the last accepted grant, so every requester is served
// within N grants. gnt is one-hot (zero when nothing is requested) and
// gnt_idx its index; both are combinational. The pointer moves past the
// granted requester on a clock edge with advance=1.
// Round-robin selection is what the design uses for the VOQ scheduler and
// the crossbar output arbiters; this pointer form is this design's.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 any
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] ptr;   // highest priority position

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int k = int'(N) - 1; k >= 0; k--) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (req[idx]) begin
        gnt     = '0;
        gnt[idx] = 1'b1;
        gnt_idx = IW'(idx);
      end
    end
  end
  assign any = |req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && any) ptr <= IW'((int'(gnt_idx) + 1) % N);
  end

endmodule
