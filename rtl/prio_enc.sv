// prio_enc: next-vacant-slot encoder of the registration table.
//
// status[i] = 1 means slot i is in use. The output index is the lowest i
// with status[i] = 0, which is the truth table of the design's 32-bit
// priority encoder read with its leftmost input column as bit 0. When every
// slot is used the design's table gives 11111; this encoder gives the same
// index and also raises full so that a registration into a full table can
// be refused (full is this design's addition).
module prio_enc #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]         status,
  output logic [$clog2(N)-1:0] index,
  output logic                 full
);
  always_comb begin
    index = '1;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (!status[i]) index = $clog2(N)'(i);
    end
  end
  assign full = &status;
endmodule
