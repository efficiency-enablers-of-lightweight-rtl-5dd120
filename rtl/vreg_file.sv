// vreg_file: vector register file, three read ports and one write port.
//
// Built as P scalar register banks, one per lane, so that a write can
// update single elements (lane write enables `we_lane`) without reading and
// rewriting the rest of the vector. Ports a and b serve PrepOp-DC, port c
// serves PrepOp-EX2. Reads are combinational; the write happens at the
// rising clock edge; registers reset to zero. A read in the cycle of a
// write to the same register returns the old value (the bypass network
// covers that case). Port count and banking follow the document; the
// register count (16) is this design's own choice.
module vreg_file
  import napcore_pkg::*;
#(
  parameter int unsigned N = NVREG
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] ra, rb, rc,
  output vec_t                 da, db, dc,
  input  logic [P-1:0]         we_lane,
  input  logic [$clog2(N)-1:0] wa,
  input  vec_t                 wd
);
  cplx_t bank [P][N];

  for (genvar l = 0; l < P; l++) begin : g_bank
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) bank[l][i] <= C_ZERO;
      end else if (we_lane[l]) begin
        bank[l][wa] <= wd[l];
      end
    end
    assign da[l] = bank[l][ra];
    assign db[l] = bank[l][rb];
    assign dc[l] = bank[l][rc];
  end
endmodule
