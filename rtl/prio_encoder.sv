// prio_encoder: N to log2(N) priority encoder.
//
// Returns the index of the lowest set bit of req and whether any bit is set. The
// error-detection path uses it to turn the per-block parity error signals into the
// ID of a damaged block, and the lookup path uses it to turn the match vector into
// the match address (lowest TCAM word index wins). Purely combinational.
module prio_encoder #(
  parameter int N   = 2,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  output logic          any,
  output logic [IW-1:0] idx
);

  always_comb begin
    any = 1'b0;
    idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        any = 1'b1;
        idx = IW'(i);
      end
    end
  end

endmodule
