// cnu: check node activation for one degree-K check node. From the K
// incoming variable-to-check messages it forms the K outgoing
// check-to-variable messages, each computed without the message of its own
// edge (extrinsic rule).
//
// The document's decoder uses the sum-product rule on floating-point
// numbers; this unit uses the min-sum approximation, its hardware-friendly
// form: the outgoing magnitude on edge k is the smallest incoming magnitude
// among the other edges (min1, or min2 on the edge that holds min1), the
// sign is the product of the other signs. Magnitudes are clipped to
// LLR_MAX. Purely combinational.
module cnu
  import ldpccc_pkg::*;
(
  input  app_t [K-1:0] v2c,
  output llr_t [K-1:0] c2v
);

  localparam int unsigned MW = APP_W;   // magnitude width (holds APP_MAX+1)

  logic [MW-1:0] mag   [K];
  logic [K-1:0]  sgn;
  logic [MW-1:0] min1, min2;
  logic          sprod;
  int unsigned   idx;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      sgn[k] = v2c[k][APP_W-1];
      mag[k] = sgn[k] ? MW'(-v2c[k]) : MW'(v2c[k]);
    end
    min1 = '1;
    min2 = '1;
    idx  = 0;
    for (int k = 0; k < K; k++) begin
      if (mag[k] < min1) begin
        min2 = min1;
        min1 = mag[k];
        idx  = k;
      end else if (mag[k] < min2) begin
        min2 = mag[k];
      end
    end
    sprod = ^sgn;
    for (int k = 0; k < K; k++) begin
      logic [MW-1:0] m;
      logic s;
      m = (k == idx) ? min2 : min1;
      if (m > MW'(LLR_MAX)) m = MW'(LLR_MAX);
      s = sprod ^ sgn[k];
      c2v[k] = s ? -llr_t'(m) : llr_t'(m);
    end
  end

endmodule
