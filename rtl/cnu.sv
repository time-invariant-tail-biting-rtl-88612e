// cnu: check node unit, normalized min-sum with scaling factor 0.75.
//
// One check of a layer: up to 8 variable-to-check messages in (row degree 5
// to 8; unused inputs are masked off). The unit finds the smallest and the
// second smallest magnitude, the position of the smallest and the product
// of the signs, and returns for every input the message
//   sign = (product of the other signs), magnitude = 0.75 * (min over the
//   others),
// where 0.75*m is computed as (m >> 1) + (m >> 2), truncated. The algorithm
// and factor follow the source design; the truncation is this design's
// choice. Purely combinational.
module cnu
  import tbcc_pkg::*;
#(
  parameter int unsigned N = RDMAX
) (
  input  llr_t [N-1:0]  v2c,
  input  logic [N-1:0]  mask,
  output llr_t [N-1:0]  c2v
);
  localparam int unsigned MW = QW - 1;

  always_comb begin
    logic [MW-1:0] mag [N];
    logic [MW-1:0] min1, min2, m, sc;
    logic          sgn_all;
    int            idx;
    min1    = '1;
    min2    = '1;
    idx     = 0;
    sgn_all = 1'b0;
    for (int k = 0; k < int'(N); k++) begin
      mag[k] = v2c[k][QW-1] ? MW'(-v2c[k]) : v2c[k][MW-1:0];
      if (mask[k]) begin
        sgn_all ^= v2c[k][QW-1];
        if (mag[k] < min1) begin
          min2 = min1;
          min1 = mag[k];
          idx  = k;
        end else if (mag[k] < min2) begin
          min2 = mag[k];
        end
      end
    end
    for (int k = 0; k < int'(N); k++) begin
      m  = (k == idx) ? min2 : min1;
      sc = (m >> 1) + (m >> 2);
      if (!mask[k])                       c2v[k] = '0;
      else if (sgn_all ^ v2c[k][QW-1])    c2v[k] = -llr_t'({1'b0, sc});
      else                                c2v[k] = llr_t'({1'b0, sc});
    end
  end
endmodule
