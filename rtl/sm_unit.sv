// sm_unit: the shift-and-add multiplier ("S&M") in front of each processing
// element of the systolic array. It multiplies a broadcast sample by a filter
// tap that may change every clock, so one array serves the fixed 6-tap luma
// filter (1,-5,20,20,-5,1), the motion-dependent chroma weights (8-d, d),
// the intra taps (1,2,1)/(1,1) and the plane-mode weights.
//
// The product is formed as the sum of the sample shifted by each set bit of
// |tap|, negated for a negative tap: no multiplier cell is used. Purely
// combinational; widths come from pred_pkg (SA_DW in, SA_AW out).
module sm_unit
  import pred_pkg::*;
(
  input  sa_data_t x,
  input  coef_t    tap,
  output sa_acc_t  p
);
  logic [5:0] mag;
  sa_acc_t    sum;

  always_comb begin
    mag = tap[5] ? 6'(-tap) : 6'(tap);
    sum = '0;
    for (int b = 0; b < 6; b++)
      if (mag[b]) sum = sum + (sa_acc_t'(x) <<< b);
    p = tap[5] ? -sum : sum;
  end
endmodule
