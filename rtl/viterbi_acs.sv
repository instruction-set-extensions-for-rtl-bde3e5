// viterbi_acs: one VPE's add-compare-select datapath for the Viterbi
// operations acs_select_metric and acs_set_flag.
//
//   Metric1 = PathMetric1 + MetricIn
//   Metric2 = PathMetric2 - MetricIn
//   flag    = !(Metric1 > Metric2)          (0 when Metric1 wins)
//   metric  = flag ? Metric2 : Metric1
//   out     = output_sel ? metric : flag    (1: acs_select_metric,
//                                            0: acs_set_flag)
// The adder on the first path and the subtractor on the second follow the
// proposed hardware: for a rate-1/2 code whose generators both tap the
// newest and the oldest bit, the two branches into a state carry opposite
// branch metrics, so one MetricIn serves both (the operation's pseudo-code
// in the source subtracts MetricIn on both paths, which would make the
// decision independent of the branch metric). Metrics are signed 16-bit
// values; the sum and difference wrap (no saturation is applied to these
// operations) and the comparison is signed. The multiplexer
// order (flag on input 0, metric on input 1; Metric1 on input 0 of the
// metric selector) follows the proposed hardware. The flag result is
// returned as 16-bit 0 or 1. Purely combinational.
module viterbi_acs #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] metric_in,
  input  logic signed [W-1:0] path_metric1,
  input  logic signed [W-1:0] path_metric2,
  input  logic                output_sel,  // 1: MetricOut, 0: Flag
  output logic        [W-1:0] data_out,
  output logic                flag         // comparison result, for observation
);
  logic signed [W-1:0] metric1, metric2, metric_out;

  always_comb begin
    metric1    = path_metric1 + metric_in;
    metric2    = path_metric2 - metric_in;
    flag       = !(metric1 > metric2);
    metric_out = flag ? metric2 : metric1;
    data_out   = output_sel ? metric_out : W'(flag);
  end
endmodule
