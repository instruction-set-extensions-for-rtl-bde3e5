// turbo_ascs: one VPE's add-saturate-compare-select datapath for the turbo
// decoding operation ascs_turbo.
//
//   Metric1   = Saturate(MetricIn1 - MetricIn2)
//   Metric2   = Saturate(MetricIn1 + MetricIn2)
//   MetricOut = (Metric1 > Metric2) ? Metric1 : Metric2
// The adder and subtractor work on 16-bit two's complement values and clamp
// to -2^15 or 2^15-1 when the exact result is out of range; the comparison
// is signed. The sat_add / sat_sub outputs tell a testbench or the unit that
// a clamp took place. Purely combinational.
module turbo_ascs #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] metric_in1,
  input  logic signed [W-1:0] metric_in2,
  output logic signed [W-1:0] metric_out,
  output logic                sat_add,   // Metric2 was clamped
  output logic                sat_sub    // Metric1 was clamped
);
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic signed [W:0]   sum_x, dif_x;   // one extra bit: exact result
  logic signed [W-1:0] metric1, metric2;

  always_comb begin
    sum_x = {metric_in1[W-1], metric_in1} + {metric_in2[W-1], metric_in2};
    dif_x = {metric_in1[W-1], metric_in1} - {metric_in2[W-1], metric_in2};
    sat_add = sum_x[W] != sum_x[W-1];
    sat_sub = dif_x[W] != dif_x[W-1];
    metric2 = sat_add ? (sum_x[W] ? MINV : MAXV) : sum_x[W-1:0];
    metric1 = sat_sub ? (dif_x[W] ? MINV : MAXV) : dif_x[W-1:0];
    metric_out = (metric1 > metric2) ? metric1 : metric2;
  end
endmodule
