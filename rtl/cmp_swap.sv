// cmp_swap: the compare-exchange cell every unit is built from.
// It takes two values a and b and puts the smaller on s and the larger on l.
// `swapped` is 1 when a > b, i.e. when the two values had to change places;
// the median units use it to move other window entries along with the pair
// (the "coupled swaps" that keep earlier orderings valid).
// Purely combinational; ties keep the inputs in place (swapped = 0).
// The S/L behaviour is that of the comparator boxes of the published
// structures; the swapped flag and the tie rule are this design's choice.
module cmp_swap #(
  parameter int W = median_pkg::PIX_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic [W-1:0] l,
  output logic         swapped
);
  always_comb begin
    swapped = (a > b);
    s = swapped ? b : a;
    l = swapped ? a : b;
  end
endmodule
