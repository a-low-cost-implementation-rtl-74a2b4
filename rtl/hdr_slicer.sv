// hdr_slicer: the comparator bank of the heuristic-decision-region detector
// for one axis. It places an N-bit quantized component in one of L = sqrt(M)
// decision intervals and returns the interval's index (0 = most negative).
//
// How: L-1 comparators test the sample against the quantized interval
// boundaries THR(0) < THR(1) < ... < THR(L-2). Because the boundaries are
// increasing, the comparator outputs form a thermometer code and the index is
// the number of comparators that fire. A sample equal to a boundary belongs to
// the upper interval, as in the half-open regions id <= y < (i+1)d. The first
// and last intervals are open to the outside, so any sample gets an index.
//
// Interface: purely combinational, yq in, idx out.
// From the source design: comparators on the quantized value and the region
// boundaries. Own choice: the thermometer-to-index count.
module hdr_slicer
  import qam_pkg::*;
#(
  parameter int unsigned M = 16,
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]                  yq,
  output logic [$clog2(levels_of(M))-1:0] idx
);

  localparam int unsigned L  = levels_of(M);
  localparam int unsigned AB = $clog2(L);

  logic [L-2:0] ge;

  for (genvar k = 0; k < L - 1; k++) begin : g_cmp
    localparam logic [N-1:0] THR = N'(hdr_threshold(k, L, N));
    assign ge[k] = (yq >= THR);
  end

  always_comb begin
    idx = '0;
    for (int k = 0; k < L - 1; k++) idx = idx + AB'(ge[k]);
  end

endmodule
