// hdr_detector: the detector/demapper g(.) of the proposed receiver. It takes
// the quantized in-phase and quadrature components of a received square M-QAM
// symbol and returns the log2(M) message bits of the nearest constellation
// point.
//
// How: each axis goes through an hdr_slicer, a bank of comparators that finds
// the heuristic decision region of the component (a strip between two
// boundaries d apart, with the outer strips open). Since the regions are
// separable, the 2-D region is the pair of 1-D indices. A look-up table per
// axis turns the index into that axis' Gray label, so detection and
// demapping are one step with no adders or multipliers. For a square
// constellation this decision equals the minimum-distance decision, up to the
// quantizer's resolution.
//
// Interface: in_valid, yq_i, yq_q (N-bit unsigned, from qam_quantizer) in;
// out_valid, bits out. bits = {I label, Q label}, I in the upper half.
// Timing: one clock cycle of latency, one symbol per cycle, no back-pressure.
//
// From the source design: comparators plus LUT, the decision regions, the Gray
// map and the one-cycle latency. Own choices: the valid signal and the reset.
module hdr_detector
  import qam_pkg::*;
#(
  parameter int unsigned M = 16,  // constellation order
  parameter int unsigned N = 32   // quantized component width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N-1:0]         yq_i,
  input  logic [N-1:0]         yq_q,
  output logic                 out_valid,
  output logic [$clog2(M)-1:0] bits
);

  localparam int unsigned L  = levels_of(M);
  localparam int unsigned AB = $clog2(L);

  if (!valid_order(M)) begin : g_bad_m
    $error("hdr_detector: M must be 4, 16, 64, ... (square, power of two)");
  end

  // Region index -> Gray label table
  logic [AB-1:0] lut [L];
  for (genvar k = 0; k < L; k++) begin : g_lut
    assign lut[k] = AB'(axis_label(k, L));
  end

  logic [AB-1:0] idx_i, idx_q;

  hdr_slicer #(.M(M), .N(N)) u_slice_i (.yq(yq_i), .idx(idx_i));
  hdr_slicer #(.M(M), .N(N)) u_slice_q (.yq(yq_q), .idx(idx_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bits      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) bits <= {lut[idx_i], lut[idx_q]};
    end
  end

endmodule
