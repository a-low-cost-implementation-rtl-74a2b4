// qam_quantizer: the clip / offset / quantize function F(.) applied to one
// component (real or imaginary part) of the received symbol.
//
// Output:  yq = 0                          if z/step < -(2^N-1)/2
//          yq = floor(z/step + 2^(N-1))    if |z/step| <= (2^N-1)/2
//          yq = 2^N - 1                    if z/step >  (2^N-1)/2
// with step = (L-1) d / (2^N-1), L = sqrt(M). This is the same as
// clamp(floor(z/step) + 2^(N-1), 0, 2^N-1), which is what the logic computes.
// The offset makes the result unsigned, and the outermost constellation
// levels land exactly on 0 and 2^N-1.
//
// How: the division by step is a multiplication by a reciprocal constant with
// enough fraction bits that the floor is exact for every input. The magnitude
// of z is multiplied; positive inputs use the constant rounded up and take the
// floor, negative inputs use the constant rounded down and take the ceiling of
// the magnitude (floor(-a) = -ceil(a)). The offset add and the clamp follow.
//
// Interface: in_valid/z in, out_valid/yq out, plus clip_lo/clip_hi flags that
// tell which side of the clamp was used. No back-pressure.
// Timing: one register stage; yq is valid the cycle after in_valid.
//
// From the source design: the clip/offset/quantize rule, the offset and the
// step size. Own choices: the fixed-point input format (IN_W, IN_FRAC), the
// reciprocal-multiply realisation, the output register and the clip flags.
module qam_quantizer
  import qam_pkg::*;
#(
  parameter int unsigned M       = 16,  // constellation order
  parameter int unsigned N       = 32,  // quantizer output bits
  parameter int unsigned D       = 2,   // minimum distance d, in input units
  parameter int unsigned IN_W    = 32,  // input width (signed fixed point)
  parameter int unsigned IN_FRAC = 16   // input fraction bits
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] z,
  output logic                   out_valid,
  output logic        [N-1:0]    yq,
  output logic                   clip_lo,
  output logic                   clip_hi
);

  localparam int unsigned L   = levels_of(M);
  localparam int unsigned SF  = quant_sf(L, D, IN_FRAC, IN_W);
  localparam wide_t       CHI = quant_scale(L, N, D, IN_FRAC, SF, 1'b1);
  localparam wide_t       CLO = quant_scale(L, N, D, IN_FRAC, SF, 1'b0);
  localparam int unsigned CW  = bit_len(CHI);
  localparam int unsigned PW  = IN_W + CW;        // product width
  localparam int unsigned QW  = PW - SF + 2;      // signed scaled value width

  if (!valid_order(M)) begin : g_bad_m
    $error("qam_quantizer: M must be 4, 16, 64, ... (square, power of two)");
  end
  if (PW + 1 > 128 || QW < N + 2) begin : g_bad_w
    $error("qam_quantizer: unsupported width combination");
  end

  logic                 neg;
  logic [IN_W-1:0]      mag;
  logic [CW-1:0]        scale;
  logic [PW-1:0]        prod;
  logic [PW-1:0]        prod_rnd;
  logic [QW-1:0]        qmag;
  logic signed [QW-1:0] qval;
  logic signed [QW-1:0] qoff;
  logic [N-1:0]         yq_d;
  logic                 lo_d, hi_d;

  always_comb begin
    neg      = z[IN_W-1];
    mag      = neg ? IN_W'(-z) : IN_W'(z);
    scale    = neg ? CW'(CLO) : CW'(CHI);
    prod     = PW'(mag) * PW'(scale);
    // ceiling of the magnitude for negative inputs, floor for positive ones
    prod_rnd = neg ? prod + PW'((wide_t'(1) << SF) - 1) : prod;
    qmag     = QW'(prod_rnd >> SF);
    qval     = neg ? -$signed(qmag) : $signed(qmag);
    qoff     = qval + $signed(QW'(wide_t'(1) << (N - 1)));
    lo_d     = qoff < 0;
    hi_d     = qoff > $signed(QW'((wide_t'(1) << N) - 1));
    if (lo_d)      yq_d = '0;
    else if (hi_d) yq_d = '1;
    else           yq_d = N'(qoff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      yq        <= '0;
      clip_lo   <= 1'b0;
      clip_hi   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        yq      <= yq_d;
        clip_lo <= lo_d;
        clip_hi <= hi_d;
      end
    end
  end

endmodule
