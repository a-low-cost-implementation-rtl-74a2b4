// gray_mapper: the modulator f(.) of the system: a log2(M)-bit message goes
// in, the in-phase and quadrature amplitudes of its square M-QAM point come
// out.
//
// How: the upper half of the message is the in-phase label, the lower half the
// quadrature label. A label is the complement of the reflected Gray code of
// the level index, so the index is recovered by complementing the label and
// running the Gray-to-binary prefix XOR. Level k is placed at
// (2k - (L-1)) * d/2, written as a signed fixed-point number in the format the
// quantizer takes (IN_W bits, IN_FRAC fraction bits).
//
// For 16-QAM and d = 2 this gives I = -3, -1, 1, 3 for labels 11, 10, 00, 01,
// and the same for Q, the 802.16-style map.
//
// Interface: in_valid/bits in, out_valid/x_i/x_q out, no back-pressure.
// Timing: one register stage.
//
// From the source design: the Gray map for 16-QAM and the rule that the other
// orders follow it. Own choices: the generalisation (complemented reflected
// Gray code per axis), the fixed-point output format and the register.
module gray_mapper
  import qam_pkg::*;
#(
  parameter int unsigned M       = 16,
  parameter int unsigned D       = 2,   // minimum distance d, in output units
  parameter int unsigned IN_W    = 32,
  parameter int unsigned IN_FRAC = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(M)-1:0]   bits,
  output logic                   out_valid,
  output logic signed [IN_W-1:0] x_i,
  output logic signed [IN_W-1:0] x_q
);

  localparam int unsigned L  = levels_of(M);
  localparam int unsigned AB = $clog2(L);

  if (!valid_order(M)) begin : g_bad_m
    $error("gray_mapper: M must be 4, 16, 64, ... (square, power of two)");
  end

  function automatic logic [AB-1:0] level_of(input logic [AB-1:0] label);
    logic [AB-1:0] g, k;
    g = ~label;
    k[AB-1] = g[AB-1];
    for (int b = AB - 2; b >= 0; b--) k[b] = k[b+1] ^ g[b];
    return k;
  endfunction

  // (2k - (L-1)) * d * 2^IN_FRAC / 2
  function automatic logic signed [IN_W-1:0] amplitude(input logic [AB-1:0] k);
    logic signed [IN_W+1:0] odd;
    odd = $signed({1'b0, IN_W'(k), 1'b0}) - $signed((IN_W+2)'(L - 1));
    return IN_W'((odd * $signed((IN_W+2)'(D))) <<< IN_FRAC >>> 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_i       <= '0;
      x_q       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x_i <= amplitude(level_of(bits[2*AB-1:AB]));
        x_q <= amplitude(level_of(bits[AB-1:0]));
      end
    end
  end

endmodule
