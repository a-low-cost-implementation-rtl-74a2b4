// qam_top: square M-QAM mapping and low-cost detection/demapping.
//
// Transmit side: gray_mapper (f) turns a message of log2(M) bits into the
// in-phase and quadrature amplitudes of its constellation point.
// Receive side: one qam_quantizer (F) per component clips, offsets and
// quantizes the received amplitudes to N-bit unsigned integers; hdr_detector
// (g) then finds the heuristic decision region with comparators and reads the
// message bits from a Gray look-up table.
// Beside it, hdr_fsm_detector performs the same detection as a state machine;
// it looks at a quantized sample only when it is idle (fsm_take) and reports
// its result on its own outputs.
//
// The channel between tx_x_* and rx_y_* (noise added to the transmitted
// point) is outside this design; the two sides share only the clock and reset.
//
// Timing: tx: 1 cycle. rx through the HDR detector: 2 cycles (quantizer
// register + detector register), one symbol per cycle. rx through the state
// machine: 1 + log2(sqrt(M)) + 1 cycles, i.e. 4 for 16-QAM, one symbol every
// log2(sqrt(M)) + 1 cycles.
// The quantized vector (rx_yq_*) is brought out so the HDR input can be seen.
//
// From the source design: the chain f -> channel -> F -> g and its blocks.
// Own choices: running the state-machine detector beside the HDR detector on
// the same samples, the observation outputs, and the reset/valid conventions.
// The I/Q alignment assertion is disabled during reset, so Verilator notes
// that rst_n is used both as an asynchronous reset and synchronously there;
// that use is in verification code only.
module qam_top
  import qam_pkg::*;
#(
  parameter int unsigned M       = 16,  // constellation order
  parameter int unsigned N       = 32,  // quantizer output bits
  parameter int unsigned D       = 2,   // minimum distance d, in input units
  parameter int unsigned IN_W    = 32,  // received/transmitted amplitude width
  parameter int unsigned IN_FRAC = 16   // fraction bits of the amplitudes
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // transmit side
  input  logic                   tx_valid,
  input  logic [$clog2(M)-1:0]   tx_bits,
  output logic                   tx_x_valid,
  output logic signed [IN_W-1:0] tx_x_i,
  output logic signed [IN_W-1:0] tx_x_q,
  // receive side
  input  logic                   rx_valid,
  input  logic signed [IN_W-1:0] rx_y_i,
  input  logic signed [IN_W-1:0] rx_y_q,
  output logic                   rx_yq_valid,
  output logic [N-1:0]           rx_yq_i,
  output logic [N-1:0]           rx_yq_q,
  output logic [1:0]             rx_clip_lo,   // {I, Q} clipped at 0
  output logic [1:0]             rx_clip_hi,   // {I, Q} clipped at 2^N-1
  output logic                   hdr_valid,
  output logic [$clog2(M)-1:0]   hdr_bits,
  output logic                   fsm_take,
  output logic                   fsm_valid,
  output logic [$clog2(M)-1:0]   fsm_bits
);

  gray_mapper #(.M(M), .D(D), .IN_W(IN_W), .IN_FRAC(IN_FRAC)) u_map (
    .clk, .rst_n,
    .in_valid (tx_valid),
    .bits     (tx_bits),
    .out_valid(tx_x_valid),
    .x_i      (tx_x_i),
    .x_q      (tx_x_q)
  );

  logic yq_valid_q;

  qam_quantizer #(.M(M), .N(N), .D(D), .IN_W(IN_W), .IN_FRAC(IN_FRAC)) u_quant_i (
    .clk, .rst_n,
    .in_valid (rx_valid),
    .z        (rx_y_i),
    .out_valid(rx_yq_valid),
    .yq       (rx_yq_i),
    .clip_lo  (rx_clip_lo[1]),
    .clip_hi  (rx_clip_hi[1])
  );

  qam_quantizer #(.M(M), .N(N), .D(D), .IN_W(IN_W), .IN_FRAC(IN_FRAC)) u_quant_q (
    .clk, .rst_n,
    .in_valid (rx_valid),
    .z        (rx_y_q),
    .out_valid(yq_valid_q),
    .yq       (rx_yq_q),
    .clip_lo  (rx_clip_lo[0]),
    .clip_hi  (rx_clip_hi[0])
  );

  hdr_detector #(.M(M), .N(N)) u_hdr (
    .clk, .rst_n,
    .in_valid (rx_yq_valid),
    .yq_i     (rx_yq_i),
    .yq_q     (rx_yq_q),
    .out_valid(hdr_valid),
    .bits     (hdr_bits)
  );

  logic fsm_ready;

  hdr_fsm_detector #(.M(M), .N(N)) u_fsm (
    .clk, .rst_n,
    .in_valid (rx_yq_valid),
    .in_ready (fsm_ready),
    .yq_i     (rx_yq_i),
    .yq_q     (rx_yq_q),
    .out_valid(fsm_valid),
    .bits     (fsm_bits)
  );

  assign fsm_take = rx_yq_valid & fsm_ready;

`ifndef SYNTHESIS
  // Both quantizers see the same valid, so their outputs stay aligned.
  a_iq_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    rx_yq_valid == yq_valid_q);
`endif

endmodule
