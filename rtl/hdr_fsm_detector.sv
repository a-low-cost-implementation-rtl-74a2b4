// hdr_fsm_detector: heuristic-decision-region detection written as a state
// machine. It does the same job as hdr_detector (quantized I/Q in, Gray-coded
// message bits out) but scans the decision regions sequentially, one
// comparison per axis per clock, so it needs one comparator per axis instead
// of sqrt(M)-1.
//
// How: the machine waits in IDLE until a valid sample arrives. On that edge it
// registers the sample and compares each component with the middle boundary,
// which fixes the top bit of the region index (for 16-QAM: the "X > 0" or
// "X < 0" state). Each NODE cycle then halves the remaining interval,
// comparing with the boundary in its middle. When the last index bit is known
// the machine is in a LEAF state (for 16-QAM one of "X > 2", "X < 2",
// "X > -2", "X < -2"), where it drives the message bits through the Gray
// look-up table and returns to IDLE. I and Q run in lockstep on one state
// register. In the signed picture with d = 2 the boundaries are 0 and +-2; in
// the quantized domain they are the same THR(k) values hdr_detector uses.
//
// Interface: in_valid/in_ready handshake on the input (a sample is taken when
// both are high, and in_ready is high only in IDLE); out_valid pulses for one
// cycle with bits = {I label, Q label}.
// Timing: log2(sqrt(M)) + 1 cycles from accepting a sample to out_valid: 3 for
// 16-QAM. One symbol per 3 cycles for 16-QAM.
//
// From the source design: the state sequence idle -> sign state -> leaf ->
// idle for 16-QAM and its 3-cycle latency. Own choices: the binary search that
// extends the sequence to other M, the handshake, tie handling (a sample equal
// to a boundary goes to the upper region) and reset.
// The output assertion is disabled during reset, so Verilator notes that rst_n
// is used both as an asynchronous reset and synchronously there; that use is
// in verification code only.
module hdr_fsm_detector
  import qam_pkg::*;
#(
  parameter int unsigned M = 16,  // constellation order
  parameter int unsigned N = 32   // quantized component width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [N-1:0]         yq_i,
  input  logic [N-1:0]         yq_q,
  output logic                 out_valid,
  output logic [$clog2(M)-1:0] bits
);

  localparam int unsigned L  = levels_of(M);
  localparam int unsigned AB = $clog2(L);
  localparam int unsigned PB = (AB > 1) ? $clog2(AB) : 1;

  if (!valid_order(M)) begin : g_bad_m
    $error("hdr_fsm_detector: M must be 4, 16, 64, ... (square, power of two)");
  end

  typedef enum logic [1:0] {S_IDLE, S_NODE, S_LEAF} state_t;

  state_t        state;
  logic [N-1:0]  s_i, s_q;       // registered sample
  logic [AB-1:0] idx_i, idx_q;   // region index bits decided so far
  logic [PB-1:0] pos;            // next index bit to decide

  // Boundary table and Gray look-up table
  logic [N-1:0]  thr [L-1];
  logic [AB-1:0] lut [L];
  for (genvar k = 0; k < L - 1; k++) begin : g_thr
    assign thr[k] = N'(hdr_threshold(k, L, N));
  end
  for (genvar k = 0; k < L; k++) begin : g_lut
    assign lut[k] = AB'(axis_label(k, L));
  end

  // One comparison per axis: does the sample lie at or above the lower edge of
  // region (prefix | 1 << bit)?
  function automatic logic decide(input logic [N-1:0] s, input logic [AB-1:0] prefix,
                                  input logic [PB-1:0] b, input logic [N-1:0] t [L-1]);
    logic [AB-1:0] cand;
    cand = prefix | (AB'(1) << b);
    return s >= t[cand - AB'(1)];
  endfunction

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      s_i       <= '0;
      s_q       <= '0;
      idx_i     <= '0;
      idx_q     <= '0;
      pos       <= '0;
      out_valid <= 1'b0;
      bits      <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          s_i   <= yq_i;
          s_q   <= yq_q;
          idx_i <= AB'(decide(yq_i, '0, PB'(AB - 1), thr)) << (AB - 1);
          idx_q <= AB'(decide(yq_q, '0, PB'(AB - 1), thr)) << (AB - 1);
          pos   <= PB'(AB - 1);
          state <= (AB == 1) ? S_LEAF : S_NODE;
        end
        S_NODE: begin
          idx_i <= idx_i | (AB'(decide(s_i, idx_i, pos - PB'(1), thr)) << (pos - PB'(1)));
          idx_q <= idx_q | (AB'(decide(s_q, idx_q, pos - PB'(1), thr)) << (pos - PB'(1)));
          pos   <= pos - PB'(1);
          if (pos == PB'(1)) state <= S_LEAF;
        end
        S_LEAF: begin
          bits      <= {lut[idx_i], lut[idx_q]};
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // A result is only ever produced from a leaf state.
  a_out_from_leaf: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(state == S_LEAF));
`endif

endmodule
