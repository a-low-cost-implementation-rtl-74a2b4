// tb_qam_ber: bit-error-rate run of the complete mapper -> channel ->
// quantizer -> HDR detector chain for M = 4, 16, 64, 256, 1024 and 4096 (one
// qam_top per order, N = 32, d = 2), over an additive white Gaussian noise
// channel.
//
// For each order the Eb/N0 is set where the bit error rate is near 1e-2, so a
// few thousand symbols give a usable estimate. Two things are checked:
//  * every HDR decision equals the minimum-distance (maximum-likelihood)
//    decision computed here on the received fixed-point sample, and every
//    state-machine decision too (a sample exactly on a boundary may go
//    either way: quantization moves a boundary by up to half a step);
//  * the measured bit error rate is within 15 % of the nearest-neighbour
//    approximation for Gray-coded square M-QAM,
//      Pb ~ 4/log2(M) (1 - 1/sqrt(M)) Q( sqrt(3 log2(M) Eb/N0 / (M-1)) ).
// A short burst of 20 dB stronger noise at the end of each run drives the
// quantizers into clipping, which must not disturb the decisions.
module tb_qam_ber;
  localparam int NORD = 6;
  localparam int unsigned ORDERS [NORD] = '{4, 16, 64, 256, 1024, 4096};
  localparam real EBN0_DB [NORD] = '{4.0, 8.0, 12.5, 16.5, 20.5, 24.5};
  localparam int NSYM = 40000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int checks_g [NORD], fails_g [NORD], done_g [NORD];

  function automatic real gauss();
    real u1, u2;
    u1 = ($urandom % 1000000 + 1) / 1000001.0;
    u2 = ($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Q(x) = erfc(x / sqrt 2) / 2, erfc by Abramowitz-Stegun 7.1.26
  function automatic real qfunc(input real x);
    real z, t, e;
    z = x / $sqrt(2.0);
    t = 1.0 / (1.0 + 0.3275911 * z);
    e = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 + t * (-1.453152027
        + t * 1.061405429)))) * $exp(-z * z);
    return 0.5 * e;
  endfunction

  function automatic logic signed [31:0] to_fix(input real v);
    real c;
    c = v * 65536.0;
    if (c > 2147483647.0) c = 2147483647.0;
    if (c < -2147483648.0) c = -2147483648.0;
    return 32'($rtoi(c));
  endfunction

  for (genvar o = 0; o < NORD; o++) begin : g_ord
    localparam int unsigned M  = ORDERS[o];
    localparam int          L  = int'(qam_pkg::levels_of(M));
    localparam int          AB = $clog2(L);
    localparam int          MB = 2 * AB;

    logic              tx_valid, rx_valid, tx_x_valid, rx_yq_valid;
    logic [MB-1:0]     tx_bits, hdr_bits, fsm_bits;
    logic signed [31:0] tx_x_i, tx_x_q, rx_y_i, rx_y_q;
    logic [31:0]       rx_yq_i, rx_yq_q;
    logic [1:0]        rx_clip_lo, rx_clip_hi;
    logic              hdr_valid, fsm_take, fsm_valid;

    qam_top #(.M(M)) dut (.*);

    int  msg_q [$], ml_q [$], sent_q [$], yq_ml_q [$], fsm_q [$];
    longint bit_err, bits_tot;
    int  n_clip, n_tie;
    real sigma;
    bit  burst;

    // nearest level; tie is set when the sample lies exactly on a boundary
    function automatic int nearest(input logic signed [31:0] y, output bit tie);
      longint best, dst;
      int kb;
      best = 64'h7fff_ffff_ffff_ffff;
      kb = 0;
      tie = 1'b0;
      for (int k = 0; k < L; k++) begin
        dst = longint'(y) - (longint'(2 * k) - longint'(L) + 1) * 65536;
        if (dst < 0) dst = -dst;
        if (dst <= best) begin
          tie = (dst == best);
          best = dst;
          kb = k;
        end
      end
      return kb;
    endfunction

    function automatic int label(input int k);
      return ~(k ^ (k >> 1)) & (L - 1);
    endfunction

    initial begin
      real es, eb, n0;
      checks_g[o] = 0;
      fails_g[o] = 0;
      done_g[o] = 0;
      bit_err = 0;
      bits_tot = 0;
      n_clip = 0;
      n_tie = 0;
      burst = 1'b0;
      es = 2.0 * (M - 1) / 3.0;           // d = 2
      eb = es / MB;
      n0 = eb / (10.0 ** (EBN0_DB[o] / 10.0));
      sigma = $sqrt(n0 / 2.0);
      tx_valid = 1'b0;
      tx_bits = '0;
      wait (rst_n);
      for (int s = 0; s < NSYM + 200; s++) begin
        @(negedge clk);
        burst = s >= NSYM;
        tx_valid = 1'b1;
        tx_bits = MB'($urandom);
        msg_q.push_back(int'(tx_bits));
      end
      @(negedge clk);
      tx_valid = 1'b0;
      repeat (20) @(negedge clk);
      done_g[o] = 1;
    end

    // channel
    always @(negedge clk) begin
      rx_valid = 1'b0;
      if (rst_n && tx_x_valid) begin
        real s;
        int ki, kq, m;
        bit ti, tq;
        s = burst ? 10.0 * sigma : sigma;
        m = msg_q.pop_front();
        rx_valid = 1'b1;
        rx_y_i = tx_x_i + to_fix(s * gauss());
        rx_y_q = tx_x_q + to_fix(s * gauss());
        ki = nearest(rx_y_i, ti);
        kq = nearest(rx_y_q, tq);
        // on an exact boundary the quantizer's rounding may pick either side
        // (it moves a boundary by at most half a quantizer step)
        ml_q.push_back((ti || tq) ? -1 : (label(ki) << AB) | label(kq));
        n_tie += int'(ti || tq);
        sent_q.push_back(burst ? -1 : m);
      end
    end

    always @(posedge clk) if (rst_n) begin
      if (rx_valid) yq_ml_q.push_back(ml_q[ml_q.size() - 1]);
      if (rx_yq_valid) begin
        int e;
        e = yq_ml_q.pop_front();
        if (fsm_take) fsm_q.push_back(e);
        if (rx_clip_lo != 0 || rx_clip_hi != 0) n_clip++;
      end
      if (hdr_valid) begin
        int e, m;
        e = ml_q.pop_front();
        m = sent_q.pop_front();
        checks_g[o]++;
        if (e >= 0 && int'(hdr_bits) != e) begin
          fails_g[o]++;
          if (fails_g[o] < 5) $display("FAIL M=%0d hdr=%h ml=%h", M, hdr_bits, e);
        end
        if (m >= 0) begin
          bit_err += $countones(MB'(hdr_bits) ^ MB'(m));
          bits_tot += longint'(MB);
        end
      end
      if (fsm_valid) begin
        checks_g[o]++;
        if (fsm_q.size() == 0 || !(fsm_q[0] < 0 || int'(fsm_bits) == fsm_q[0])) begin
          fails_g[o]++;
          if (fails_g[o] < 5) $display("FAIL M=%0d state machine result", M);
        end
        if (fsm_q.size() != 0) void'(fsm_q.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_g[0] != 0 && done_g[1] != 0 && done_g[2] != 0 && done_g[3] != 0
          && done_g[4] != 0 && done_g[5] != 0);
    for (int o = 0; o < NORD; o++) begin
      checks += checks_g[o];
      failures += fails_g[o];
    end
    // per-order BER against theory
    for (int o = 0; o < NORD; o++) begin
      real mb, ebn0, th, meas;
      longint be, bt;
      int clip;
      mb = $clog2(ORDERS[o]);
      ebn0 = 10.0 ** (EBN0_DB[o] / 10.0);
      th = 4.0 / mb * (1.0 - 1.0 / $sqrt(real'(ORDERS[o])))
           * qfunc($sqrt(3.0 * mb * ebn0 / (ORDERS[o] - 1.0)));
      case (o)
        0: begin be = g_ord[0].bit_err; bt = g_ord[0].bits_tot; clip = g_ord[0].n_clip; end
        1: begin be = g_ord[1].bit_err; bt = g_ord[1].bits_tot; clip = g_ord[1].n_clip; end
        2: begin be = g_ord[2].bit_err; bt = g_ord[2].bits_tot; clip = g_ord[2].n_clip; end
        3: begin be = g_ord[3].bit_err; bt = g_ord[3].bits_tot; clip = g_ord[3].n_clip; end
        4: begin be = g_ord[4].bit_err; bt = g_ord[4].bits_tot; clip = g_ord[4].n_clip; end
        default: begin be = g_ord[5].bit_err; bt = g_ord[5].bits_tot; clip = g_ord[5].n_clip; end
      endcase
      meas = real'(be) / real'(bt);
      $display("%5d-QAM  Eb/N0 %4.1f dB  BER %.3e  theory %.3e  (%0d errors, %0d clipped samples)",
               ORDERS[o], EBN0_DB[o], meas, th, be, clip);
      checks += 2;
      if (meas > 1.15 * th || meas < 0.85 * th) begin
        failures++;
        $display("FAIL %0d-QAM BER off theory", ORDERS[o]);
      end
      if (clip == 0) begin
        failures++;
        $display("FAIL %0d-QAM clipping never exercised", ORDERS[o]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSYM * 4) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
