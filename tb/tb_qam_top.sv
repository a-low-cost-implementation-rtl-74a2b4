// tb_qam_top: end-to-end test of qam_top at its default parameters
// (16-QAM, 32-bit quantizer, d = 2, 32-bit amplitudes with 16 fraction bits).
//
// Random messages enter the transmit side. The testbench takes each
// transmitted point, checks it against the 16-QAM map (levels -3, -1, 1, 3 for
// labels 11, 10, 00, 01), adds noise and feeds it to the receive side. The
// noise is Gaussian background noise at Eb/N0 = 10 dB with bursts of
// impulsive Gaussian noise 20 dB stronger (exponential gaps, mean 150
// symbols, 12 symbols long), as in a power-line channel.
//
// Checks:
//  * tx point = mapped message, one cycle after tx_valid;
//  * HDR result = minimum-distance decision on the received fixed-point
//    sample (integer search over the four levels per axis), two cycles after
//    rx_valid, for every sample;
//  * state-machine result = the same decision, three cycles after fsm_take,
//    for every sample it takes;
//  * a noise-free run decodes every message exactly.
// Mechanisms that must occur at least once: clipping at 0 and at 2^N-1 on both
// axes, every one of the 16 decision regions, a sample the state machine could
// not take because it was busy, a sample it took, a decision error caused by
// noise, and idle cycles on the input.
module tb_qam_top;
  localparam int NSYM = 6000;
  localparam real EBN0_DB = 10.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic              tx_valid, rx_valid;
  logic [3:0]        tx_bits;
  logic              tx_x_valid;
  logic signed [31:0] tx_x_i, tx_x_q, rx_y_i, rx_y_q;
  logic              rx_yq_valid;
  logic [31:0]       rx_yq_i, rx_yq_q;
  logic [1:0]        rx_clip_lo, rx_clip_hi;
  logic              hdr_valid, fsm_take, fsm_valid;
  logic [3:0]        hdr_bits, fsm_bits;

  qam_top dut (.*);

  // mechanism counters
  int n_clip_lo_i = 0, n_clip_lo_q = 0, n_clip_hi_i = 0, n_clip_hi_q = 0;
  int n_region [16];
  int n_fsm_busy = 0, n_fsm_take = 0, n_noise_err = 0, n_gap = 0, n_bit_err = 0;
  int n_hdr = 0, n_fsm = 0;

  bit noiseless = 1'b0;

  // expected results in order
  int tx_exp_q [$];      // message sent, waiting for tx output
  int rx_exp_q [$];      // decision expected per rx sample
  int rx_due_q [$];
  int rx_msg_q [$];      // message originally sent
  int yq_exp_q [$];      // decision for the sample now at the quantizer output
  int fsm_exp_q [$];
  int fsm_due_q [$];

  function automatic int printed_level(input int lab);   // 16-QAM, units of d/2
    case (lab)
      3: return -3;
      2: return -1;
      0: return 1;
      default: return 3;
    endcase
  endfunction

  // nearest level index (0..3) to a fixed-point sample; ties go up
  function automatic int nearest(input logic signed [31:0] y);
    longint best, dst;
    int kb;
    best = 64'h7fff_ffff_ffff_ffff;
    kb = 0;
    for (int k = 0; k < 4; k++) begin
      dst = longint'(y) - longint'(2 * k - 3) * 65536;
      if (dst < 0) dst = -dst;
      if (dst <= best) begin
        best = dst;
        kb = k;
      end
    end
    return kb;
  endfunction

  function automatic int label_of(input int k);
    int t [4] = '{3, 2, 0, 1};
    return t[k];
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = ($urandom % 1000000 + 1) / 1000001.0;
    u2 = ($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // noise state
  real sigma;
  int  burst_left = 0, gap_left = 100;

  function automatic logic signed [31:0] to_fix(input real v);
    real c;
    c = v * 65536.0;
    if (c > 2147483647.0) c = 2147483647.0;
    if (c < -2147483648.0) c = -2147483648.0;
    return 32'($rtoi(c));
  endfunction

  // drive transmit side
  task automatic send_all(input int n);
    for (int s = 0; s < n; s++) begin
      @(negedge clk);
      if ($urandom % 10 == 0) begin
        tx_valid = 1'b0;
      end else begin
        tx_valid = 1'b1;
        tx_bits = 4'($urandom);
        tx_exp_q.push_back(int'(tx_bits));
      end
    end
    @(negedge clk);
    tx_valid = 1'b0;
    repeat (8) @(negedge clk);
  endtask

  // channel: transmitted point + noise -> receiver, same cycle
  always @(negedge clk) begin
    rx_valid = 1'b0;
    if (rst_n && tx_x_valid) begin
      int m, ki, kq;
      real s, ni, nq;
      m = tx_exp_q.pop_front();
      checks++;
      if (tx_x_i != (32'(printed_level(m >> 2)) <<< 16) ||
          tx_x_q != (32'(printed_level(m & 3)) <<< 16)) begin
        failures++;
        $display("FAIL tx point for %h: %0d %0d", m, tx_x_i, tx_x_q);
      end
      s = sigma;
      if (burst_left > 0) begin
        s = sigma * 10.0;          // 20 dB more noise power
        burst_left--;
      end else if (gap_left > 0) begin
        gap_left--;
      end else begin
        burst_left = 12;
        gap_left = int'(-150.0 * $ln(($urandom % 1000000 + 1) / 1000001.0));
      end
      ni = noiseless ? 0.0 : s * gauss();
      nq = noiseless ? 0.0 : s * gauss();
      rx_valid = 1'b1;
      rx_y_i = tx_x_i + to_fix(ni);
      rx_y_q = tx_x_q + to_fix(nq);
      ki = nearest(rx_y_i);
      kq = nearest(rx_y_q);
      n_region[ki * 4 + kq]++;
      rx_exp_q.push_back((label_of(ki) << 2) | label_of(kq));
      rx_msg_q.push_back(m);
      rx_due_q.push_back(cycle + 2);
    end else if (rst_n) begin
      n_gap++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    // quantizer output stage: clipping and the state machine's view
    if (rx_yq_valid) begin
      n_clip_lo_i += int'(rx_clip_lo[1]);
      n_clip_lo_q += int'(rx_clip_lo[0]);
      n_clip_hi_i += int'(rx_clip_hi[1]);
      n_clip_hi_q += int'(rx_clip_hi[0]);
      if (fsm_take) begin
        n_fsm_take++;
        fsm_exp_q.push_back(yq_exp_q[0]);
        fsm_due_q.push_back(cycle + 3);
      end else begin
        n_fsm_busy++;
      end
      void'(yq_exp_q.pop_front());
    end
    if (hdr_valid) begin
      int e, d, m;
      n_hdr++;
      checks++;
      e = rx_exp_q.pop_front();
      d = rx_due_q.pop_front();
      m = rx_msg_q.pop_front();
      if (int'(hdr_bits) != e || cycle != d) begin
        failures++;
        $display("FAIL hdr got=%h exp=%h cycle=%0d due=%0d", hdr_bits, e, cycle, d);
      end
      if (e != m) n_noise_err++;
      n_bit_err += $countones(4'(e ^ m));
      if (noiseless) begin
        checks++;
        if (int'(hdr_bits) != m) begin
          failures++;
          $display("FAIL noiseless decode got=%h sent=%h", hdr_bits, m);
        end
      end
    end
    if (fsm_valid) begin
      int e, d;
      n_fsm++;
      checks++;
      if (fsm_exp_q.size() == 0) begin
        failures++;
        $display("FAIL fsm result without a taken sample");
      end else begin
        e = fsm_exp_q.pop_front();
        d = fsm_due_q.pop_front();
        if (int'(fsm_bits) != e || cycle != d) begin
          failures++;
          $display("FAIL fsm got=%h exp=%h cycle=%0d due=%0d", fsm_bits, e, cycle, d);
        end
      end
    end
  end

  // the decision for each rx sample follows it to the quantizer output
  always @(posedge clk) if (rst_n && rx_valid) yq_exp_q.push_back(rx_exp_q[rx_exp_q.size() - 1]);

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else begin
      $display("  %-34s %0d", what, n);
    end
  endtask

  initial begin
    real ebn0, n0;
    for (int r = 0; r < 16; r++) n_region[r] = 0;
    tx_valid = 1'b0;
    tx_bits = '0;
    rx_valid = 1'b0;
    rx_y_i = '0;
    rx_y_q = '0;
    // 16-QAM, d = 2: Es = 10, Eb = 2.5
    ebn0 = 10.0 ** (EBN0_DB / 10.0);
    n0 = 2.5 / ebn0;
    sigma = $sqrt(n0 / 2.0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    noiseless = 1'b1;
    send_all(500);
    noiseless = 1'b0;
    send_all(NSYM);
    checks++;
    if (rx_exp_q.size() != 0 || tx_exp_q.size() != 0 || fsm_exp_q.size() != 0) begin
      failures++;
      $display("FAIL results missing: %0d %0d %0d", rx_exp_q.size(), tx_exp_q.size(),
               fsm_exp_q.size());
    end
    $display("mechanisms:");
    need("clip at 0, I", n_clip_lo_i);
    need("clip at 0, Q", n_clip_lo_q);
    need("clip at 2^N-1, I", n_clip_hi_i);
    need("clip at 2^N-1, Q", n_clip_hi_q);
    for (int r = 0; r < 16; r++) need($sformatf("decision region I%0d Q%0d", r / 4, r % 4), n_region[r]);
    need("state machine busy, sample skipped", n_fsm_busy);
    need("state machine took a sample", n_fsm_take);
    need("decision error caused by noise", n_noise_err);
    need("idle input cycle", n_gap);
    $display("HDR results %0d, state-machine results %0d, bit errors %0d", n_hdr, n_fsm, n_bit_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NSYM) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
