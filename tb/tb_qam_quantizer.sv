// tb_qam_quantizer: checks the clip / offset / quantize function on three
// instances: the default (16-QAM, N = 32), 4096-QAM with N = 32, and 64-QAM
// with N = 8. Inputs are random words, random values near the constellation,
// exact decision boundaries and the extremes of the input range.
// The reference for every instance is the exact rational formula
//   clamp(floor(z * (2^N-1) / ((L-1) d 2^IN_FRAC)) + 2^(N-1), 0, 2^N-1)
// in 128-bit integers. The N = 8 instance is also checked against the
// clip/offset/floor rule evaluated literally in real arithmetic, with
// offset K = (2^N-1)/2 and step (L-1)d/(2^N-1). The clip flags and the
// one-cycle latency are checked too.
module tb_qam_quantizer;
  localparam int IN_FRAC = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_lo = 0, n_hi = 0;

  logic               vin;
  logic signed [31:0] z;
  logic               va, vb, vc;
  logic [31:0]        qa, qb;
  logic [7:0]         qc;
  logic               la, ha, lb, hb, lc, hc;

  qam_quantizer                       ua (.clk, .rst_n, .in_valid(vin), .z, .out_valid(va),
                                          .yq(qa), .clip_lo(la), .clip_hi(ha));
  qam_quantizer #(.M(4096), .N(32))   ub (.clk, .rst_n, .in_valid(vin), .z, .out_valid(vb),
                                          .yq(qb), .clip_lo(lb), .clip_hi(hb));
  qam_quantizer #(.M(64), .N(8))      uc (.clk, .rst_n, .in_valid(vin), .z, .out_valid(vc),
                                          .yq(qc), .clip_lo(lc), .clip_hi(hc));

  typedef logic signed [127:0] s128_t;

  // exact reference: returns value, sets lo/hi
  function automatic longint ref_q(input logic signed [31:0] zz, input int l, input int n,
                                   output bit lo, output bit hi);
    s128_t num, den, q, r;
    num = s128_t'(zz) * ((s128_t'(1) <<< n) - 1);
    den = (s128_t'(l) - 1) * 2 * (s128_t'(1) <<< IN_FRAC);
    q = num / den;
    r = num % den;
    if (r != 0 && num < 0) q = q - 1;   // floor
    q = q + (s128_t'(1) <<< (n - 1));
    lo = q < 0;
    hi = q > (s128_t'(1) <<< n) - 1;
    if (lo) return 0;
    if (hi) return longint'((s128_t'(1) <<< n) - 1);
    return longint'(q);
  endfunction

  // literal real-valued rule for the N = 8, 64-QAM instance
  function automatic int real_rule(input logic signed [31:0] zz);
    real d, step, kq, x;
    d    = 2.0;
    kq   = (256.0 - 1.0) / 2.0;
    step = 7.0 * d / 255.0;
    x    = $itor(zz) / 65536.0 / step;
    if (x < -kq) return 0;
    if (x > kq)  return 255;
    return $rtoi($floor(x + kq + 0.5));
  endfunction

  task automatic one(input logic signed [31:0] val);
    bit lo, hi;
    longint e;
    @(negedge clk);
    vin = 1'b1;
    z   = val;
    @(negedge clk);
    vin = 1'b0;
    checks++;
    if (!(va && vb && vc)) begin
      failures++;
      $display("FAIL latency for z=%0d", val);
    end
    e = ref_q(val, 4, 32, lo, hi);
    checks++;
    if (longint'(qa) != e || la != lo || ha != hi) begin
      failures++;
      $display("FAIL M16 z=%0d got=%0d/%b%b exp=%0d/%b%b", val, qa, la, ha, e, lo, hi);
    end
    n_lo += int'(lo);
    n_hi += int'(hi);
    e = ref_q(val, 64, 32, lo, hi);
    checks++;
    if (longint'(qb) != e || lb != lo || hb != hi) begin
      failures++;
      $display("FAIL M4096 z=%0d got=%0d exp=%0d", val, qb, e);
    end
    e = ref_q(val, 8, 8, lo, hi);
    checks++;
    if (longint'(qc) != e || lc != lo || hc != hi) begin
      failures++;
      $display("FAIL M64/N8 z=%0d got=%0d exp=%0d", val, qc, e);
    end
    // the real-valued rule may differ only where x + K + 1/2 is an integer
    // within double rounding; count a failure for more than one step apart
    checks++;
    if (int'(qc) - real_rule(val) > 1 || real_rule(val) - int'(qc) > 1) begin
      failures++;
      $display("FAIL M64/N8 literal rule z=%0d got=%0d rule=%0d", val, qc, real_rule(val));
    end
  endtask

  initial begin
    vin = 1'b0;
    z = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // extremes
    one(32'sh7fffffff);
    one(32'sh80000000);
    one(0);
    one(-1);
    one(1);
    // constellation points of every order and the boundaries between them
    for (int a = -64; a <= 64; a++) begin
      one(32'(a) <<< IN_FRAC);
      one((32'(a) <<< IN_FRAC) + 1);
      one((32'(a) <<< IN_FRAC) - 1);
    end
    // random near the constellation (|z| < 128) and random words
    for (int t = 0; t < 3000; t++) begin
      one($signed($urandom) >>> 8);
      one($signed($urandom));
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin
      failures++;
      $display("FAIL clipping not exercised lo=%0d hi=%0d", n_lo, n_hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
