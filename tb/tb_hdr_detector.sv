// tb_hdr_detector: checks the comparator + LUT detector for every order the
// design targets, M = 4, 16, 64, 256, 1024 and 4096, all with N = 32.
// The reference decision is a minimum-distance search written here: level k
// of L = sqrt(M) lies at k(2^N-1)/(L-1) in the quantized domain, and the
// reference picks, per axis, the level nearest to the sample (compared as
// |yq(L-1) - k(2^N-1)| in integers, which never ties). The reference label is
// the complemented reflected Gray code of that level; for 16-QAM it is also
// checked against the printed map 11, 10, 00, 01. Samples are random words,
// values at and next to every region boundary, and back-to-back symbols, and
// each result must appear exactly one cycle after its input.
module tb_hdr_detector;
  localparam int NORD = 6;
  localparam int unsigned ORDERS [NORD] = '{4, 16, 64, 256, 1024, 4096};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks_g [NORD];
  int fails_g [NORD];
  int checks = 0;
  int failures = 0;

  logic        vin;
  logic [31:0] yi, yq;

  // nearest level to a quantized sample
  function automatic int nearest(input logic [31:0] s, input int l);
    longint unsigned best, dst;
    int k_best;
    best = '1;
    k_best = 0;
    for (int k = 0; k < l; k++) begin
      longint signed a;
      a = longint'(s) * (longint'(l) - 1) - longint'(k) * 64'hffff_ffff;
      dst = (a < 0) ? longint'(-a) : longint'(a);
      if (dst < best) begin
        best = dst;
        k_best = k;
      end
    end
    return k_best;
  endfunction

  function automatic int label(input int k, input int l);
    int g;
    g = k ^ (k >> 1);
    return ~g & (l - 1);
  endfunction

  function automatic int printed16(input int k);
    int t [4] = '{3, 2, 0, 1};   // 11, 10, 00, 01 from -3 to +3
    return t[k];
  endfunction

  for (genvar o = 0; o < NORD; o++) begin : g_ord
    localparam int unsigned M  = ORDERS[o];
    localparam int          L  = int'(qam_pkg::levels_of(M));
    localparam int          AB = $clog2(L);
    logic                 vout;
    logic [$clog2(M)-1:0] bits;
    logic [31:0]          pi, pq;
    logic                 pv;

    hdr_detector #(.M(M), .N(32)) dut (.clk, .rst_n, .in_valid(vin), .yq_i(yi), .yq_q(yq),
                                       .out_valid(vout), .bits);

    initial begin
      checks_g[o] = 0;
      fails_g[o] = 0;
    end

    always @(posedge clk) begin
      pv <= vin & rst_n;
      pi <= yi;
      pq <= yq;
    end

    always @(negedge clk) if (rst_n) begin
      int ki, kq, exp;
      checks_g[o]++;
      if (vout !== pv) begin
        fails_g[o]++;
        $display("FAIL M=%0d valid timing", M);
      end
      if (pv) begin
        ki = nearest(pi, L);
        kq = nearest(pq, L);
        exp = (label(ki, L) << AB) | label(kq, L);
        checks_g[o]++;
        if (int'(bits) != exp) begin
          fails_g[o]++;
          $display("FAIL M=%0d yi=%0d yq=%0d got=%h exp=%h", M, pi, pq, bits, exp);
        end
        if (M == 16) begin
          checks_g[o]++;
          if (int'(bits) != ((printed16(ki) << 2) | printed16(kq))) begin
            fails_g[o]++;
            $display("FAIL 16-QAM printed map yi=%0d yq=%0d got=%h", pi, pq, bits);
          end
        end
      end
    end
  end

  // every boundary of every order, and its neighbours
  task automatic boundaries(input int l);
    for (int k = 0; k < l - 1; k++) begin
      longint unsigned b;
      b = ((longint'(2 * k + 1) * 64'hffff_ffff) + (2 * longint'(l) - 2) - 1) / (2 * longint'(l) - 2);
      for (int dlt = -2; dlt <= 1; dlt++) begin
        @(negedge clk);
        vin = 1'b1;
        yi  = 32'(longint'(b) + dlt);
        yq  = 32'(longint'(b) - 1 - dlt);
      end
    end
  endtask

  initial begin
    vin = 1'b0;
    yi = '0;
    yq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int o = 0; o < NORD; o++) boundaries(int'(qam_pkg::levels_of(ORDERS[o])));
    @(negedge clk);
    vin = 1'b0;
    @(negedge clk);
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      vin = ($urandom % 4) != 0;
      yi  = $urandom;
      yq  = $urandom;
    end
    @(negedge clk);
    vin = 1'b0;
    repeat (3) @(negedge clk);
    for (int o = 0; o < NORD; o++) begin
      checks += checks_g[o];
      failures += fails_g[o];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
