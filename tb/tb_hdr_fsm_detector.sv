// tb_hdr_fsm_detector: checks the state-machine HDR detector for 16-QAM (the
// default), 4-QAM and 4096-QAM, all with N = 32.
// A driver offers random quantized samples, sometimes back to back and
// sometimes with gaps; right after a sample is taken the next offer is put on
// the inputs, so the machine must work from its registered copy. For each accepted sample (in_valid and in_ready both
// high) the testbench computes the nearest level per axis by a distance
// search, turns it into the complemented Gray label and expects that word
// exactly log2(sqrt(M)) + 1 cycles later (3 cycles for 16-QAM). It also checks
// that in_ready is low while a detection is in progress, counts offers that
// had to wait, and for 16-QAM requires that all four leaf regions of each
// axis were reached.
module tb_hdr_fsm_detector;
  localparam int NORD = 3;
  localparam int unsigned ORDERS [NORD] = '{16, 4, 4096};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks_g [NORD];
  int fails_g [NORD];
  int waits_g [NORD];
  int leaf_seen [4];
  int checks = 0;
  int failures = 0;
  int cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

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

  for (genvar o = 0; o < NORD; o++) begin : g_ord
    localparam int unsigned M   = ORDERS[o];
    localparam int          L   = int'(qam_pkg::levels_of(M));
    localparam int          AB  = $clog2(L);
    localparam int          LAT = AB + 1;
    logic                 vin, rdy, vout;
    logic [31:0]          yi, yq;
    logic [$clog2(M)-1:0] bits;
    int                   exp_q [$];
    int                   due_q [$];
    logic                 taken = 1'b0;
    int                   busy_left = 0;

    hdr_fsm_detector #(.M(M), .N(32)) dut (.clk, .rst_n, .in_valid(vin), .in_ready(rdy),
                                           .yq_i(yi), .yq_q(yq), .out_valid(vout), .bits);

    initial begin
      checks_g[o] = 0;
      fails_g[o] = 0;
      waits_g[o] = 0;
      vin = 1'b0;
      yi = '0;
      yq = '0;
      wait (rst_n);
      for (int t = 0; t < 1500; t++) begin
        @(negedge clk);
        if (!vin || taken) begin
          // previous offer was taken (or none pending): new offer or a gap
          vin = ($urandom % 3) != 0;
          yi  = (t % 2 == 0) ? $urandom : 32'($urandom % 5) * 32'd858993459 + 32'($urandom % 64) - 32;
          yq  = $urandom;
        end else begin
          waits_g[o]++;
        end
      end
      @(negedge clk);
      while (vin && !taken) @(negedge clk);
      vin = 1'b0;
    end

    always @(posedge clk) taken <= rst_n && vin && rdy;

    // record accepted samples
    always @(posedge clk) if (rst_n && vin && rdy) begin
      int ki, kq;
      ki = nearest(yi, L);
      kq = nearest(yq, L);
      exp_q.push_back((label(ki, L) << AB) | label(kq, L));
      due_q.push_back(cycle + LAT);
      if (M == 16) begin
        leaf_seen[ki]++;
        leaf_seen[kq]++;
      end
    end

    // compare results
    always @(posedge clk) if (rst_n) begin
      if (vout) begin
        checks_g[o]++;
        if (exp_q.size() == 0) begin
          fails_g[o]++;
          $display("FAIL M=%0d unexpected result", M);
        end else begin
          int e, due;
          e = exp_q.pop_front();
          due = due_q.pop_front();
          if (int'(bits) != e || cycle != due) begin
            fails_g[o]++;
            $display("FAIL M=%0d got=%h exp=%h at cycle %0d due %0d", M, bits, e, cycle, due);
          end
        end
      end
      // not ready for log2(sqrt(M)) cycles after taking a sample
      if (busy_left > 0) begin
        checks_g[o]++;
        if (rdy) begin
          fails_g[o]++;
          $display("FAIL M=%0d ready while busy", M);
        end
        busy_left <= busy_left - 1;
      end
      if (vin && rdy) busy_left <= LAT - 1;
    end
  end

  initial begin
    for (int k = 0; k < 4; k++) leaf_seen[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (1500 * 3 + 40) @(posedge clk);
    for (int o = 0; o < NORD; o++) begin
      checks += checks_g[o];
      failures += fails_g[o];
      checks++;
      if (checks_g[o] < 150 || waits_g[o] == 0) begin
        failures++;
        $display("FAIL order %0d: %0d results, %0d waits", ORDERS[o], checks_g[o], waits_g[o]);
      end
    end
    checks += 2;
    if (g_ord[0].exp_q.size() != 0 || g_ord[2].exp_q.size() != 0) begin
      failures++;
      $display("FAIL results missing");
    end
    for (int k = 0; k < 4; k++) if (leaf_seen[k] == 0) begin
      failures++;
      $display("FAIL 16-QAM leaf %0d never reached", k);
    end
    $display("16-QAM leaves reached: %0d %0d %0d %0d", leaf_seen[0], leaf_seen[1],
             leaf_seen[2], leaf_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
