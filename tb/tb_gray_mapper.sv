// tb_gray_mapper: checks the square M-QAM Gray mapper.
// 16-QAM is checked against the printed map (I = -3,-1,1,3 for labels
// 11,10,00,01, the same for Q, with d = 2). 64-QAM is checked against the
// 802.16 axis order 111,110,100,101,001,000,010,011. 4096-QAM is checked
// against a level search written here: for each label the level whose
// complemented Gray code matches. Every check also confirms the one-cycle
// latency.
module tb_gray_mapper;
  localparam int IN_FRAC = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        vin;
  logic [11:0] bits;
  logic        v16, v64, v4k;
  logic signed [31:0] i16, q16, i64, q64, i4k, q4k;

  gray_mapper #(.M(16))   u16 (.clk, .rst_n, .in_valid(vin), .bits(bits[3:0]),
                               .out_valid(v16), .x_i(i16), .x_q(q16));
  gray_mapper #(.M(64))   u64 (.clk, .rst_n, .in_valid(vin), .bits(bits[5:0]),
                               .out_valid(v64), .x_i(i64), .x_q(q64));
  gray_mapper #(.M(4096)) u4k (.clk, .rst_n, .in_valid(vin), .bits(bits[11:0]),
                               .out_valid(v4k), .x_i(i4k), .x_q(q4k));

  // Printed 16-QAM axis map, indexed by the 2-bit label: amplitude in units.
  function automatic int amp16(input logic [1:0] lab);
    case (lab)
      2'b11: return -3;
      2'b10: return -1;
      2'b00: return 1;
      default: return 3;
    endcase
  endfunction

  function automatic int amp64(input logic [2:0] lab);
    logic [2:0] order [8] = '{3'b111, 3'b110, 3'b100, 3'b101, 3'b001, 3'b000, 3'b010, 3'b011};
    for (int k = 0; k < 8; k++) if (order[k] == lab) return 2 * k - 7;
    return 999;
  endfunction

  function automatic int amp4k(input logic [5:0] lab);
    for (int k = 0; k < 64; k++) begin
      logic [5:0] g;
      g = 6'(k) ^ 6'(k >> 1);
      if (~g == lab) return 2 * k - 63;
    end
    return 999;
  endfunction

  task automatic check(input string what, input logic signed [31:0] got, input int units);
    logic signed [31:0] exp;
    exp = 32'(units) <<< IN_FRAC;   // d = 2: amplitude (2k-(L-1)) in input units
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s bits=%h got=%0d exp=%0d", what, bits, got, exp);
    end
  endtask

  initial begin
    vin = 1'b0;
    bits = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 4096; s++) begin
      @(negedge clk);
      vin  = 1'b1;
      bits = 12'(s);
      @(negedge clk);
      vin = 1'b0;
      checks++;
      if (!(v16 && v64 && v4k)) begin
        failures++;
        $display("FAIL latency: out_valid not high one cycle after in_valid");
      end
      if (s < 16) begin
        check("16 I", i16, amp16(bits[3:2]));
        check("16 Q", q16, amp16(bits[1:0]));
      end
      if (s < 64) begin
        check("64 I", i64, amp64(bits[5:3]));
        check("64 Q", q64, amp64(bits[2:0]));
      end
      check("4096 I", i4k, amp4k(bits[11:6]));
      check("4096 Q", q4k, amp4k(bits[5:0]));
      @(negedge clk);
      checks++;
      if (v16 || v64 || v4k) begin
        failures++;
        $display("FAIL out_valid stayed high");
      end
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
