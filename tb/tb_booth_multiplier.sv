// tb_booth_multiplier: random signed and unsigned multiply-accumulates,
// with multipliers chosen to hit every early-termination length.  Checks
// the 64-bit result against integer arithmetic and the cycle count from
// `start` to `done` against 1 + (number of 8-bit multiplier groups needed),
// i.e. 2..5 cycles, where the groups needed follow the rule "stop when bits
// [32:8k] of the 33-bit extended multiplier are all zero or all one".
`timescale 1ns/1ps
module tb_booth_multiplier;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        start, is_signed, busy, done;
  logic [31:0] a, b;
  logic [63:0] acc, result;
  logic [2:0]  bc;
  int checks = 0, failures = 0;
  int hist [5];

  booth_multiplier dut (.clk, .rst_n, .start, .a, .b, .acc, .is_signed, .busy, .done,
                        .result, .booth_cycles(bc));

  function automatic int groups(logic [31:0] m, logic sg);
    logic [32:0] x;
    x = {sg & m[31], m};
    for (int k = 1; k <= 4; k++) begin
      logic [32:0] rest;
      rest = 33'($signed(x) >>> (8 * k));
      if (rest == {33{x[32]}}) return k;
    end
    return 4;
  endfunction

  initial begin
    logic [63:0] exp; int n, lat;
    start = 0; a = 0; b = 0; acc = 0; is_signed = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      a = $urandom; is_signed = 1'($urandom);
      case (k % 5)
        0: b = $urandom_range(0, 255);
        1: b = $urandom_range(0, 65535);
        2: b = -$urandom_range(1, 65535);
        3: b = $urandom_range(0, 32'hFF_FFFF);
        default: b = $urandom;
      endcase
      acc = (k % 3 == 0) ? 64'd0 : {$urandom, $urandom};
      if (is_signed) exp = 64'($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b})) + acc;
      else           exp = 64'({32'd0, a} * {32'd0, b}) + acc;
      n = groups(b, is_signed);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 2;                      // cycles so far, the start cycle included
      while (!done && lat < 20) begin @(negedge clk); lat++; end
      checks += 2;
      if (result !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h acc=%h: %h exp %h", is_signed ? "s" : "u", a, b, acc, result, exp);
      end
      if (lat != n + 1) begin
        failures++;
        if (failures < 10) $display("FAIL latency b=%h: %0d cycles, expected %0d", b, lat, n + 1);
      end
      hist[n]++;
      @(negedge clk);
      checks++;
      if (result !== exp || busy) begin failures++; $display("FAIL result not held"); end
    end
    for (int g = 1; g <= 4; g++) begin
      checks++;
      if (hist[g] == 0) begin failures++; $display("FAIL length %0d never seen", g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
