// tb_condition_unit: all 16 condition codes against all 16 flag settings,
// compared with the condition table written out as a lookup of
// "flag must be set / clear" rules.
`timescale 1ns/1ps
module tb_condition_unit;
  logic [3:0] cond;
  logic n, z, c, v, pass;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  condition_unit dut (.cond, .n, .z, .c, .v, .pass);

  function automatic logic ref_pass(logic [3:0] cc, logic fn, fz, fc, fv);
    logic base;
    // even codes test the rule, odd codes its negation (except AL/NV)
    case (cc[3:1])
      3'd0: base = fz;
      3'd1: base = fc;
      3'd2: base = fn;
      3'd3: base = fv;
      3'd4: base = fc & ~fz;
      3'd5: base = ~(fn ^ fv);
      3'd6: base = ~fz & ~(fn ^ fv);
      default: base = 1'b1;
    endcase
    if (cc == 4'hF) return 1'b0;
    if (cc == 4'hE) return 1'b1;
    return cc[0] ? ~base : base;
  endfunction

  initial begin
    for (int k = 0; k < 256; k++) begin
      {cond, n, z, c, v} = 8'(k);
      @(posedge clk);
      checks++;
      if (pass !== ref_pass(cond, n, z, c, v)) begin
        failures++;
        $display("FAIL cond=%h nzcv=%b%b%b%b got %b", cond, n, z, c, v, pass);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
