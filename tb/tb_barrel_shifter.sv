// tb_barrel_shifter: random operands, all shift types, both amount forms,
// against a bit-by-bit reference (one-position shifts repeated).
`timescale 1ns/1ps
module tb_barrel_shifter;
  import arm_pkg::*;
  logic [31:0] din, dout;
  shift_e      stype;
  logic [7:0]  amount;
  logic        imm_form, cin, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  barrel_shifter dut (.din, .stype, .amount, .imm_form, .cin, .dout, .cout);

  // shift one position at a time, tracking the last bit shifted out
  task automatic ref_shift(input logic [31:0] x, input shift_e t, input int amt, input logic ci,
                           output logic [31:0] y, output logic co);
    y = x; co = ci;
    if (t == SH_ROR && amt > 0) amt = ((amt - 1) % 32) + 1;     // ROR by 32k behaves as 32
    for (int i = 0; i < amt; i++) begin
      case (t)
        SH_LSL: begin co = y[31]; y = {y[30:0], 1'b0}; end
        SH_LSR: begin co = y[0];  y = {1'b0, y[31:1]}; end
        SH_ASR: begin co = y[0];  y = {y[31], y[31:1]}; end
        SH_ROR: begin co = y[0];  y = {y[0], y[31:1]}; end
      endcase
    end
  endtask

  initial begin
    logic [31:0] ey; logic ec; int amt;
    for (int k = 0; k < 4000; k++) begin
      din = $urandom; stype = shift_e'($urandom_range(0, 3)); cin = 1'($urandom);
      imm_form = 1'($urandom);
      amount = (k % 3 == 0) ? 8'($urandom) : 8'($urandom_range(0, 40));
      if (imm_form) amount = {3'd0, amount[4:0]};
      @(posedge clk);
      amt = int'(amount);
      if (imm_form && amt == 0) begin
        case (stype)
          SH_LSL: begin ey = din; ec = cin; end
          SH_LSR, SH_ASR: ref_shift(din, stype, 32, cin, ey, ec);
          default: begin ey = {cin, din[31:1]}; ec = din[0]; end     // RRX
        endcase
      end else if (!imm_form && amt == 0) begin
        ey = din; ec = cin;
      end else begin
        ref_shift(din, stype, (stype == SH_ROR || amt < 64) ? amt : 64, cin, ey, ec);
        if (stype == SH_ROR && amt % 32 == 0) begin ey = din; ec = din[31]; end
      end
      checks++;
      if (dout !== ey || cout !== ec) begin
        failures++;
        if (failures < 10) $display("FAIL din=%h t=%0d amt=%0d imm=%b: %h/%b exp %h/%b",
                                    din, stype, amt, imm_form, dout, cout, ey, ec);
      end
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
