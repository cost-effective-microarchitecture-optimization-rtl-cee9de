// tb_alu: random operands for all 16 opcodes; result and N, Z, C, V
// compared with a reference that uses 64-bit integer arithmetic.
`timescale 1ns/1ps
module tb_alu;
  import arm_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        cin, vin, sc, n, z, c, v, wr;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu dut (.op, .a, .b, .cin, .vin, .shift_cout(sc), .y, .n, .z, .c, .v, .wr_result(wr));

  initial begin
    longint ua, ub, r; longint sa, sb, sr;
    logic [31:0] ey; logic ec, ev, logical;
    for (int k = 0; k < 6000; k++) begin
      op = alu_op_e'(k % 16);
      a = (k % 7 == 0) ? 32'h7FFF_FFFF : $urandom;
      b = (k % 11 == 0) ? 32'h8000_0000 : $urandom;
      if (k % 13 == 0) b = a;
      cin = 1'($urandom); vin = 1'($urandom); sc = 1'($urandom);
      @(posedge clk);
      ua = longint'(a); ub = longint'(b);
      sa = longint'($signed(a)); sb = longint'($signed(b));
      logical = 1'b0; ec = sc; ev = vin;
      case (op)
        ALU_AND, ALU_TST: begin ey = a & b; logical = 1; end
        ALU_EOR, ALU_TEQ: begin ey = a ^ b; logical = 1; end
        ALU_ORR: begin ey = a | b; logical = 1; end
        ALU_MOV: begin ey = b; logical = 1; end
        ALU_BIC: begin ey = a & ~b; logical = 1; end
        ALU_MVN: begin ey = ~b; logical = 1; end
        ALU_SUB, ALU_CMP: begin r = ua - ub; sr = sa - sb; end
        ALU_RSB: begin r = ub - ua; sr = sb - sa; end
        ALU_ADD, ALU_CMN: begin r = ua + ub; sr = sa + sb; end
        ALU_ADC: begin r = ua + ub + longint'(cin); sr = sa + sb + longint'(cin); end
        ALU_SBC: begin r = ua - ub - longint'(!cin); sr = sa - sb - longint'(!cin); end
        ALU_RSC: begin r = ub - ua - longint'(!cin); sr = sb - sa - longint'(!cin); end
      endcase
      if (!logical) begin
        ey = r[31:0];
        if (op inside {ALU_ADD, ALU_CMN, ALU_ADC}) ec = (r >= 64'sh1_0000_0000);
        else ec = (r >= 0);                                  // no borrow
        ev = (sr > 64'sh7FFF_FFFF) || (sr < -64'sh8000_0000);
      end
      checks++;
      if (y !== ey || n !== ey[31] || z !== (ey == 0) || c !== ec || v !== ev ||
          wr !== !(op inside {ALU_TST, ALU_TEQ, ALU_CMP, ALU_CMN})) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h b=%h ci=%b: %h %b%b%b%b exp %h c%b v%b",
                                    op, a, b, cin, y, n, z, c, v, ey, ec, ev);
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
