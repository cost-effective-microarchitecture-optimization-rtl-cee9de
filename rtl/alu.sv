// alu: the 16 ARM data-processing operations and their flags.
//
// `op` is the ARM opcode field (instruction bits 24:21).  Arithmetic
// operations produce N, Z, C (carry out, or NOT borrow for subtraction) and V
// (signed overflow).  Logical operations produce N and Z, take C from the
// barrel shifter's carry-out and leave V unchanged.  `wr_result` is low for
// the four compare operations (TST, TEQ, CMP, CMN), which only set flags.
// Combinational; a single 33-bit adder serves every arithmetic opcode.
module alu
  import arm_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,          // first operand (Rn)
  input  logic [31:0] b,          // second operand, after the shifter
  input  logic        cin,        // C flag
  input  logic        vin,        // V flag
  input  logic        shift_cout, // shifter carry-out
  output logic [31:0] y,
  output logic        n, z, c, v,
  output logic        wr_result
);
  logic [31:0] x1, x2;
  logic        ci, arith;
  logic [32:0] sum;

  always_comb begin
    // operand selection for the shared adder
    x1 = a; x2 = b; ci = 1'b0; arith = 1'b1;
    unique case (op)
      ALU_SUB, ALU_CMP: begin x1 = a; x2 = ~b; ci = 1'b1; end
      ALU_RSB:          begin x1 = b; x2 = ~a; ci = 1'b1; end
      ALU_ADD, ALU_CMN: begin x1 = a; x2 = b;  ci = 1'b0; end
      ALU_ADC:          begin x1 = a; x2 = b;  ci = cin;  end
      ALU_SBC:          begin x1 = a; x2 = ~b; ci = cin;  end
      ALU_RSC:          begin x1 = b; x2 = ~a; ci = cin;  end
      default:          arith = 1'b0;
    endcase
    sum = {1'b0, x1} + {1'b0, x2} + {32'd0, ci};

    unique case (op)
      ALU_AND, ALU_TST: y = a & b;
      ALU_EOR, ALU_TEQ: y = a ^ b;
      ALU_ORR:          y = a | b;
      ALU_MOV:          y = b;
      ALU_BIC:          y = a & ~b;
      ALU_MVN:          y = ~b;
      default:          y = sum[31:0];
    endcase

    n = y[31];
    z = (y == 32'd0);
    if (arith) begin
      c = sum[32];
      v = (x1[31] == x2[31]) && (y[31] != x1[31]);
    end else begin
      c = shift_cout;
      v = vin;
    end
    wr_result = !(op inside {ALU_TST, ALU_TEQ, ALU_CMP, ALU_CMN});
  end
endmodule
