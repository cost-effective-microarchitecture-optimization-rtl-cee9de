// thumb_decompressor: translates a 16-bit Thumb instruction into the 32-bit
// ARM instruction that does the same work, so that the rest of the core only
// ever decodes ARM instructions.
//
// All nineteen Thumb formats are covered: shifts, add/subtract, the
// immediate and register ALU operations, high-register operations and BX,
// PC-relative, register- and immediate-offset and SP-relative loads and
// stores, address generation, SP adjustment, PUSH/POP, LDMIA/STMIA,
// conditional and unconditional branches and SWI.  The translations are the
// architectural equivalents (for example NEG -> RSBS Rd, Rs, #0, PUSH ->
// STMDB SP!, {..}).
//
// Two translations rely on conventions of this core's execute stage:
//   * Branch offsets are passed unscaled in the 24-bit offset field; the
//     execute stage scales by 2 in Thumb state (by 4 in ARM state).
//   * The Thumb long branch with link is two instructions.  Each half is
//     emitted in the otherwise unused ARM encoding with condition 1111 and
//     bits 27:25 = 101: bit 24 = 0 for the first half, whose offset field is
//     the sign-extended high offset shifted left by 11 (LR <= PC + off<<12),
//     bit 24 = 1 for the second half, with the low 11-bit offset
//     (PC <= LR + off<<1, LR <= return address | 1).
// Encodings Thumb leaves undefined become an ARM undefined instruction.
// Combinational.
module thumb_decompressor (
  input  logic [15:0] tin,
  output logic [31:0] aout
);
  localparam logic [31:0] ARM_UND = 32'hE7F0_00F0;

  logic [2:0] rd, rs, rn;
  assign rd = tin[2:0];
  assign rs = tin[5:3];
  assign rn = tin[8:6];

  logic [31:0] dd;        // format 4: Rd as Rn and Rd, Rs as Rm
  logic [3:0]  hd, hs;    // format 5: high-register numbers
  logic [7:0]  o;         // format 10: byte offset

  assign dd = {12'd0, 1'b0, rd, 1'b0, rd, 9'd0, rs};
  assign hd = {tin[7], rd};
  assign hs = {tin[6], rs};
  assign o  = {2'b00, tin[10:6], 1'b0};

  always_comb begin
    aout = ARM_UND;
    unique casez (tin[15:10])
      // format 1: LSL/LSR/ASR Rd, Rs, #off5 ; format 2: ADD/SUB
      6'b000???: begin
        if (tin[12:11] != 2'b11)
          aout = 32'hE1B0_0000 | {16'd0, 1'b0, rd, tin[10:6], tin[12:11], 1'b0, 1'b0, rs};
        else if (tin[10]) // immediate
          aout = (tin[9] ? 32'hE250_0000 : 32'hE290_0000) | {12'd0, 1'b0, rs, 1'b0, rd, 9'd0, rn};
        else
          aout = (tin[9] ? 32'hE050_0000 : 32'hE090_0000) | {12'd0, 1'b0, rs, 1'b0, rd, 9'd0, rn};
      end
      // format 3: MOV/CMP/ADD/SUB Rd, #imm8
      6'b001???: begin
        unique case (tin[12:11])
          2'b00: aout = 32'hE3B0_0000 | {16'd0, 1'b0, tin[10:8], 4'd0, tin[7:0]};
          2'b01: aout = 32'hE350_0000 | {12'd0, 1'b0, tin[10:8], 8'd0, tin[7:0]};
          2'b10: aout = 32'hE290_0000 | {12'd0, 1'b0, tin[10:8], 1'b0, tin[10:8], 4'd0, tin[7:0]};
          2'b11: aout = 32'hE250_0000 | {12'd0, 1'b0, tin[10:8], 1'b0, tin[10:8], 4'd0, tin[7:0]};
        endcase
      end
      // format 4: ALU operations
      6'b010000: begin
        unique case (tin[9:6])
          4'h0: aout = 32'hE010_0000 | dd;                                        // ANDS
          4'h1: aout = 32'hE030_0000 | dd;                                        // EORS
          4'h2: aout = 32'hE1B0_0010 | {16'd0, 1'b0, rd, 1'b0, rs, 5'd0, rd};    // LSLS Rd,Rd,Rs
          4'h3: aout = 32'hE1B0_0030 | {16'd0, 1'b0, rd, 1'b0, rs, 5'd0, rd};    // LSRS
          4'h4: aout = 32'hE1B0_0050 | {16'd0, 1'b0, rd, 1'b0, rs, 5'd0, rd};    // ASRS
          4'h5: aout = 32'hE0B0_0000 | dd;                                        // ADCS
          4'h6: aout = 32'hE0D0_0000 | dd;                                        // SBCS
          4'h7: aout = 32'hE1B0_0070 | {16'd0, 1'b0, rd, 1'b0, rs, 5'd0, rd};    // RORS
          4'h8: aout = 32'hE110_0000 | {12'd0, 1'b0, rd, 13'd0, rs};              // TST
          4'h9: aout = 32'hE270_0000 | {12'd0, 1'b0, rs, 1'b0, rd, 12'd0};        // RSBS Rd,Rs,#0
          4'hA: aout = 32'hE150_0000 | {12'd0, 1'b0, rd, 13'd0, rs};              // CMP
          4'hB: aout = 32'hE170_0000 | {12'd0, 1'b0, rd, 13'd0, rs};              // CMN
          4'hC: aout = 32'hE190_0000 | dd;                                        // ORRS
          4'hD: aout = 32'hE010_0090 | {12'd0, 1'b0, rd, 5'd0, rd, 5'd0, rs};     // MULS Rd,Rs,Rd
          4'hE: aout = 32'hE1D0_0000 | dd;                                        // BICS
          4'hF: aout = 32'hE1F0_0000 | {16'd0, 1'b0, rd, 9'd0, rs};               // MVNS
        endcase
      end
      // format 5: high-register operations and BX
      6'b010001: begin
        unique case (tin[9:8])
          2'b00: aout = 32'hE080_0000 | {12'd0, hd, hd, 8'd0, hs};                // ADD
          2'b01: aout = 32'hE150_0000 | {12'd0, hd, 12'd0, hs};                   // CMP
          2'b10: aout = 32'hE1A0_0000 | {16'd0, hd, 8'd0, hs};                    // MOV
          2'b11: aout = 32'hE12F_FF10 | {28'd0, hs};                              // BX
        endcase
      end
      // format 6: LDR Rd, [PC, #imm8*4]
      6'b01001?: aout = 32'hE59F_0000 | {16'd0, 1'b0, tin[10:8], 2'b00, tin[7:0], 2'b00};
      // formats 7 and 8: register offset
      6'b0101??: begin
        if (!tin[9])
          aout = 32'hE780_0000 | {9'd0, tin[10], 1'b0, tin[11], 1'b0, rs, 1'b0, rd, 9'd0, rn};
        else unique case (tin[11:10])
          2'b00: aout = 32'hE180_00B0 | {12'd0, 1'b0, rs, 1'b0, rd, 9'd0, rn};    // STRH
          2'b01: aout = 32'hE190_00D0 | {12'd0, 1'b0, rs, 1'b0, rd, 9'd0, rn};    // LDRSB
          2'b10: aout = 32'hE190_00B0 | {12'd0, 1'b0, rs, 1'b0, rd, 9'd0, rn};    // LDRH
          2'b11: aout = 32'hE190_00F0 | {12'd0, 1'b0, rs, 1'b0, rd, 9'd0, rn};    // LDRSH
        endcase
      end
      // format 9: immediate offset, word (off5*4) or byte (off5)
      6'b011???: begin
        if (tin[12])
          aout = 32'hE5C0_0000 | {11'd0, tin[11], 1'b0, rs, 1'b0, rd, 7'd0, tin[10:6]};
        else
          aout = 32'hE580_0000 | {11'd0, tin[11], 1'b0, rs, 1'b0, rd, 5'd0, tin[10:6], 2'b00};
      end
      // format 10: halfword immediate offset (off5*2)
      6'b1000??: begin
        aout = 32'hE1C0_00B0 | {11'd0, tin[11], 1'b0, rs, 1'b0, rd, o[7:4], 4'd0, o[3:0]};
      end
      // format 11: SP-relative load/store
      6'b1001??: aout = 32'hE58D_0000 | {11'd0, tin[11], 4'd0, 1'b0, tin[10:8], 2'b00, tin[7:0], 2'b00};
      // format 12: ADD Rd, PC/SP, #imm8*4  (imm8 ror 30)
      6'b1010??: aout = (tin[11] ? 32'hE28D_0F00 : 32'hE28F_0F00)
                        | {16'd0, 1'b0, tin[10:8], 4'd0, tin[7:0]};
      // format 13 (SP adjust) and 14 (PUSH/POP)
      6'b1011??: begin
        if (tin[11:8] == 4'b0000)
          aout = (tin[7] ? 32'hE24D_DF00 : 32'hE28D_DF00) | {25'd0, tin[6:0]};
        else if (tin[10:9] == 2'b10) begin
          if (tin[11]) aout = 32'hE8BD_0000 | {16'd0, tin[8], 7'd0, tin[7:0]};   // POP {.., PC}
          else         aout = 32'hE92D_0000 | {17'd0, tin[8], 6'd0, tin[7:0]};   // PUSH {.., LR}
        end
      end
      // format 15: LDMIA/STMIA Rb!, {rlist}
      6'b1100??: aout = 32'hE8A0_0000 | {11'd0, tin[11], 1'b0, tin[10:8], 8'd0, tin[7:0]};
      // formats 16 and 17: conditional branch, SWI
      6'b1101??: begin
        if (tin[11:8] == 4'hF)
          aout = 32'hEF00_0000 | {24'd0, tin[7:0]};
        else if (tin[11:8] != 4'hE)
          aout = {tin[11:8], 4'hA, {16{tin[7]}}, tin[7:0]};
      end
      // format 18: unconditional branch
      6'b11100?: aout = {8'hEA, {13{tin[10]}}, tin[10:0]};
      // format 19: long branch with link, first and second half
      6'b11110?: aout = {8'hFA, {2{tin[10]}}, tin[10:0], 11'd0};
      6'b11111?: aout = {8'hFB, 13'd0, tin[10:0]};
      default: ;
    endcase
  end
endmodule
