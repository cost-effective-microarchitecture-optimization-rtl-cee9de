// control_unit: second half of instruction decoding.  From the index, the
// instruction fields and the number of the execute cycle (`step`) it produces
// the control word of that cycle: which registers the two read ports fetch,
// how operand 2 is formed, the ALU operation, the register write, the memory
// access and the PC and PSR actions, and whether the cycle is the last of the
// instruction.
//
// The core evaluates it in the decode stage, one cycle ahead of use, and
// registers the result with the operands it reads; the condition test in
// the execute stage then chooses between this word and a NOP word.  For a
// multi-cycle instruction the core feeds back the instruction in execute
// with step + 1, so the unit decodes that instruction again for its next
// cycle; only for the last cycle does it turn to the instruction waiting in
// decode.  Cycles that wait on the multiplier or a coprocessor are held by
// the execute stage, which makes the whole a Mealy machine whose state is
// (instruction, step).
//
// Cycle plans (step numbers from 0):
//   B/BL, BX, data processing, MRS/MSR, SWI, undefined, CDP/MRC/MCR: 1 cycle
//   data processing with register shift: 2 (read Rs, then execute)
//   LDR: 2 (address, base write-back; then Rd <= data)
//   STR: 2 (address, base write-back; then read Rd and store)
//   MUL: 2, MLA: 3, xMULL: 3, xMLAL: 4, plus the multiplier's cycles
//   LDM/STM of n registers: n + 1.   SWP: 2.
//   LDC/STC: one word per cycle until the coprocessor signals the last word
//   (the core ends the instruction then), at most 16.
// Combinational.
module control_unit
  import arm_pkg::*;
(
  input  logic [31:0] instr,
  input  index_e      index,
  input  logic [4:0]  step,
  output ctrl_t       ctrl
);
  logic [3:0] rn, rd, rs, rm;
  logic [4:0] nregs;
  logic [3:0] kth;           // register moved in block-transfer cycle `step`
  logic       w_bit, p_bit, u_bit, i_bit;
  logic       acc, long_m;
  logic [4:0] ms;            // multiply step after the optional accumulate read

  assign rn = instr[19:16];
  assign rd = instr[15:12];
  assign rs = instr[11:8];
  assign rm = instr[3:0];
  assign p_bit = instr[24];
  assign u_bit = instr[23];
  assign w_bit = instr[21];
  assign i_bit = instr[25];
  assign acc    = instr[21];
  assign long_m = instr[23];
  assign ms     = step - {4'd0, acc};

  always_comb begin
    int cnt;
    nregs = '0;
    kth   = '0;
    cnt   = 0;
    for (int r = 0; r < 16; r++) begin
      if (instr[r]) begin
        nregs = nregs + 5'd1;
        cnt   = cnt + 1;
        if (cnt == int'(step)) kth = 4'(r);
      end
    end
  end

  always_comb begin
    ctrl = CTRL_NOP;
    ctrl.last = 1'b1;
    unique case (index)
      IDX_B: begin
        ctrl.rd_a = 1'b1; ctrl.ra = 4'd15;
        ctrl.op2 = OP2_BRANCH; ctrl.alu_op = ALU_ADD; ctrl.branch = 1'b1;
        if (instr[24]) begin ctrl.wr_en = 1'b1; ctrl.wa = 4'd14; ctrl.wsrc = WS_LINK; end
      end
      IDX_TBL: begin
        ctrl.op2 = OP2_BRANCH; ctrl.alu_op = ALU_ADD;
        ctrl.rd_a = 1'b1; ctrl.wr_en = 1'b1; ctrl.wa = 4'd14;
        if (!instr[24]) begin ctrl.ra = 4'd15; ctrl.wsrc = WS_ALU; end
        else begin ctrl.ra = 4'd14; ctrl.wsrc = WS_LINK; ctrl.branch = 1'b1; end
      end
      IDX_BX: begin
        ctrl.rd_a = 1'b1; ctrl.ra = rm; ctrl.bx = 1'b1;
      end
      IDX_DP, IDX_DP_RS: begin
        if (index == IDX_DP_RS && step == 5'd0) begin
          ctrl.rd_b = 1'b1; ctrl.rb = rs; ctrl.save_sh = 1'b1; ctrl.last = 1'b0;
        end else begin
          ctrl.rd_a = 1'b1; ctrl.ra = rn;
          ctrl.rd_b = !i_bit; ctrl.rb = rm;
          ctrl.op2 = OP2_SHIFT; ctrl.sh_reg = (index == IDX_DP_RS);
          ctrl.alu_op = alu_op_e'(instr[24:21]);
          ctrl.set_flags = instr[20];
          ctrl.wr_en = !(instr[24:23] == 2'b10);
          ctrl.wa = rd; ctrl.wsrc = WS_ALU;
        end
      end
      IDX_PSR: begin
        if (!instr[21]) begin                       // MRS
          ctrl.psr_rd = 1'b1; ctrl.wr_en = 1'b1; ctrl.wa = rd; ctrl.wsrc = WS_PSR;
        end else begin                              // MSR
          ctrl.rd_b = !i_bit; ctrl.rb = rm; ctrl.op2 = OP2_SHIFT; ctrl.psr_wr = 1'b1;
        end
      end
      IDX_LDR, IDX_STR: begin
        if (step == 5'd0) begin
          ctrl.rd_a = 1'b1; ctrl.ra = rn;
          if (instr[26]) begin                      // word / byte
            ctrl.rd_b = i_bit; ctrl.rb = rm;
            ctrl.op2 = i_bit ? OP2_SHIFT : OP2_IMM12;
            ctrl.msize = instr[22] ? MS_BYTE : MS_WORD;
          end else begin                            // halfword / signed byte
            ctrl.rd_b = !instr[22]; ctrl.rb = rm;
            ctrl.op2 = instr[22] ? OP2_IMM8H : OP2_REGB;
            ctrl.msize = instr[5] ? MS_HALF : MS_BYTE;
            ctrl.msigned = instr[6];
          end
          ctrl.alu_op = u_bit ? ALU_ADD : ALU_SUB;
          ctrl.asrc = p_bit ? AS_ALU : AS_A;
          ctrl.mem_rd = (index == IDX_LDR);
          ctrl.save_addr = (index == IDX_STR);
          ctrl.wr_en = w_bit || !p_bit; ctrl.wa = rn; ctrl.wsrc = WS_ALU;
          ctrl.last = 1'b0;
        end else if (index == IDX_LDR) begin
          ctrl.wr_en = 1'b1; ctrl.wa = rd; ctrl.wsrc = WS_TEMP; ctrl.pc_mem = 1'b1;
        end else begin
          ctrl.rd_b = 1'b1; ctrl.rb = rd; ctrl.asrc = AS_REG; ctrl.mem_wr = 1'b1;
          if (instr[26]) ctrl.msize = instr[22] ? MS_BYTE : MS_WORD;
          else           ctrl.msize = MS_HALF;
        end
      end
      IDX_MUL: begin
        if (acc && step == 5'd0) begin              // read the accumulator
          ctrl.rd_a = 1'b1; ctrl.ra = instr[15:12];     // Rn, or RdLo
          ctrl.rd_b = long_m; ctrl.rb = instr[19:16];
          ctrl.save_acc = 1'b1; ctrl.last = 1'b0;
        end else if (ms == 5'd0) begin              // operands, start
          ctrl.rd_a = 1'b1; ctrl.ra = rm;
          ctrl.rd_b = 1'b1; ctrl.rb = rs;
          ctrl.mul_start = 1'b1; ctrl.last = 1'b0;
        end else if (ms == 5'd1) begin              // wait, write (low) result
          ctrl.mul_wait = 1'b1; ctrl.set_flags = instr[20];
          ctrl.wr_en = 1'b1; ctrl.wa = long_m ? instr[15:12] : instr[19:16];
          ctrl.wsrc = WS_MULLO; ctrl.last = !long_m;
        end else begin                              // high result
          ctrl.wr_en = 1'b1; ctrl.wa = instr[19:16]; ctrl.wsrc = WS_MULHI;
        end
      end
      IDX_LDM, IDX_STM: begin
        if (step == 5'd0) begin
          ctrl.rd_a = 1'b1; ctrl.ra = rn;
          ctrl.op2 = OP2_BLOCK; ctrl.alu_op = u_bit ? ALU_ADD : ALU_SUB;
          ctrl.save_addr = 1'b1;
          ctrl.wr_en = w_bit; ctrl.wa = rn; ctrl.wsrc = WS_ALU;
          ctrl.last = (nregs == 5'd0);
        end else begin
          ctrl.asrc = AS_REG; ctrl.step_addr = 1'b1;
          if (index == IDX_LDM) begin
            ctrl.mem_rd = 1'b1; ctrl.wr_en = 1'b1; ctrl.wa = kth; ctrl.wsrc = WS_MEM;
            ctrl.pc_mem = 1'b1;
          end else begin
            ctrl.rd_b = 1'b1; ctrl.rb = kth; ctrl.mem_wr = 1'b1;
          end
          ctrl.last = (step == nregs);
        end
      end
      IDX_SWP: begin
        if (step == 5'd0) begin
          ctrl.rd_a = 1'b1; ctrl.ra = rn; ctrl.rd_b = 1'b1; ctrl.rb = rm;
          ctrl.asrc = AS_A; ctrl.mem_rd = 1'b1; ctrl.mem_wr = 1'b1;
          ctrl.msize = instr[22] ? MS_BYTE : MS_WORD;
          ctrl.last = 1'b0;
        end else begin
          ctrl.wr_en = 1'b1; ctrl.wa = rd; ctrl.wsrc = WS_TEMP;
        end
      end
      IDX_SWI, IDX_UND, IDX_IRQ, IDX_FIQ: ctrl.exc = 1'b1;
      IDX_CDP: ctrl.cp = 1'b1;
      IDX_MRC: begin ctrl.cp = 1'b1; ctrl.wr_en = 1'b1; ctrl.wa = rd; ctrl.wsrc = WS_CP; end
      IDX_MCR: begin ctrl.cp = 1'b1; ctrl.rd_b = 1'b1; ctrl.rb = rd; end
      IDX_LDC, IDX_STC: begin                       // one word per cycle
        ctrl.cp = 1'b1;
        ctrl.mem_rd = (index == IDX_LDC); ctrl.mem_wr = (index == IDX_STC);
        if (step == 5'd0) begin                     // first word, base write-back
          ctrl.rd_a = 1'b1; ctrl.ra = rn;
          ctrl.op2 = OP2_CPOFS; ctrl.alu_op = u_bit ? ALU_ADD : ALU_SUB;
          ctrl.asrc = p_bit ? AS_ALU : AS_A;
          ctrl.save_addr = 1'b1;
          ctrl.wr_en = w_bit; ctrl.wa = rn; ctrl.wsrc = WS_ALU;
        end else begin                              // following words
          ctrl.asrc = AS_REG; ctrl.step_addr = 1'b1;
        end
        ctrl.last = (step == 5'd15);                // the coprocessor may end it sooner
      end
      default: ;                                    // NOP
    endcase
  end
endmodule
