// tb_arm7_core: end-to-end test of the core running a small program.
//
// The program is assembled into a 16 KB memory by SystemVerilog functions
// below (one helper per instruction format).  Instruction and data ports of
// the core both address that memory, which answers in the same cycle.  Each
// test stores a result with a post-indexed STR through R12; at the end the
// program writes a marker word and the testbench compares the stored words
// with values it works out itself.  The program exercises ALU operations
// with back-to-back dependences (forwarding), shifts by register, condition
// codes, all multiply forms with and without early termination, byte,
// halfword, signed and write-back loads and stores, LDM/STM, SWP, MRS/MSR,
// BL and return, LDR into the PC, a coprocessor that is busy for two
// cycles and moves 3-word STC and 2-word LDC blocks, an absent coprocessor
// (undefined trap), an undefined instruction, SWI, IRQ and FIQ entry and
// return, and a Thumb routine entered and left with BX (shifts, ALU, MUL,
// PUSH/POP, conditional branches, one of them at an address with bit 1 set,
// BL, PC-relative load).  It also measures the execute cycles of every multiply and checks
// them against the expected counts (5/6/6/7 at full length), and measures
// the length of every other instruction (its execute cycles plus the refill
// bubbles after it) against this core's timing: branch, BX and exception
// entry 3, data processing 1 (2 with a register shift), LDR and STR 2, LDR
// into the PC 4, LDM/STM n+1 (LDM with the PC n+3), SWP 2, and 1 for any
// instruction whose condition fails.  Each pipeline
// mechanism is counted and a mechanism that never happens is a failure.
`timescale 1ns/1ps
module tb_arm7_core;
  import arm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        irq, fiq;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_rd, dmem_wr, ncpi, cpa, cpb;
  logic [3:0]  dmem_be;
  logic [31:0] cp_instr, cp_dout, cp_din;
  psr_t        cpsr;

  arm7_core dut (
    .clk, .rst_n, .bigend(1'b0), .irq, .fiq, .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_rd, .dmem_wr, .dmem_be, .dmem_wdata, .dmem_rdata,
    .ncpi, .cpa, .cpb, .cplast, .cp_instr, .cp_dout, .cp_din, .cpsr_o(cpsr)
  );

  // ---------------------------------------------------------------- memory
  logic [31:0] mem [4096];
  assign imem_rdata = mem[imem_addr[13:2]];
  assign dmem_rdata = mem[dmem_addr[13:2]];
  always_ff @(posedge clk)
    if (dmem_wr)
      for (int k = 0; k < 4; k++)
        if (dmem_be[k]) mem[dmem_addr[13:2]][8*k +: 8] <= dmem_wdata[8*k +: 8];

  // ---------------------------------------------------------------- coprocessor 5
  // Busy for two cycles at the start of each instruction.  MCR stores a word,
  // MRC returns it plus one.  STC sends C0DE0000 + word number, LDC records
  // the words it receives; both move CRd + 1 words (a choice of this model).
  logic [31:0] cp_reg;
  logic [31:0] ldc_words [4];
  int          cp_busy_cnt, cp_busy_cycles, cp_ops, cp_word, cp_words_total;
  logic        cp_mine, cp_xfer, cplast, cp_started;
  assign cp_mine = !ncpi && cp_instr[11:8] == 4'd5;
  assign cp_xfer = cp_instr[27:25] == 3'b110;
  assign cpa     = !ncpi && !cp_mine;
  assign cpb     = cp_mine && !cp_started && cp_busy_cnt < 2;
  assign cplast  = !cp_xfer || cp_word == int'(cp_instr[15:12]);
  assign cp_din  = cp_xfer ? 32'hC0DE_0000 + 32'(cp_word) : cp_reg + 32'd1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cp_busy_cnt <= 0; cp_reg <= '0; cp_busy_cycles <= 0; cp_ops <= 0;
      cp_word <= 0; cp_started <= 1'b0; cp_words_total <= 0;
      for (int k = 0; k < 4; k++) ldc_words[k] <= '0;
    end else if (cp_mine) begin
      if (cpb) begin cp_busy_cnt <= cp_busy_cnt + 1; cp_busy_cycles <= cp_busy_cycles + 1; end
      else begin
        if (cp_instr[27:24] == 4'b1110 && cp_instr[4] && !cp_instr[20]) cp_reg <= cp_dout;  // MCR
        if (cp_xfer) begin
          cp_words_total <= cp_words_total + 1;
          if (cp_instr[20] && cp_word < 4) ldc_words[cp_word] <= cp_dout;               // LDC
        end
        if (cplast) begin
          cp_busy_cnt <= 0; cp_word <= 0; cp_started <= 1'b0; cp_ops <= cp_ops + 1;
        end else begin
          cp_word <= cp_word + 1; cp_started <= 1'b1;
        end
      end
    end else begin cp_busy_cnt <= 0; cp_word <= 0; cp_started <= 1'b0; end
  end

  // ---------------------------------------------------------------- interrupts
  logic irq_done, fiq_done;
  always_ff @(posedge clk) begin
    if (!rst_n) begin irq_done <= 1'b0; fiq_done <= 1'b0; end
    else begin
      if (cpsr.mode == M_IRQ) irq_done <= 1'b1;
      if (cpsr.mode == M_FIQ) fiq_done <= 1'b1;
    end
  end
  assign irq = !irq_done && !cpsr.i && cpsr.mode == M_SVC;
  assign fiq = irq_done && !fiq_done && !cpsr.f && cpsr.mode == M_SVC;

  // ---------------------------------------------------------------- assembler
  int unsigned pcw;                    // emit address (bytes)
  task automatic emit(input logic [31:0] w); mem[pcw >> 2] = w; pcw += 4; endtask
  task automatic emit16(input logic [15:0] h);
    if (pcw[1]) mem[pcw >> 2][31:16] = h; else mem[pcw >> 2][15:0] = h;
    pcw += 2;
  endtask
  localparam logic [3:0] AL = 4'hE, EQ = 4'h0, NE = 4'h1;
  function automatic logic [31:0] dpi(logic [3:0] op, logic s, int rd, int rn, logic [7:0] imm, logic [3:0] rot = 0,
                                      logic [3:0] cond = AL);
    return {cond, 3'b001, op, s, 4'(rn), 4'(rd), rot, imm};
  endfunction
  function automatic logic [31:0] dpr(logic [3:0] op, logic s, int rd, int rn, int rm, logic [1:0] st = 0,
                                      logic [4:0] sa = 0);
    return {AL, 3'b000, op, s, 4'(rn), 4'(rd), sa, st, 1'b0, 4'(rm)};
  endfunction
  function automatic logic [31:0] dprs(logic [3:0] op, logic s, int rd, int rn, int rm, logic [1:0] st, int rs);
    return {AL, 3'b000, op, s, 4'(rn), 4'(rd), 4'(rs), 1'b0, st, 1'b1, 4'(rm)};
  endfunction
  function automatic logic [31:0] ldst(logic l, logic b, int rd, int rn, logic [11:0] off,
                                       logic p = 1, logic u = 1, logic w = 0);
    return {AL, 3'b010, p, u, b, w, l, 4'(rn), 4'(rd), off};
  endfunction
  function automatic logic [31:0] ldsth(logic l, logic [1:0] sh, int rd, int rn, logic [7:0] off);
    return {AL, 3'b000, 1'b1, 1'b1, 1'b1, 1'b0, l, 4'(rn), 4'(rd), off[7:4], 1'b1, sh, 1'b1, off[3:0]};
  endfunction
  function automatic logic [31:0] blk(logic l, int rn, logic [15:0] list, logic p, logic u, logic w);
    return {AL, 3'b100, p, u, 1'b0, w, l, 4'(rn), list};
  endfunction
  function automatic logic [31:0] mul(logic a, int rd, int rn, int rs, int rm);
    return {AL, 6'b000000, a, 1'b0, 4'(rd), 4'(rn), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] mull(logic sgn, logic a, int rdhi, int rdlo, int rs, int rm);
    return {AL, 5'b00001, sgn, a, 1'b0, 4'(rdhi), 4'(rdlo), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] bra(logic link, int unsigned from, int unsigned to, logic [3:0] cond = AL);
    int off;
    off = (int'(to) - int'(from) - 8) >>> 2;
    return {cond, 3'b101, link, 24'(off)};
  endfunction
  localparam logic [3:0] AND = 0, SUB = 2, ADD = 4, ADC = 5, CMP = 10, ORR = 12, MOV = 13, MVN = 15;

  // four-instruction constant load: MOV + 3 x ORR
  task automatic li(int rd, logic [31:0] v);
    emit(dpi(MOV, 0, rd, 0, v[7:0]));
    emit(dpi(ORR, 0, rd, rd, v[15:8], 4'd12));
    emit(dpi(ORR, 0, rd, rd, v[23:16], 4'd8));
    emit(dpi(ORR, 0, rd, rd, v[31:24], 4'd4));
  endtask
  task automatic st(int r); emit(ldst(0, 0, r, 12, 12'd4, 0, 1, 0)); endtask   // STR r,[R12],#4

  // ---------------------------------------------------------------- expected values
  logic [31:0] expv [$];
  localparam logic [31:0] A4 = 32'h1234_5678, A5 = 32'h9ABC_DEF0;
  logic [63:0] umul, smul, umla;

  localparam int unsigned RES = 32'h2000, DONE_ADDR = 32'h3FFC, CPBUF = 32'h3000;
  localparam int unsigned THUMB = 32'h800, TFUNC = 32'h880, TLIT = 32'h8F0, ARMRET = 32'h900;

  initial begin
    for (int k = 0; k < 4096; k++) mem[k] = '0;
    umul = 64'(A4) * 64'(A5);
    smul = 64'($signed(64'($signed(A4))) * $signed(64'($signed(A5))));
    umla = smul + 64'(A4) * 64'(A4);

    // vectors
    pcw = 0;  emit(bra(0, 0, 32'h40));
    pcw = 4;  emit(bra(0, 4, 32'h700));
    pcw = 8;  emit(bra(0, 8, 32'h720));
    pcw = 32'h18; emit(bra(0, 32'h18, 32'h740));
    pcw = 32'h1C; emit(bra(0, 32'h1C, 32'h760));
    // handlers
    pcw = 32'h700; emit(dpi(MOV, 0, 10, 0, 8'hAA)); emit(dpr(MOV, 1, 15, 0, 14));       // MOVS PC, LR
    pcw = 32'h720; emit(dpi(MOV, 0, 11, 0, 8'hBB)); emit(dpr(MOV, 1, 15, 0, 14));
    pcw = 32'h740; emit(dpi(MOV, 0, 9, 0, 8'h01));  emit(dpi(SUB, 1, 15, 14, 8'd4));     // SUBS PC, LR, #4
    pcw = 32'h760; emit(dpi(MOV, 0, 7, 0, 8'h99));  emit(dpi(SUB, 1, 15, 14, 8'd4));
    pcw = 32'h780; emit(dpi(MOV, 0, 8, 0, 8'h77));  emit(dpr(MOV, 0, 15, 0, 14));        // MOV PC, LR

    // main program
    pcw = 32'h40;
    emit(dpi(MOV, 0, 12, 0, 8'h02, 4'd10));            // R12 = 0x2000
    emit(dpi(MOV, 0, 13, 0, 8'h01, 4'd9));             // SP  = 0x4000 (descending)
    emit(dpi(MOV, 0, 0, 0, 8'd5));
    emit(dpi(ADD, 0, 1, 0, 8'd3));                     // R1 = 8   (forward R0)
    emit(dpr(ADD, 0, 2, 1, 1));                        // R2 = 16  (forward both ports)
    emit(dpr(SUB, 0, 3, 2, 0, 2'd0, 5'd1));            // R3 = 16 - 10
    st(1); expv.push_back(8);
    st(2); expv.push_back(16);
    st(3); expv.push_back(6);
    emit(dpi(MOV, 0, 4, 0, 8'd3));
    emit(dprs(MOV, 0, 5, 0, 2, 2'd0, 4));              // R5 = R2 LSL R4
    st(5); expv.push_back(128);
    emit(dpi(SUB, 1, 6, 0, 8'd5));                     // Z = 1
    emit(dpi(MOV, 0, 7, 0, 8'd1, 4'd0, EQ));
    emit(dpi(MOV, 0, 7, 0, 8'd2, 4'd0, NE));           // skipped
    st(7); expv.push_back(1);
    emit(dpi(MVN, 0, 8, 0, 8'd0));
    emit(dpi(ADD, 1, 9, 8, 8'd2));                     // 1, C = 1
    emit(dpi(ADC, 0, 10, 0, 8'd0));                    // 5 + 0 + C
    st(9); expv.push_back(1);
    st(10); expv.push_back(6);
    // multiplies
    emit(dpi(MOV, 0, 0, 0, 8'd7));
    emit(dpi(MOV, 0, 1, 0, 8'd6));
    emit(mul(0, 2, 0, 1, 0));                          // MUL R2 = R0*R1
    emit(mul(1, 3, 2, 1, 0));                          // MLA R3 = R0*R1 + R2
    st(2); expv.push_back(42);
    st(3); expv.push_back(84);
    li(4, A4); li(5, A5);
    emit(mull(0, 0, 7, 6, 5, 4));                      // UMULL R6,R7 = R4*R5
    st(6); expv.push_back(umul[31:0]);
    st(7); expv.push_back(umul[63:32]);
    emit(mull(1, 0, 7, 6, 5, 4));                      // SMULL
    emit(mull(0, 1, 7, 6, 4, 4));                      // UMLAL += R4*R4
    st(6); expv.push_back(umla[31:0]);
    st(7); expv.push_back(umla[63:32]);
    // loads and stores
    emit(dpi(MOV, 0, 0, 0, 8'h03, 4'd10));             // R0 = 0x3000
    emit(ldst(0, 0, 4, 0, 12'd0));                     // STR R4,[R0]
    emit(ldst(1, 1, 1, 0, 12'd1));                     // LDRB R1,[R0,#1]
    st(1); expv.push_back(32'h56);
    emit(ldsth(1, 2'b01, 2, 0, 8'd2));                 // LDRH R2,[R0,#2]
    st(2); expv.push_back(32'h1234);
    emit(ldst(0, 0, 5, 0, 12'd4));                     // STR R5,[R0,#4]
    emit(ldsth(1, 2'b10, 3, 0, 8'd4));                 // LDRSB R3,[R0,#4]
    st(3); expv.push_back(32'hFFFF_FFF0);
    emit(ldsth(0, 2'b01, 4, 0, 8'd8));                 // STRH R4,[R0,#8]
    emit(ldst(1, 0, 1, 0, 12'd8));
    st(1); expv.push_back(32'h5678);
    emit(ldst(1, 0, 2, 0, 12'd4, 1, 1, 1));            // LDR R2,[R0,#4]!
    st(2); expv.push_back(A5);
    st(0); expv.push_back(32'h3004);
    emit(ldst(1, 0, 3, 0, 12'd4, 0, 0, 0));            // LDR R3,[R0],#-4
    st(0); expv.push_back(32'h3000);
    emit(ldst(1, 0, 1, 0, 12'd0));                     // LDR R1,[R0]
    emit(dpi(ADD, 0, 2, 1, 8'd1));                     // load-use
    st(2); expv.push_back(A4 + 1);
    emit(dpi(MOV, 0, 1, 0, 8'd1)); emit(dpi(MOV, 0, 2, 0, 8'd2)); emit(dpi(MOV, 0, 3, 0, 8'd3));
    emit(blk(0, 0, 16'h000E, 0, 1, 1));                // STMIA R0!,{R1-R3}
    emit(blk(1, 0, 16'h00E0, 1, 0, 1));                // LDMDB R0!,{R5-R7}
    st(5); expv.push_back(1);
    st(6); expv.push_back(2);
    st(7); expv.push_back(3);
    st(0); expv.push_back(32'h3000);
    emit(dpi(MOV, 0, 1, 0, 8'h55));
    emit({AL, 5'b00010, 1'b0, 2'b00, 4'd0, 4'd2, 4'd0, 4'b1001, 4'd1});  // SWP R2,R1,[R0]
    emit(ldst(1, 0, 3, 0, 12'd0));
    st(2); expv.push_back(1);
    st(3); expv.push_back(32'h55);
    emit({AL, 5'b00010, 1'b0, 6'b001111, 4'd1, 12'd0});                  // MRS R1,CPSR
    emit(dpi(AND, 0, 1, 1, 8'h1F));
    st(1); expv.push_back(32'h13);
    emit(bra(1, pcw, 32'h780));                                           // BL func
    st(8); expv.push_back(32'h77);
    // coprocessor 5: MCR, CDP, MRC
    emit({AL, 4'b1110, 3'd0, 1'b0, 4'd1, 4'd4, 4'd5, 3'd0, 1'b1, 4'd0});  // MCR p5,0,R4,c1,c0
    emit({AL, 4'b1110, 4'd0, 4'd1, 4'd2, 4'd5, 3'd0, 1'b0, 4'd3});        // CDP p5
    emit({AL, 4'b1110, 3'd0, 1'b1, 4'd1, 4'd9, 4'd5, 3'd0, 1'b1, 4'd0});  // MRC p5,0,R9,c1,c0
    st(9); expv.push_back(A4 + 1);
    // coprocessor 5 block transfers: STC of 3 words, then LDC of 2 words back
    li(4, CPBUF);
    emit({AL, 3'b110, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 4'd4, 4'd2, 4'd5, 8'd3});  // STC p5,c2,[R4],#12
    st(4); expv.push_back(CPBUF + 12);
    for (int k = 0; k < 3; k++) begin
      emit(ldst(1, 0, 5, 4, 12'(4 * (3 - k)), 1, 0, 0));                       // LDR R5,[R4,#-..]
      st(5); expv.push_back(32'hC0DE_0000 + 32'(k));
    end
    emit({AL, 3'b110, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 4'd4, 4'd1, 4'd5, 8'd2});  // LDC p5,c1,[R4,#-8]!
    st(4); expv.push_back(CPBUF + 4);
    emit({AL, 4'b1110, 3'd0, 1'b1, 4'd1, 4'd9, 4'd7, 3'd0, 1'b1, 4'd0});  // MRC p7 -> absent
    st(10); expv.push_back(32'hAA);
    emit(dpi(MOV, 0, 10, 0, 8'd0));
    emit(32'hE7F0_00F0);                                                  // undefined
    st(10); expv.push_back(32'hAA);
    emit({AL, 4'hF, 24'd0});                                              // SWI 0
    st(11); expv.push_back(32'hBB);
    // LDR into the PC
    emit(dpi(MOV, 0, 6, 0, 8'd0));
    li(1, pcw + 16 + 12);
    emit(ldst(0, 0, 1, 0, 12'd0));
    emit(ldst(1, 0, 15, 0, 12'd0));                    // LDR PC,[R0]
    emit(dpi(ADD, 0, 6, 6, 8'd1));                     // skipped
    emit(dpi(ADD, 0, 6, 6, 8'd2));
    st(6); expv.push_back(2);
    // to Thumb
    li(0, THUMB | 1);
    emit(32'hE12F_FF10);                               // BX R0
    $display("ARM test code ends at %h (Thumb code at %h)", pcw, THUMB);

    // Thumb routine
    pcw = THUMB;
    emit16(16'h2100 | 16'd10);                         // MOV r1,#10
    emit16(16'h1C00 | (16'd5 << 6) | (16'd1 << 3) | 16'd2);   // ADD r2,r1,#5
    emit16((16'd2 << 6) | (16'd2 << 3) | 16'd3);       // LSL r3,r2,#2
    emit16(16'h4340 | (16'd1 << 3) | 16'd3);           // MUL r3,r1
    emit16(16'h4665);                                  // MOV r5,r12
    emit16(16'h602B);                                  // STR r3,[r5,#0]
    emit16(16'h3504);                                  // ADD r5,#4
    expv.push_back(600);
    emit16(16'hB406);                                  // PUSH {r1,r2}
    emit16(16'hBCC0);                                  // POP  {r6,r7}
    emit16(16'h602F); emit16(16'h3504);                // STR r7 ; ADD r5,#4
    expv.push_back(15);
    emit16(16'h290A);                                  // CMP r1,#10
    emit16(16'hD000);                                  // BEQ +0 (skip next)
    emit16(16'h2300);                                  // MOV r3,#0 (skipped)
    emit16(16'h602B); emit16(16'h3504);
    expv.push_back(600);
    emit16(16'h290A);                                  // CMP r1,#10
    if (pcw[1] == 1'b0) emit16(16'h46C0);              // MOV r8,r8: branch at address bit 1 set
    emit16(16'hD001);                                  // BEQ +2 (PC is address + 4, not word-aligned)
    emit16(16'h2300); emit16(16'h2300);                // MOV r3,#0 twice (skipped)
    emit16(16'h602B); emit16(16'h3504);
    expv.push_back(600);
    begin
      int off;
      off = int'(TFUNC) - int'(pcw + 4);
      emit16(16'hF000 | 16'((off >>> 12) & 32'h7FF));
      emit16(16'hF800 | 16'((off >>> 1) & 32'h7FF));
    end
    emit16(16'h602E); emit16(16'h3504);                // STR r6
    expv.push_back(32'h33);
    begin
      int unsigned base;
      base = (pcw + 4) & ~32'd3;
      emit16(16'h4C00 | 16'((TLIT - base) >> 2));      // LDR r4,[PC,#..]
    end
    emit16(16'h602C); emit16(16'h3504);                // STR r4
    expv.push_back(32'hCAFE_BABE);
    emit16(16'h46AC);                                  // MOV r12,r5
    begin
      int unsigned base;
      base = (pcw + 4) & ~32'd3;
      emit16(16'hA000 | 16'((ARMRET - base) >> 2));    // ADD r0,PC,#..
    end
    emit16(16'h4700);                                  // BX r0
    pcw = TFUNC;
    emit16(16'h2633);                                  // MOV r6,#0x33
    emit16(16'h4770);                                  // BX LR
    pcw = TLIT; emit(32'hCAFE_BABE);

    // back in ARM: interrupts
    pcw = ARMRET;
    emit(dpi(MOV, 0, 9, 0, 8'd0));
    emit({AL, 5'b00110, 1'b0, 2'b10, 4'b0001, 4'hF, 4'd0, 8'h53});  // MSR CPSR_c,#0x53 (I=0)
    emit(dpi(CMP, 1, 0, 9, 8'd0));
    emit(bra(0, pcw, pcw - 4, EQ));                    // wait for the IRQ
    st(9); expv.push_back(1);
    emit(dpi(MOV, 0, 7, 0, 8'd0));
    emit({AL, 5'b00110, 1'b0, 2'b10, 4'b0001, 4'hF, 4'd0, 8'h13});  // MSR CPSR_c,#0x13 (F=0)
    emit(dpi(CMP, 1, 0, 7, 8'd0));
    emit(bra(0, pcw, pcw - 4, EQ));
    st(7); expv.push_back(32'h99);
    // finish
    li(0, DONE_ADDR);
    emit(dpi(MOV, 0, 1, 0, 8'hDE));
    emit(ldst(0, 0, 1, 0, 12'd0));
    emit(bra(0, pcw, pcw));
  end

  // ---------------------------------------------------------------- monitors
  int checks = 0, failures = 0, cycles = 0;
  int n_fwd = 0, n_stall = 0, n_flush = 0, n_condfail = 0, n_mul_early = 0, n_mul_full = 0;
  int n_thumb = 0, n_irq = 0, n_fiq = 0, n_swi = 0, n_und = 0, n_cphold = 0, n_block = 0;
  int mul_len [$];
  int cur_mul = 0;
  // length of every instruction: execute cycles plus the refill bubbles after it
  typedef struct { index_e idx; logic [31:0] ins; logic ok; int len; } run_t;
  run_t runs [$];
  run_t cur_run;
  logic hold_prev = 1'b0;
  logic t_prev = 1'b0;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.rf_ra != dut.rf_rb ? (dut.fwd_a || dut.fwd_b) : dut.fwd_a) n_fwd++;
    if (dut.fetch_stall) n_stall++;
    if (dut.flush) n_flush++;
    if (dut.ex_valid && !dut.pass) n_condfail++;
    if (dut.u_mul.done) begin
      if (dut.u_mul.k_q < 3'd4) n_mul_early++; else n_mul_full++;
    end
    if (cpsr.t && !t_prev) n_thumb++;
    t_prev = cpsr.t;
    if (dut.exc_take) begin
      case (dut.ex_index)
        IDX_IRQ: n_irq++;
        IDX_FIQ: n_fiq++;
        IDX_SWI: n_swi++;
        default: n_und++;
      endcase
    end
    if (dut.ex_hold && dut.c.cp) n_cphold++;
    if (dut.ex_valid && dut.ex_index inside {IDX_LDM, IDX_STM}) n_block++;
    if (dut.ex_valid && dut.ex_step == 5'd0 && !hold_prev) begin
      if (cur_run.len > 0) runs.push_back(cur_run);
      cur_run = '{idx: dut.ex_index, ins: dut.ex_instr, ok: dut.pass, len: 1};
    end else if (cur_run.len > 0) cur_run.len++;
    hold_prev = dut.ex_hold;
    // multiply lengths in execute cycles
    if (dut.ex_valid && dut.ex_index == IDX_MUL) begin
      if (dut.ex_step == 0 && !dut.ex_hold) begin
        if (cur_mul > 0) mul_len.push_back(cur_mul);
        cur_mul = 1;
      end else cur_mul++;
    end else if (cur_mul > 0) begin
      mul_len.push_back(cur_mul); cur_mul = 0;
    end
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask
  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  // expected length of one instruction, or -1 when it is not checked
  function automatic int exp_len(run_t r);
    int n = $countones(r.ins[15:0]);
    if (!r.ok) return 1;
    case (r.idx)
      IDX_B, IDX_BX:                 return 3;
      IDX_DP:                        return (r.ins[15:12] == 4'd15) ? -1 : 1;
      IDX_DP_RS:                     return (r.ins[15:12] == 4'd15) ? -1 : 2;
      IDX_LDR:                       return (r.ins[15:12] == 4'd15) ? 4 : 2;
      IDX_STR:                       return 2;
      IDX_LDM:                       return r.ins[15] ? n + 3 : n + 1;
      IDX_STM:                       return n + 1;
      IDX_SWP:                       return 2;
      IDX_LDC, IDX_STC:              return 2 + int'(r.ins[15:12]) + 1;   // busy 2, then one word per cycle
      IDX_SWI, IDX_IRQ, IDX_FIQ, IDX_UND: return 3;
      default:                       return -1;
    endcase
  endfunction
  task automatic check_lengths();
    int bad [string];
    int seen [string];
    foreach (runs[k]) begin
      int e = exp_len(runs[k]);
      string key = runs[k].ok ? runs[k].idx.name() : "condition failed";
      if (e < 0) continue;
      seen[key] = seen.exists(key) ? seen[key] + 1 : 1;
      if (runs[k].len != e) begin
        bad[key] = bad.exists(key) ? bad[key] + 1 : 1;
        $display("FAIL %s %08h took %0d cycles, expected %0d", key, runs[k].ins, runs[k].len, e);
      end
    end
    foreach (seen[key]) begin
      checks++;
      if (bad.exists(key)) failures++;
      $display("  cycles %-18s %0d instructions", key, seen[key]);
    end
  endtask

  task automatic finish();
    int exp_mul [6] = '{2, 3, 6, 6, 7, 2};
    for (int k = 0; k < expv.size(); k++)
      check($sformatf("result %0d", k), mem[(RES >> 2) + k], expv[k]);
    check("result pointer R12 stored area end", 32'(expv.size()), 32'(expv.size()));
    check("number of multiplies", 32'(mul_len.size()), 32'd6);
    for (int k = 0; k < 6 && k < mul_len.size(); k++)
      check($sformatf("multiply %0d execute cycles", k), 32'(mul_len[k]), 32'(exp_mul[k]));
    check_lengths();
    check("final mode SVC", 32'(cpsr.mode), 32'(M_SVC));
    check("final state ARM", 32'(cpsr.t), 32'd0);
    check("coprocessor operations", 32'(cp_ops), 32'd5);
    check("coprocessor words moved by LDC/STC", 32'(cp_words_total), 32'd5);
    check("LDC word 0", ldc_words[0], 32'hC0DE_0001);
    check("LDC word 1", ldc_words[1], 32'hC0DE_0002);
    need("forwarding", n_fwd);
    need("fetch/decode stall", n_stall);
    need("pipeline flush", n_flush);
    need("condition fail -> NOP", n_condfail);
    need("multiply early termination", n_mul_early);
    need("multiply full length", n_mul_full);
    need("switch to Thumb", n_thumb);
    need("IRQ entry", n_irq);
    need("FIQ entry", n_fiq);
    need("SWI entry", n_swi);
    need("undefined entry", n_und);
    need("coprocessor busy wait", n_cphold);
    need("block transfer cycles", n_block);
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    forever begin
      @(posedge clk);
      if (mem[DONE_ADDR >> 2] == 32'hDE) begin
        repeat (2) @(posedge clk);
        finish();
      end
    end
  end

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: program did not finish");
    finish();
  end
endmodule
