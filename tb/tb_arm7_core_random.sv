// tb_arm7_core_random: random-program test of arm7_core against an
// instruction-level reference model written in this testbench.
//
// Each run resets the core and loads a fresh program: R0-R10 and the
// condition flags are set to random values, then come NINSTR random
// instructions drawn from data processing (all 16 operations, immediate,
// immediate-shift and register-shift operands, random S bit and condition
// code), MUL/MLA and the four long multiplies (random S bit and condition;
// the multiplies leave C and V alone), all on R0-R10, and memory
// transfers through the base register R11 into a 4 KB data area filled with
// random words: LDR/STR word and byte (unaligned word loads included),
// halfword and signed loads, LDM/STM in all four modes with random register
// lists, and SWP/SWPB, with pre/post indexing and write-back.  The generator
// runs the model as it goes and points each write-back toward the middle of
// the data area, so R11 stays inside it.  The program ends by storing
// R0-R11 and the CPSR with STM/MRS/STR and writing a marker word; the data
// area is compared word for word as well.
//
// While the random part runs, IRQ and FIQ are raised at random moments and
// held until taken.  The handlers are transparent: the IRQ handler counts in
// memory through its banked stack pointer and the FIQ handler counts in its
// banked R8, both return with SUBS PC, LR, #4, so the final state must still
// equal the model's, and both counts must equal the number of entries.
//
// After the ARM part each run switches to Thumb state with BX and runs
// NTHUMB random Thumb instructions of formats 1-5 and 11 (shifts by
// immediate, three-operand add/subtract, 8-bit immediate operations, the
// register ALU operations except MUL, ADD/CMP/MOV with R8-R10, and LDR/STR
// relative to SP, which points at the data area) on R0-R10, then returns
// with BX LR.  Both parts also contain conditional forward
// branches over 1-3 instructions; the generator asks the model whether each
// is taken and does not step the model through what it jumps over.  For the
// model each Thumb instruction is rewritten here as the ARM instruction it
// stands for; this table is written from the Thumb definitions and does not
// use the core's translator.
// The model executes the same instructions one at a time; every stored word
// is compared with it.  Back-to-back random dependences exercise the
// forwarding path and the condition/NOP substitution on nearly every cycle;
// both are counted, as are register-specified shifts and multiplies, and a
// mechanism that never happens is a failure.  Memory is a 16 KB array that
// answers both ports in the same cycle; no interrupt or coprocessor is used.
`timescale 1ns/1ps
module tb_arm7_core_random;
  import arm_pkg::*;

  localparam int NRUNS  = 20;
  localparam int NINSTR = 200;
  localparam int NTHUMB = 60;
  localparam int unsigned TCODE = 32'h1000;
  localparam int unsigned DUMP = 32'h3000, DONE_ADDR = 32'h3FFC;
  localparam int unsigned IRQ_SP = 32'h3800, START = 32'h40, IRQ_H = 32'h24;
  localparam int unsigned DATA = 32'h2000, DWORDS = 1024, DMID = DATA + 4 * DWORDS / 2;
  localparam logic [3:0] AL = 4'hE;

  logic clk = 1'b0, rst_n = 1'b0;
  logic irq = 1'b0, fiq = 1'b0, running = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_rd, dmem_wr, ncpi;
  logic [3:0]  dmem_be;
  logic [31:0] cp_instr, cp_dout;
  psr_t        cpsr;

  arm7_core dut (
    .clk, .rst_n, .bigend(1'b0), .irq, .fiq,
    .imem_addr, .imem_rdata, .dmem_addr, .dmem_rd, .dmem_wr, .dmem_be, .dmem_wdata, .dmem_rdata,
    .ncpi, .cpa(1'b1), .cpb(1'b0), .cplast(1'b1), .cp_instr, .cp_dout, .cp_din(32'd0), .cpsr_o(cpsr)
  );

  logic [31:0] mem [4096];
  assign imem_rdata = mem[imem_addr[13:2]];
  assign dmem_rdata = mem[dmem_addr[13:2]];
  always_ff @(posedge clk)
    if (dmem_wr)
      for (int k = 0; k < 4; k++)
        if (dmem_be[k]) mem[dmem_addr[13:2]][8*k +: 8] <= dmem_wdata[8*k +: 8];

  // ---------------------------------------------------------------- reference model
  logic [31:0] r [16];
  logic        fn, fz, fc, fv;
  logic [31:0] dm [DWORDS];                   // model of the data area

  function automatic logic [31:0] dm_rd(logic [31:0] ad); return dm[(ad - DATA) >> 2]; endfunction
  task automatic dm_wr(logic [31:0] ad, logic [31:0] d, logic [3:0] be);
    for (int k = 0; k < 4; k++) if (be[k]) dm[(ad - DATA) >> 2][8*k +: 8] = d[8*k +: 8];
  endtask

  // single and halfword transfers, block transfers and swaps
  task automatic model_mem(input logic [31:0] ins);
    logic [31:0] base, off, ad, w, v;
    logic p, u, wb, l;
    base = r[ins[19:16]];
    p = ins[24]; u = ins[23]; wb = ins[21]; l = ins[20];
    if (ins[27:25] == 3'b100) begin                                   // LDM / STM
      int n = $countones(ins[15:0]);
      logic [31:0] lo;
      lo = u ? (p ? base + 4 : base) : (p ? base - 4 * n : base - 4 * n + 4);
      for (int k = 0; k < 16; k++)
        if (ins[k]) begin
          if (l) r[k] = dm_rd(lo); else dm_wr(lo, r[k], 4'hF);
          lo += 4;
        end
      if (wb) r[ins[19:16]] = u ? base + 4 * n : base - 4 * n;
      return;
    end
    if (ins[27:23] == 5'b00010 && ins[11:4] == 8'b0000_1001) begin     // SWP / SWPB
      w = dm_rd(base);
      if (ins[22]) begin
        v = 32'(w[8*base[1:0] +: 8]);
        dm_wr(base, {4{r[ins[3:0]][7:0]}}, 4'b0001 << base[1:0]);
      end else begin
        v = (w >> (8 * base[1:0])) | (w << (32 - 8 * base[1:0]));
        dm_wr(base, r[ins[3:0]], 4'hF);
      end
      r[ins[15:12]] = v;
      return;
    end
    if (ins[27:26] == 2'b01) off = {20'd0, ins[11:0]};               // LDR/STR immediate
    else off = {24'd0, ins[11:8], ins[3:0]};                          // halfword immediate
    ad = p ? (u ? base + off : base - off) : base;
    w = dm_rd(ad);
    if (ins[27:26] == 2'b01) begin
      if (l) v = ins[22] ? 32'(w[8*ad[1:0] +: 8]) : (w >> (8 * ad[1:0])) | (w << (32 - 8 * ad[1:0]));
      else if (ins[22]) dm_wr(ad, {4{r[ins[15:12]][7:0]}}, 4'b0001 << ad[1:0]);
      else dm_wr(ad, r[ins[15:12]], 4'hF);
    end else begin
      case (ins[6:5])
        2'b01: v = 32'(w[16*ad[1] +: 16]);                              // LDRH
        2'b10: v = {{24{w[8*ad[1:0] + 7]}}, w[8*ad[1:0] +: 8]};         // LDRSB
        default: v = {{16{w[16*ad[1] + 15]}}, w[16*ad[1] +: 16]};       // LDRSH
      endcase
      if (!l) dm_wr(ad, {2{r[ins[15:12]][15:0]}}, ad[1] ? 4'b1100 : 4'b0011);
    end
    if (wb || !p) r[ins[19:16]] = u ? base + off : base - off;
    if (l) r[ins[15:12]] = v;
  endtask

  function automatic logic cond_ok(logic [3:0] cd);
    case (cd)
      4'h0: return fz;          4'h1: return !fz;
      4'h2: return fc;          4'h3: return !fc;
      4'h4: return fn;          4'h5: return !fn;
      4'h6: return fv;          4'h7: return !fv;
      4'h8: return fc && !fz;   4'h9: return !fc || fz;
      4'hA: return fn == fv;    4'hB: return fn != fv;
      4'hC: return !fz && (fn == fv);
      4'hD: return fz || (fn != fv);
      default: return 1'b1;
    endcase
  endfunction

  // operand 2 and shifter carry, straight from the architecture rules
  task automatic operand2(input logic [31:0] ins, output logic [31:0] v, output logic co);
    logic [31:0] rm;
    int amt;
    logic [1:0] ty;
    if (ins[25]) begin
      amt = 2 * int'(ins[11:8]);
      v = (amt == 0) ? {24'd0, ins[7:0]} : ({24'd0, ins[7:0]} >> amt) | ({24'd0, ins[7:0]} << (32 - amt));
      co = (amt == 0) ? fc : v[31];
      return;
    end
    rm = r[ins[3:0]];
    ty = ins[6:5];
    if (!ins[4]) begin                                  // shift by immediate
      amt = int'(ins[11:7]);
      case (ty)
        2'd0: if (amt == 0) begin v = rm; co = fc; end
              else begin v = rm << amt; co = rm[32 - amt]; end
        2'd1: if (amt == 0) begin v = 0; co = rm[31]; end
              else begin v = rm >> amt; co = rm[amt - 1]; end
        2'd2: if (amt == 0) begin v = {32{rm[31]}}; co = rm[31]; end
              else begin v = 32'($signed(rm) >>> amt); co = rm[amt - 1]; end
        default: if (amt == 0) begin v = {fc, rm[31:1]}; co = rm[0]; end
                 else begin v = (rm >> amt) | (rm << (32 - amt)); co = rm[amt - 1]; end
      endcase
    end else begin                                      // shift by register
      amt = int'(r[ins[11:8]][7:0]);
      if (amt == 0) begin v = rm; co = fc; end
      else case (ty)
        2'd0: if (amt < 32) begin v = rm << amt; co = rm[32 - amt]; end
              else if (amt == 32) begin v = 0; co = rm[0]; end
              else begin v = 0; co = 1'b0; end
        2'd1: if (amt < 32) begin v = rm >> amt; co = rm[amt - 1]; end
              else if (amt == 32) begin v = 0; co = rm[31]; end
              else begin v = 0; co = 1'b0; end
        2'd2: if (amt < 32) begin v = 32'($signed(rm) >>> amt); co = rm[amt - 1]; end
              else begin v = {32{rm[31]}}; co = rm[31]; end
        default: begin
          int a5 = amt % 32;
          if (a5 == 0) begin v = rm; co = rm[31]; end
          else begin v = (rm >> a5) | (rm << (32 - a5)); co = rm[a5 - 1]; end
        end
      endcase
    end
  endtask

  task automatic model_step(input logic [31:0] ins);
    logic [31:0] a, b, y;
    logic [32:0] wide;
    logic sc, arith, wr;
    if (!cond_ok(ins[31:28])) return;
    if (ins[27:25] == 3'b100 || ins[27:26] == 2'b01 ||
        (ins[27:25] == 3'b000 && ins[7] && ins[4] && ins[6:5] != 2'b00) ||
        (ins[27:23] == 5'b00010 && ins[11:4] == 8'b0000_1001)) begin
      model_mem(ins);
      return;
    end
    if (ins[27:22] == 6'b000000 && ins[7:4] == 4'b1001) begin        // MUL / MLA
      y = r[ins[3:0]] * r[ins[11:8]] + (ins[21] ? r[ins[15:12]] : 32'd0);
      r[ins[19:16]] = y;
      if (ins[20]) begin fn = y[31]; fz = (y == 0); end               // C and V kept
      return;
    end
    if (ins[27:23] == 5'b00001 && ins[7:4] == 4'b1001) begin         // long multiplies
      logic [63:0] p64;
      if (ins[22]) p64 = 64'($signed(r[ins[3:0]]) * $signed(r[ins[11:8]]));
      else         p64 = {32'd0, r[ins[3:0]]} * {32'd0, r[ins[11:8]]};
      if (ins[21]) p64 += {r[ins[19:16]], r[ins[15:12]]};
      r[ins[15:12]] = p64[31:0];
      r[ins[19:16]] = p64[63:32];
      if (ins[20]) begin fn = p64[63]; fz = (p64 == 0); end
      return;
    end
    a = r[ins[19:16]];
    operand2(ins, b, sc);
    arith = 1'b1;
    wide = '0;
    case (ins[24:21])
      4'h0, 4'h8: begin y = a & b;  arith = 1'b0; end   // AND, TST
      4'h1, 4'h9: begin y = a ^ b;  arith = 1'b0; end   // EOR, TEQ
      4'h2, 4'hA: wide = {1'b0, a} + {1'b0, ~b} + 33'd1; // SUB, CMP
      4'h3:       wide = {1'b0, b} + {1'b0, ~a} + 33'd1; // RSB
      4'h4, 4'hB: wide = {1'b0, a} + {1'b0, b};          // ADD, CMN
      4'h5:       wide = {1'b0, a} + {1'b0, b} + 33'(fc);
      4'h6:       wide = {1'b0, a} + {1'b0, ~b} + 33'(fc);
      4'h7:       wide = {1'b0, b} + {1'b0, ~a} + 33'(fc);
      4'hC:       begin y = a | b;  arith = 1'b0; end
      4'hD:       begin y = b;      arith = 1'b0; end
      4'hE:       begin y = a & ~b; arith = 1'b0; end
      default:    begin y = ~b;     arith = 1'b0; end
    endcase
    wr = !(ins[24:23] == 2'b10);
    if (arith) y = wide[31:0];
    if (ins[20]) begin
      fn = y[31];
      fz = (y == 0);
      if (arith) begin
        logic [31:0] x1, x2;
        fc = wide[32];
        case (ins[24:21])
          4'h3, 4'h7: begin x1 = b; x2 = ~a; end
          4'h4, 4'h5, 4'hB: begin x1 = a; x2 = b; end
          default: begin x1 = a; x2 = ~b; end
        endcase
        fv = (x1[31] == x2[31]) && (y[31] != x1[31]);
      end else fc = sc;
    end
    if (wr) r[ins[15:12]] = y;
  endtask

  // ---------------------------------------------------------------- program generation
  int unsigned pcw;
  task automatic emit(logic [31:0] w); mem[pcw >> 2] = w; pcw += 4; endtask
  task automatic li(int rd, logic [31:0] v);          // MOV + 3 x ORR
    emit({AL, 8'b0011_1010, 4'd0, 4'(rd), 4'd0, v[7:0]});
    emit({AL, 8'b0011_1000, 4'(rd), 4'(rd), 4'd12, v[15:8]});
    emit({AL, 8'b0011_1000, 4'(rd), 4'(rd), 4'd8,  v[23:16]});
    emit({AL, 8'b0011_1000, 4'(rd), 4'(rd), 4'd4,  v[31:24]});
  endtask

  function automatic logic [3:0] rreg(); return 4'($urandom_range(0, 10)); endfunction

  // random Thumb instruction (formats 1-4, R0-R7) and its ARM meaning
  task automatic rand_thumb(output logic [15:0] t, output logic [31:0] a);
    logic [2:0] rd, rs, rn;
    logic [4:0] imm5;
    logic [7:0] imm8;
    logic [3:0] op;
    rd = 3'($urandom); rs = 3'($urandom); rn = 3'($urandom);
    imm5 = ($urandom_range(0, 3) == 0) ? 5'd0 : 5'($urandom);
    imm8 = 8'($urandom);
    case ($urandom_range(0, 5))
      5: begin                                                     // LDR/STR Rd,[SP,#imm8*4]
        logic l = 1'($urandom);
        t = {4'b1001, l, rd, imm8};
        a = {AL, 7'b0101_100, l, 4'd13, 1'b0, rd, 2'b00, imm8, 2'b00};
      end
      4: begin                                                     // hi-register ADD/CMP/MOV
        logic [1:0] o = 2'($urandom_range(0, 2));
        logic [3:0] hd, hs;
        logic h1, h2;
        h1 = 1'($urandom); h2 = !h1 || 1'($urandom);
        hd = h1 ? 4'(8 + $urandom_range(0, 2)) : {1'b0, rd};
        hs = h2 ? 4'(8 + $urandom_range(0, 2)) : {1'b0, rs};
        t = {6'b010001, o, h1, h2, hs[2:0], hd[2:0]};
        case (o)
          2'd0: a = {AL, 8'b0000_1000, hd, hd, 8'd0, hs};                 // ADD hd,hd,hs
          2'd1: a = {AL, 8'b0001_0101, hd, 4'd0, 8'd0, hs};               // CMP hd,hs
          default: a = {AL, 8'b0001_1010, 4'd0, hd, 8'd0, hs};            // MOV hd,hs
        endcase
      end
      0: begin                                                     // LSL/LSR/ASR #imm5
        logic [1:0] sh = 2'($urandom_range(0, 2));
        t = {3'b000, sh, imm5, rs, rd};
        a = {AL, 8'b0001_1011, 4'd0, 1'b0, rd, imm5, sh, 1'b0, 1'b0, rs};
      end
      1: begin                                                     // ADD/SUB reg or #imm3
        logic i = 1'($urandom), sb = 1'($urandom);
        t = {5'b00011, i, sb, rn, rs, rd};
        a = {AL, 2'b00, i, sb ? 4'h2 : 4'h4, 1'b1, 1'b0, rs, 1'b0, rd, i ? {9'd0, rn} : {9'd0, rn}};
      end
      2: begin                                                     // MOV/CMP/ADD/SUB #imm8
        logic [1:0] o = 2'($urandom);
        logic [3:0] aop;
        t = {3'b001, o, rd, imm8};
        aop = (o == 0) ? 4'hD : (o == 1) ? 4'hA : (o == 2) ? 4'h4 : 4'h2;
        a = {AL, 2'b00, 1'b1, aop, 1'b1, 1'b0, (o == 0) ? 3'd0 : rd, 1'b0, (o == 1) ? 3'd0 : rd, 4'd0, imm8};
      end
      default: begin                                               // register ALU operations
        op = 4'($urandom);
        if (op == 4'hD) op = 4'h0;                                 // no MUL
        t = {6'b010000, op, rs, rd};
        case (op)
          4'h2, 4'h3, 4'h4, 4'h7: begin                            // shifts by register
            logic [1:0] sh;
            sh = (op == 4'h2) ? 2'd0 : (op == 4'h3) ? 2'd1 : (op == 4'h4) ? 2'd2 : 2'd3;
            a = {AL, 8'b0001_1011, 4'd0, 1'b0, rd, 1'b0, rs, 1'b0, sh, 1'b1, 1'b0, rd};
          end
          4'h9: a = {AL, 8'b0010_0111, 1'b0, rs, 1'b0, rd, 12'd0};   // NEG = RSBS rd,rs,#0
          4'hF: a = {AL, 8'b0001_1111, 4'd0, 1'b0, rd, 8'd0, 1'b0, rs};       // MVNS
          default: begin
            logic [3:0] aop;
            case (op)
              4'h0: aop = 4'h0;  4'h1: aop = 4'h1;  4'h5: aop = 4'h5;  4'h6: aop = 4'h6;
              4'h8: aop = 4'h8;  4'hA: aop = 4'hA;  4'hB: aop = 4'hB;  4'hC: aop = 4'hC;
              default: aop = 4'hE;                                              // BIC
            endcase
            a = {AL, 2'b00, 1'b0, aop, 1'b1, 1'b0, rd, (aop[3:2] == 2'b10) ? 4'd0 : {1'b0, rd},
                 8'd0, 1'b0, rs};
          end
        endcase
      end
    endcase
  endtask

  task automatic emit16(logic [15:0] h);
    mem[pcw >> 2][16 * pcw[1] +: 16] = h;
    pcw += 2;
  endtask

  // memory transfer through R11; write-back always moves R11 toward DMID
  function automatic logic [31:0] rand_mem(logic [3:0] cd, int kind);
    logic [3:0] rd;
    logic p, u, wb, l;
    logic [11:0] off;
    rd = rreg();
    l  = 1'($urandom);
    p  = 1'($urandom);
    wb = !p || 1'($urandom);
    u  = wb ? (r[11] < DMID) : 1'($urandom);
    case (kind)
      10: begin                                                    // LDR/STR (B)
        logic b = 1'($urandom);
        off = wb ? 12'(4 * $urandom_range(0, 63)) : 12'($urandom_range(0, 255));
        if (!l && !b && !wb) off[1:0] = 2'b00;                     // word stores aligned
        return {cd, 3'b010, p, u, b, p ? wb : 1'b0, l, 4'd11, rd, off};
      end
      11: begin                                                    // halfword / signed
        logic [1:0] sh;
        sh = l ? 2'($urandom_range(1, 3)) : 2'b01;
        off = wb ? 12'(4 * $urandom_range(0, 63)) : 12'($urandom_range(0, 255));
        if (sh != 2'b10 || wb) off[0] = 1'b0;                       // halfwords even
        return {cd, 3'b000, p, u, 1'b1, p ? wb : 1'b0, l, 4'd11, rd, off[7:4], 1'b1, sh, 1'b1, off[3:0]};
      end
      12: begin                                                    // LDM/STM
        logic [15:0] list = {5'd0, 11'($urandom)};
        if (list == 0) list = 16'h0001;
        wb = 1'($urandom);
        u  = wb ? (r[11] < DMID) : 1'($urandom);
        return {cd, 3'b100, p, u, 1'b0, wb, l, 4'd11, list};
      end
      default: begin                                               // SWP/SWPB at R11 + 0
        return {cd, 5'b00010, 1'($urandom), 2'b00, 4'd11, rd, 8'b0000_1001, rreg()};
      end
    endcase
  endfunction

  function automatic logic [31:0] rand_instr();
    logic [3:0] cd, op, rd, rn, rm, rs;
    logic s;
    int kind;
    cd = ($urandom_range(0, 2) == 0) ? AL : 4'($urandom_range(0, 14));
    rd = rreg(); rn = rreg(); rm = rreg(); rs = rreg();
    kind = $urandom_range(0, 13);
    if (kind >= 10) return rand_mem(cd, kind);
    if (kind == 0) begin
      if ($urandom_range(0, 1) == 0) begin              // MUL / MLA, Rd != Rm
        if (rd == rm) rd = (rm == 4'd10) ? 4'd0 : rm + 4'd1;
        return {cd, 6'b000000, 1'($urandom), 1'($urandom), rd, rn, rs, 4'b1001, rm};
      end
      // UMULL/SMULL/UMLAL/SMLAL with RdHi, RdLo and Rm all different
      while (rn == rm) rn = rreg();
      while (rd == rm || rd == rn) rd = rreg();
      return {cd, 5'b00001, 1'($urandom), 1'($urandom), 1'($urandom), rd, rn, rs, 4'b1001, rm};
    end
    op = 4'($urandom);
    s  = (op[3:2] == 2'b10) ? 1'b1 : 1'($urandom);     // compares must set flags
    case (kind % 3)
      0: return {cd, 2'b00, 1'b1, op, s, rn, rd, 4'($urandom), 8'($urandom)};
      1: return {cd, 2'b00, 1'b0, op, s, rn, rd, ($urandom_range(0, 3) == 0) ? 5'd0 : 5'($urandom),
                 2'($urandom), 1'b0, rm};   // amount 0 often: LSR/ASR #32 and RRX
      default: return {cd, 2'b00, 1'b0, op, s, rn, rd, rs, 1'b0, 2'($urandom), 1'b1, rm};
    endcase
  endfunction

  // ---------------------------------------------------------------- monitors
  int checks = 0, failures = 0, cycles = 0;
  int n_fwd = 0, n_condfail = 0, n_regshift = 0, n_mul = 0, n_stall = 0;
  int n_load = 0, n_store = 0, n_block = 0, n_swap = 0;
  int n_irq = 0, n_fiq = 0, n_irq_run = 0, n_fiq_run = 0, n_thumb = 0, n_thumb_irq = 0;
  // interrupt sources: raised at random, dropped when the core enters the handler
  always @(posedge clk) begin
    if (!rst_n || !running) begin irq <= 1'b0; fiq <= 1'b0; end
    else begin
      if (dut.exc_take && dut.ex_index == IDX_IRQ) begin irq <= 1'b0; n_irq++; n_irq_run++; end
      else if (!irq && $urandom_range(0, 60) == 0) irq <= 1'b1;
      if (dut.exc_take && dut.ex_index == IDX_FIQ) begin fiq <= 1'b0; n_fiq++; n_fiq_run++; end
      else if (!fiq && $urandom_range(0, 90) == 0) fiq <= 1'b1;
    end
  end
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.fwd_a || dut.fwd_b) n_fwd++;
    if (dut.ex_valid && !dut.pass) n_condfail++;
    if (dut.ex_valid && dut.pass && dut.ex_index == IDX_DP_RS && dut.ex_step == 5'd0) n_regshift++;
    if (dut.u_mul.done) n_mul++;
    if (dut.fetch_stall) n_stall++;
    if (dut.ex_valid && cpsr.t) n_thumb++;
    if (dut.exc_take && cpsr.t) n_thumb_irq++;
    if (dut.ex_valid && dut.pass && dut.ex_step == 5'd0)
      case (dut.ex_index)
        IDX_LDR: n_load++;
        IDX_STR: n_store++;
        IDX_LDM, IDX_STM: n_block++;
        IDX_SWP: n_swap++;
        default: ;
      endcase
  end
  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  // ---------------------------------------------------------------- runs
  // register values: random, or small so that register-specified shifts
  // see amounts 0, 1-31, 32 and above 32
  function automatic logic [31:0] rval();
    case ($urandom_range(0, 3))
      0:       return 32'($urandom_range(0, 40));
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [31:0] prog [NINSTR];
    int          skip;
    logic [3:0]  flags;
    int          wait_cycles;
    int          seed;
    if ($value$plusargs("seed=%d", seed)) void'($urandom(seed));    // +seed=N picks other programs
    for (int run = 0; run < NRUNS; run++) begin
      rst_n = 1'b0;
      foreach (mem[k]) mem[k] = '0;
      // vectors and handlers
      pcw = 0;
      emit({AL, 3'b101, 1'b0, 24'((START - 8) >> 2)});                       // B start
      pcw = 32'h18;
      emit({AL, 3'b101, 1'b0, 24'((IRQ_H - 32'h18 - 8) >> 2)});              // IRQ: B handler
      emit({AL, 8'b0010_1000, 4'd8, 4'd8, 12'd1});                           // FIQ: ADD R8,R8,#1
      emit({AL, 8'b0010_0101, 4'd14, 4'd15, 12'd4});                         //      SUBS PC,LR,#4
      pcw = IRQ_H;
      emit({AL, 8'b0101_0000, 4'd13, 4'd0, 12'd4});                          // STR R0,[SP,#-4]
      emit({AL, 8'b0101_1001, 4'd13, 4'd0, 12'd4});                          // LDR R0,[SP,#4]
      emit({AL, 8'b0010_1000, 4'd0, 4'd0, 12'd1});                           // ADD R0,R0,#1
      emit({AL, 8'b0101_1000, 4'd13, 4'd0, 12'd4});                          // STR R0,[SP,#4]
      emit({AL, 8'b0101_0001, 4'd13, 4'd0, 12'd4});                          // LDR R0,[SP,#-4]
      emit({AL, 8'b0010_0101, 4'd14, 4'd15, 12'd4});                         // SUBS PC,LR,#4
      // start: banked registers of the handlers, then interrupts on
      pcw = START;
      emit({AL, 5'b00110, 1'b0, 2'b10, 4'b0001, 4'hF, 4'd0, 8'hD1});         // MSR CPSR_c,#0xD1 (FIQ)
      emit({AL, 8'b0011_1010, 4'd0, 4'd8, 12'd0});                           // MOV R8,#0
      emit({AL, 5'b00110, 1'b0, 2'b10, 4'b0001, 4'hF, 4'd0, 8'hD2});         // MSR CPSR_c,#0xD2 (IRQ)
      li(13, IRQ_SP);
      emit({AL, 5'b00110, 1'b0, 2'b10, 4'b0001, 4'hF, 4'd0, 8'h13});         // MSR CPSR_c,#0x13
      for (int k = 0; k < DWORDS; k++) begin dm[k] = $urandom; mem[(DATA >> 2) + k] = dm[k]; end
      for (int k = 0; k <= 11; k++) begin r[k] = rval(); li(k, r[k]); end
      r[11] = DMID;
      li(11, r[11]);
      flags = 4'($urandom);
      {fn, fz, fc, fv} = flags;
      emit({AL, 5'b00110, 1'b0, 2'b10, 4'b1000, 4'hF, 4'd4, flags, 4'd0});   // MSR CPSR_f,#flags
      skip = 0;
      for (int k = 0; k < NINSTR; k++) begin
        if (skip == 0 && k < NINSTR - 4 && $urandom_range(0, 14) == 0) begin
          // conditional forward branch over 1-3 instructions
          logic [3:0] bc = 4'($urandom_range(0, 14));
          int n = $urandom_range(1, 3);
          prog[k] = {bc, 3'b101, 1'b0, 24'(n - 1)};
          if (cond_ok(bc)) skip = n;
        end else begin
          prog[k] = rand_instr();
          if (skip > 0) skip--;                       // jumped over
          else model_step(prog[k]);
        end
        emit(prog[k]);
      end
      // Thumb part: BX to TCODE, random Thumb code, BX LR back
      begin
        logic [15:0] th;
        logic [31:0] ta;
        int unsigned ret;
        r[13] = DATA;                                                        // SP for the SP-relative transfers
        li(13, DATA);
        li(12, TCODE | 1);
        ret = pcw + 20;
        li(14, ret);
        emit(32'hE12F_FF1C);                                                 // BX R12
        pcw = TCODE;
        skip = 0;
        for (int k = 0; k < NTHUMB; k++) begin
          if (skip == 0 && k < NTHUMB - 4 && $urandom_range(0, 14) == 0) begin
            logic [3:0] bc = 4'($urandom_range(0, 13));
            int n = $urandom_range(1, 3);
            th = {4'b1101, bc, 8'(n - 1)};                                  // B<cond> forward
            if (cond_ok(bc)) skip = n;
          end else begin
            rand_thumb(th, ta);
            if (skip > 0) skip--;
            else model_step(ta);
          end
          emit16(th);
        end
        emit16(16'h4770);                                                    // BX LR
        pcw = ret;
      end
      emit({AL, 5'b00110, 1'b0, 2'b10, 4'b0001, 4'hF, 4'd0, 8'hD3});         // MSR CPSR_c,#0xD3
      li(12, DUMP);
      emit({AL, 3'b100, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 4'd12, 16'h0FFF});     // STMIA R12,{R0-R11}
      emit({AL, 5'b00010, 1'b0, 2'b00, 4'hF, 4'd0, 12'd0});                 // MRS R0,CPSR
      emit({AL, 8'b0101_1000, 4'd12, 4'd0, 12'd48});                         // STR R0,[R12,#48]
      li(0, DUMP);                                                           // R12 is banked in FIQ mode
      emit({AL, 5'b00110, 1'b0, 2'b10, 4'b0001, 4'hF, 4'd0, 8'hD1});         // MSR CPSR_c,#0xD1
      emit({AL, 8'b0101_1000, 4'd0, 4'd8, 12'd52});                          // STR R8,[R0,#52]
      emit({AL, 5'b00110, 1'b0, 2'b10, 4'b0001, 4'hF, 4'd0, 8'hD3});         // MSR CPSR_c,#0xD3
      li(0, DONE_ADDR);
      emit({AL, 8'b0011_1010, 4'd0, 4'd1, 4'd0, 8'hDE});                     // MOV R1,#0xDE
      emit({AL, 8'b0101_1000, 4'd0, 4'd1, 12'd0});                           // STR R1,[R0]
      emit({AL, 3'b101, 1'b0, 24'hFFFFFE});                                  // B .

      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      running = 1'b1;
      n_irq_run = 0; n_fiq_run = 0;
      wait_cycles = 0;
      while (mem[DONE_ADDR >> 2] != 32'hDE && wait_cycles < 40 * NINSTR + 500) begin
        @(negedge clk); wait_cycles++;
      end
      running = 1'b0;
      checks += 2;
      if (mem[(IRQ_SP >> 2) + 1] != 32'(n_irq_run)) begin
        failures++; $display("FAIL run %0d: IRQ handler count %0d, entries %0d", run, mem[(IRQ_SP >> 2) + 1], n_irq_run);
      end
      if (mem[(DUMP >> 2) + 13] != 32'(n_fiq_run)) begin
        failures++; $display("FAIL run %0d: FIQ count %0d, entries %0d", run, mem[(DUMP >> 2) + 13], n_fiq_run);
      end
      checks++;
      if (mem[DONE_ADDR >> 2] != 32'hDE) begin
        failures++; $display("FAIL run %0d: program did not finish", run);
      end
      for (int k = 0; k <= 10; k++) begin
        checks++;
        if (mem[(DUMP >> 2) + k] !== r[k]) begin
          failures++;
          $display("FAIL run %0d R%0d: got %08h expected %08h", run, k, mem[(DUMP >> 2) + k], r[k]);
        end
      end
      checks++;
      if (mem[(DUMP >> 2) + 12] !== {fn, fz, fc, fv, 28'h00000D3}) begin
        failures++;
        $display("FAIL run %0d CPSR: got %08h expected %08h", run, mem[(DUMP >> 2) + 12],
                 {fn, fz, fc, fv, 28'h00000D3});
      end
      begin
        int bad = 0;
        checks++;
        for (int k = 0; k < DWORDS; k++)
          if (mem[(DATA >> 2) + k] !== dm[k]) begin
            if (bad < 3) $display("FAIL run %0d data %08h: got %08h expected %08h", run,
                                  DATA + 4 * k, mem[(DATA >> 2) + k], dm[k]);
            bad++;
          end
        if (bad > 0) failures++;
      end
    end
    need("forwarding", n_fwd);
    need("condition fail -> NOP", n_condfail);
    need("register-specified shift", n_regshift);
    need("multiply", n_mul);
    need("fetch/decode stall", n_stall);
    need("single load", n_load);
    need("single store", n_store);
    need("block transfer", n_block);
    need("swap", n_swap);
    need("IRQ entry and return", n_irq);
    need("FIQ entry and return", n_fiq);
    need("Thumb instruction cycles", n_thumb);
    need("interrupt taken in Thumb state", n_thumb_irq);
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NRUNS * (40 * NINSTR + 600) + 100));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
