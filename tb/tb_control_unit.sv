// tb_control_unit: per-cycle control words of the multi-cycle instruction
// classes (register reads, writes, memory strobes, last-cycle flag),
// checked field by field against the expected cycle plans, including the
// word-by-word coprocessor transfers (LDC/STC).
`timescale 1ns/1ps
module tb_control_unit;
  import arm_pkg::*;
  logic [31:0] instr;
  index_e      index;
  logic [4:0]  step;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  control_unit dut (.instr, .index, .step, .ctrl);

  task automatic apply(logic [31:0] i, index_e x, int s);
    instr = i; index = x; step = 5'(s);
    @(posedge clk);
  endtask
  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    // LDR r2,[r1,#4]
    apply(32'hE591_2004, IDX_LDR, 0);
    expect_eq("LDR0 ra", ctrl.ra, 1);      expect_eq("LDR0 rd_a", ctrl.rd_a, 1);
    expect_eq("LDR0 op2", ctrl.op2, OP2_IMM12); expect_eq("LDR0 mem_rd", ctrl.mem_rd, 1);
    expect_eq("LDR0 wr", ctrl.wr_en, 0);   expect_eq("LDR0 last", ctrl.last, 0);
    apply(32'hE591_2004, IDX_LDR, 1);
    expect_eq("LDR1 wr", ctrl.wr_en, 1);   expect_eq("LDR1 wa", ctrl.wa, 2);
    expect_eq("LDR1 wsrc", ctrl.wsrc, WS_TEMP); expect_eq("LDR1 last", ctrl.last, 1);
    // LDR r2,[r1],#-4 (post-indexed: write-back, address from A)
    apply(32'hE411_2004, IDX_LDR, 0);
    expect_eq("LDRpost wr", ctrl.wr_en, 1); expect_eq("LDRpost wa", ctrl.wa, 1);
    expect_eq("LDRpost asrc", ctrl.asrc, AS_A); expect_eq("LDRpost alu", ctrl.alu_op, ALU_SUB);
    // STR r0,[r1]
    apply(32'hE581_0000, IDX_STR, 0);
    expect_eq("STR0 save_addr", ctrl.save_addr, 1); expect_eq("STR0 last", ctrl.last, 0);
    apply(32'hE581_0000, IDX_STR, 1);
    expect_eq("STR1 rb", ctrl.rb, 0);      expect_eq("STR1 mem_wr", ctrl.mem_wr, 1);
    expect_eq("STR1 asrc", ctrl.asrc, AS_REG); expect_eq("STR1 last", ctrl.last, 1);
    // LDC p5,c1,[r4,#-8]!  : first word with write-back, then word by word
    apply(32'hED34_1502, IDX_LDC, 0);
    expect_eq("LDC0 cp", ctrl.cp, 1);      expect_eq("LDC0 mem_rd", ctrl.mem_rd, 1);
    expect_eq("LDC0 ra", ctrl.ra, 4);      expect_eq("LDC0 wr", ctrl.wr_en, 1);
    expect_eq("LDC0 save_addr", ctrl.save_addr, 1); expect_eq("LDC0 last", ctrl.last, 0);
    apply(32'hED34_1502, IDX_LDC, 3);
    expect_eq("LDC3 asrc", ctrl.asrc, AS_REG); expect_eq("LDC3 step_addr", ctrl.step_addr, 1);
    expect_eq("LDC3 wr", ctrl.wr_en, 0);   expect_eq("LDC3 last", ctrl.last, 0);
    apply(32'hED34_1502, IDX_LDC, 15);
    expect_eq("LDC15 last", ctrl.last, 1);
    // LDMIA sp!,{r4,pc}
    apply(32'hE8BD_8010, IDX_LDM, 0);
    expect_eq("LDM0 ra", ctrl.ra, 13);     expect_eq("LDM0 op2", ctrl.op2, OP2_BLOCK);
    expect_eq("LDM0 wa", ctrl.wa, 13);     expect_eq("LDM0 wr", ctrl.wr_en, 1);
    expect_eq("LDM0 last", ctrl.last, 0);
    apply(32'hE8BD_8010, IDX_LDM, 1);
    expect_eq("LDM1 wa", ctrl.wa, 4);      expect_eq("LDM1 last", ctrl.last, 0);
    apply(32'hE8BD_8010, IDX_LDM, 2);
    expect_eq("LDM2 wa", ctrl.wa, 15);     expect_eq("LDM2 last", ctrl.last, 1);
    // STMDB sp!,{r1,r2,r3}
    apply(32'hE92D_000E, IDX_STM, 3);
    expect_eq("STM3 rb", ctrl.rb, 3);      expect_eq("STM3 mem_wr", ctrl.mem_wr, 1);
    expect_eq("STM3 last", ctrl.last, 1);
    // UMLAL r4,r5,r2,r3
    apply(32'hE0A5_4392, IDX_MUL, 0);
    expect_eq("MLAL0 ra", ctrl.ra, 4);     expect_eq("MLAL0 rb", ctrl.rb, 5);
    expect_eq("MLAL0 save_acc", ctrl.save_acc, 1); expect_eq("MLAL0 last", ctrl.last, 0);
    apply(32'hE0A5_4392, IDX_MUL, 1);
    expect_eq("MLAL1 ra", ctrl.ra, 2);     expect_eq("MLAL1 rb", ctrl.rb, 3);
    expect_eq("MLAL1 start", ctrl.mul_start, 1);
    apply(32'hE0A5_4392, IDX_MUL, 2);
    expect_eq("MLAL2 wait", ctrl.mul_wait, 1); expect_eq("MLAL2 wa", ctrl.wa, 4);
    expect_eq("MLAL2 last", ctrl.last, 0);
    apply(32'hE0A5_4392, IDX_MUL, 3);
    expect_eq("MLAL3 wa", ctrl.wa, 5);     expect_eq("MLAL3 wsrc", ctrl.wsrc, WS_MULHI);
    expect_eq("MLAL3 last", ctrl.last, 1);
    // MUL r1,r3,r2 : one start cycle, one write cycle
    apply(32'hE001_0293, IDX_MUL, 0);
    expect_eq("MUL0 start", ctrl.mul_start, 1); expect_eq("MUL0 ra", ctrl.ra, 3);
    apply(32'hE001_0293, IDX_MUL, 1);
    expect_eq("MUL1 wa", ctrl.wa, 1);      expect_eq("MUL1 last", ctrl.last, 1);
    // MOV r0,r0,LSL r1
    apply(32'hE1A0_0110, IDX_DP_RS, 0);
    expect_eq("RS0 rb", ctrl.rb, 1);       expect_eq("RS0 save_sh", ctrl.save_sh, 1);
    expect_eq("RS0 last", ctrl.last, 0);
    apply(32'hE1A0_0110, IDX_DP_RS, 1);
    expect_eq("RS1 sh_reg", ctrl.sh_reg, 1); expect_eq("RS1 wa", ctrl.wa, 0);
    // CMP r0,r1 : flags, no write
    apply(32'hE150_0001, IDX_DP, 0);
    expect_eq("CMP wr", ctrl.wr_en, 0);    expect_eq("CMP flags", ctrl.set_flags, 1);
    // BL
    apply(32'hEB00_0010, IDX_B, 0);
    expect_eq("BL branch", ctrl.branch, 1); expect_eq("BL wa", ctrl.wa, 14);
    expect_eq("BL ra", ctrl.ra, 15);
    // SWP r2,r1,[r0]
    apply(32'hE100_2091, IDX_SWP, 0);
    expect_eq("SWP0 rd+wr", {ctrl.mem_rd, ctrl.mem_wr}, 3); expect_eq("SWP0 last", ctrl.last, 0);
    apply(32'hE100_2091, IDX_SWP, 1);
    expect_eq("SWP1 wa", ctrl.wa, 2);
    // SWI, MCR
    apply(32'hEF00_0000, IDX_SWI, 0);
    expect_eq("SWI exc", ctrl.exc, 1);
    apply(32'hEE01_4510, IDX_MCR, 0);
    expect_eq("MCR cp", ctrl.cp, 1);       expect_eq("MCR rb", ctrl.rb, 4);
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
