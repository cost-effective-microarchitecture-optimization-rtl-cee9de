// tb_thumb_decompressor: Thumb instructions of every format against their
// ARM equivalents, encoded by hand from the two instruction sets.
`timescale 1ns/1ps
module tb_thumb_decompressor;
  logic [15:0] tin;
  logic [31:0] aout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  thumb_decompressor dut (.tin, .aout);

  typedef struct { logic [15:0] t; logic [31:0] a; string name; } vec_t;
  vec_t vecs [] = '{
    '{16'h0088, 32'hE1B0_0101, "LSL r0,r1,#2"},
    '{16'h1C4A, 32'hE291_2001, "ADD r2,r1,#1"},
    '{16'h1A8B, 32'hE051_3002, "SUB r3,r1,r2"},
    '{16'h2105, 32'hE3B0_1005, "MOV r1,#5"},
    '{16'h2A07, 32'hE352_0007, "CMP r2,#7"},
    '{16'h4240, 32'hE270_0000, "NEG r0,r0"},
    '{16'h4351, 32'hE011_0192, "MUL r1,r2"},
    '{16'h40D1, 32'hE1B0_1231, "LSR r1,r2"},
    '{16'h4291, 32'hE151_0002, "CMP r1,r2"},
    '{16'h4011, 32'hE011_1002, "AND r1,r2"},
    '{16'h4468, 32'hE080_000D, "ADD r0,sp"},
    '{16'h4770, 32'hE12F_FF1E, "BX lr"},
    '{16'h4801, 32'hE59F_0004, "LDR r0,[pc,#4]"},
    '{16'h5888, 32'hE791_0002, "LDR r0,[r1,r2]"},
    '{16'h5E88, 32'hE191_00F2, "LDRSH r0,[r1,r2]"},
    '{16'h6848, 32'hE591_0004, "LDR r0,[r1,#4]"},
    '{16'h7048, 32'hE5C1_0001, "STRB r0,[r1,#1]"},
    '{16'h8841, 32'hE1D0_10B2, "LDRH r1,[r0,#2]"},
    '{16'h9902, 32'hE59D_1008, "LDR r1,[sp,#8]"},
    '{16'hA901, 32'hE28D_1F01, "ADD r1,sp,#4"},
    '{16'hB082, 32'hE24D_DF02, "SUB sp,#8"},
    '{16'hB510, 32'hE92D_4010, "PUSH {r4,lr}"},
    '{16'hBD10, 32'hE8BD_8010, "POP {r4,pc}"},
    '{16'hC903, 32'hE8B1_0003, "LDMIA r1!,{r0,r1}"},
    '{16'hD0FE, 32'h0AFF_FFFE, "BEQ -4"},
    '{16'hDF12, 32'hEF00_0012, "SWI 0x12"},
    '{16'hE7FE, 32'hEAFF_FFFE, "B ."},
    '{16'hF7FF, 32'hFAFF_F800, "BL high half"},
    '{16'hFFFE, 32'hFB00_07FE, "BL low half"},
    '{16'hDE00, 32'hE7F0_00F0, "undefined"}
  };

  initial begin
    foreach (vecs[k]) begin
      tin = vecs[k].t;
      @(posedge clk);
      checks++;
      if (aout !== vecs[k].a) begin
        failures++;
        $display("FAIL %s (%h): %h expected %h", vecs[k].name, tin, aout, vecs[k].a);
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
