// tb_decode_index: one instruction of every class against the index table
// and the nCPI rule.
`timescale 1ns/1ps
module tb_decode_index;
  import arm_pkg::*;
  logic [31:0] instr;
  logic        thumb, ncpi;
  index_e      index;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  decode_index dut (.instr, .thumb, .index, .ncpi);

  typedef struct { logic [31:0] i; logic t; int idx; string name; } vec_t;
  vec_t vecs [] = '{
    '{32'hE081_2003, 0, 3,  "ADD"},
    '{32'hE3A0_0005, 0, 3,  "MOV imm"},
    '{32'hE1A0_0110, 0, 5,  "MOV r0,r0,LSL r1"},
    '{32'hE12F_FF1E, 0, 2,  "BX"},
    '{32'hEB00_0000, 0, 1,  "BL"},
    '{32'h0A00_0000, 0, 1,  "BEQ"},
    '{32'hE10F_0000, 0, 4,  "MRS"},
    '{32'hE129_F000, 0, 4,  "MSR"},
    '{32'hE591_0000, 0, 6,  "LDR"},
    '{32'hE581_0000, 0, 7,  "STR"},
    '{32'hE1D0_10B2, 0, 6,  "LDRH"},
    '{32'hE1D0_10D2, 0, 6,  "LDRSB"},
    '{32'hE1C0_10B2, 0, 7,  "STRH"},
    '{32'hE001_0293, 0, 8,  "MUL"},
    '{32'hE0A5_4392, 0, 8,  "UMLAL"},
    '{32'hE8BD_8010, 0, 9,  "LDM"},
    '{32'hE92D_4010, 0, 10, "STM"},
    '{32'hE102_0091, 0, 11, "SWP"},
    '{32'hEF00_0000, 0, 12, "SWI"},
    '{32'hEE01_0203, 0, 13, "CDP"},
    '{32'hED91_0100, 0, 14, "LDC"},
    '{32'hED81_0100, 0, 15, "STC"},
    '{32'hEE11_0510, 0, 16, "MRC"},
    '{32'hEE01_0510, 0, 17, "MCR"},
    '{32'hE7F0_00F0, 0, 18, "undefined"},
    '{32'hFAFF_F800, 1, 19, "Thumb BL half"},
    '{32'hFAFF_F800, 0, 0,  "NV branch in ARM state"}
  };

  initial begin
    foreach (vecs[k]) begin
      instr = vecs[k].i; thumb = vecs[k].t;
      @(posedge clk);
      checks += 2;
      if (int'(index) != vecs[k].idx) begin
        failures++;
        $display("FAIL %s: index %0d expected %0d", vecs[k].name, index, vecs[k].idx);
      end
      if (ncpi !== !(vecs[k].idx inside {[13:17]})) begin
        failures++;
        $display("FAIL %s: nCPI %b", vecs[k].name, ncpi);
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
