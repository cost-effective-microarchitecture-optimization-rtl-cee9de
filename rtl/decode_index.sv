// decode_index: first half of instruction decoding, in the decode stage.
//
// Classifies an ARM instruction (a Thumb instruction arrives already
// translated) into one of the action types of the index table, and raises
// nCPI low for the five coprocessor classes.  The index, not the full
// decode, travels on to the control unit, which turns it and the
// instruction fields into per-cycle datapath controls.  Index 4 (PSR
// transfer) has no number printed in the core's table and is the free slot
// between 3 and 5.  The two halves of the Thumb long branch (ARM condition
// 1111, bits 27:25 = 101) get index 19 in Thumb state; in ARM state that
// encoding never executes and is classed as a NOP.  Combinational.
module decode_index
  import arm_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        thumb,
  output index_e      index,
  output logic        ncpi      // low: coprocessor instruction
);
  always_comb begin
    index = IDX_UND;
    unique casez (instr[27:20])
      8'b101?_????: index = (instr[31:28] == 4'hF) ? (thumb ? IDX_TBL : IDX_NOP) : IDX_B;
      8'b100?_???1: index = IDX_LDM;
      8'b100?_???0: index = IDX_STM;
      8'b110?_???1: index = IDX_LDC;
      8'b110?_???0: index = IDX_STC;
      8'b1110_????: index = !instr[4] ? IDX_CDP : (instr[20] ? IDX_MRC : IDX_MCR);
      8'b1111_????: index = IDX_SWI;
      8'b011?_????: index = instr[4] ? IDX_UND : (instr[20] ? IDX_LDR : IDX_STR);
      8'b010?_????: index = instr[20] ? IDX_LDR : IDX_STR;
      8'b00??_????: begin
        if (instr[27:4] == 24'h12FFF1)
          index = IDX_BX;
        else if (instr[27:23] == 5'b00000 && instr[7:4] == 4'b1001)
          index = IDX_MUL;                                   // MUL, MLA
        else if (instr[27:23] == 5'b00001 && instr[7:4] == 4'b1001)
          index = IDX_MUL;                                   // long multiplies
        else if (instr[27:23] == 5'b00010 && instr[21:20] == 2'b00 && instr[11:4] == 8'h09)
          index = IDX_SWP;
        else if (!instr[25] && instr[7] && instr[4]) begin   // halfword transfers
          if (instr[6:5] == 2'b00)   index = IDX_UND;
          else if (instr[20])        index = IDX_LDR;
          else if (instr[6:5] == 2'b01) index = IDX_STR;
          else                       index = IDX_UND;        // signed stores
        end
        else if (instr[24:23] == 2'b10 && !instr[20])
          index = IDX_PSR;                                   // MRS, MSR
        else if (!instr[25] && instr[4])
          index = IDX_DP_RS;
        else
          index = IDX_DP;
      end
      default: ;
    endcase
    ncpi = !(index inside {IDX_CDP, IDX_LDC, IDX_STC, IDX_MRC, IDX_MCR});
  end
endmodule
