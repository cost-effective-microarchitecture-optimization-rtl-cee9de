// condition_unit: decides whether an ARM instruction executes.
//
// Every ARM instruction carries a 4-bit condition field (bits 31:28) that is
// tested against the N, Z, C and V flags of the CPSR.  The fifteen defined
// conditions EQ..AL follow the standard ARM table; the sixteenth code (1111)
// is reserved and is treated here as "never".  Purely combinational: the
// core evaluates it in the execute stage, after the control unit, and uses
// `pass` to select between the decoded control word and a NOP control word.
module condition_unit (
  input  logic [3:0] cond,   // instruction bits 31:28
  input  logic       n, z, c, v,
  output logic       pass
);
  always_comb begin
    unique case (cond)
      4'h0: pass = z;                    // EQ
      4'h1: pass = !z;                   // NE
      4'h2: pass = c;                    // CS
      4'h3: pass = !c;                   // CC
      4'h4: pass = n;                    // MI
      4'h5: pass = !n;                   // PL
      4'h6: pass = v;                    // VS
      4'h7: pass = !v;                   // VC
      4'h8: pass = c && !z;              // HI
      4'h9: pass = !c || z;              // LS
      4'hA: pass = (n == v);             // GE
      4'hB: pass = (n != v);             // LT
      4'hC: pass = !z && (n == v);       // GT
      4'hD: pass = z || (n != v);        // LE
      4'hE: pass = 1'b1;                 // AL
      default: pass = 1'b0;              // reserved
    endcase
  end
endmodule
