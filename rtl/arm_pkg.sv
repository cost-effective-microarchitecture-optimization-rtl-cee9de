// arm_pkg: types and constants shared by the blocks of the three-stage
// ARM7TDMI-compatible core.
//
// It holds the instruction index of the decode stage (the numbering 0..18
// follows the core's index table; 19..21 are this design's additions for the
// Thumb long branch and the two interrupt pseudo-instructions), the ALU
// opcodes and shift types of the ARM instruction set, the processor modes,
// the per-cycle control word that the control unit hands to the execute
// stage, and the mapping from a logical register number and mode onto the
// 30 physical registers of the banked register file.
package arm_pkg;

  // ---------------------------------------------------------------- index
  typedef enum logic [4:0] {
    IDX_NOP    = 5'd0,   // no instruction (bubble)
    IDX_B      = 5'd1,   // B, BL
    IDX_BX     = 5'd2,   // BX
    IDX_DP     = 5'd3,   // data processing, immediate or immediate shift
    IDX_PSR    = 5'd4,   // MRS, MSR
    IDX_DP_RS  = 5'd5,   // data processing, shift by register
    IDX_LDR    = 5'd6,   // LDR, LDRB, LDRH, LDRSH, LDRSB
    IDX_STR    = 5'd7,   // STR, STRB, STRH
    IDX_MUL    = 5'd8,   // MUL, MLA, UMULL, SMULL, UMLAL, SMLAL
    IDX_LDM    = 5'd9,   // LDM
    IDX_STM    = 5'd10,  // STM
    IDX_SWP    = 5'd11,  // SWP, SWPB
    IDX_SWI    = 5'd12,  // software interrupt
    IDX_CDP    = 5'd13,  // coprocessor data operation
    IDX_LDC    = 5'd14,  // coprocessor load
    IDX_STC    = 5'd15,  // coprocessor store
    IDX_MRC    = 5'd16,  // coprocessor register to ARM register
    IDX_MCR    = 5'd17,  // ARM register to coprocessor register
    IDX_UND    = 5'd18,  // undefined instruction
    IDX_TBL    = 5'd19,  // Thumb BL, one of its two halves
    IDX_IRQ    = 5'd20,  // injected IRQ entry
    IDX_FIQ    = 5'd21   // injected FIQ entry
  } index_e;

  // ---------------------------------------------------------------- ALU
  typedef enum logic [3:0] {
    ALU_AND = 4'h0, ALU_EOR = 4'h1, ALU_SUB = 4'h2, ALU_RSB = 4'h3,
    ALU_ADD = 4'h4, ALU_ADC = 4'h5, ALU_SBC = 4'h6, ALU_RSC = 4'h7,
    ALU_TST = 4'h8, ALU_TEQ = 4'h9, ALU_CMP = 4'hA, ALU_CMN = 4'hB,
    ALU_ORR = 4'hC, ALU_MOV = 4'hD, ALU_BIC = 4'hE, ALU_MVN = 4'hF
  } alu_op_e;

  typedef enum logic [1:0] {
    SH_LSL = 2'd0, SH_LSR = 2'd1, SH_ASR = 2'd2, SH_ROR = 2'd3
  } shift_e;

  // ---------------------------------------------------------------- modes
  typedef enum logic [4:0] {
    M_USR = 5'b10000, M_FIQ = 5'b10001, M_IRQ = 5'b10010, M_SVC = 5'b10011,
    M_ABT = 5'b10111, M_UND = 5'b11011, M_SYS = 5'b11111
  } mode_e;

  typedef struct packed {
    logic       n, z, c, v;
    logic [19:0] rsvd;
    logic       i, f, t;
    logic [4:0] mode;
  } psr_t;

  // ------------------------------------------------ per-cycle control word
  typedef enum logic [2:0] {
    OP2_SHIFT,     // port B through the barrel shifter
    OP2_IMM12,     // 12-bit load/store offset
    OP2_IMM8H,     // split 8-bit halfword offset
    OP2_BRANCH,    // branch offset, words in ARM state, halfwords in Thumb
    OP2_BLOCK,     // 4 x number of registers of a block transfer
    OP2_CPOFS,     // coprocessor transfer offset, 8 bits x 4
    OP2_REGB,      // port B unshifted (halfword register offset)
    OP2_ZERO
  } op2_e;

  typedef enum logic [2:0] {
    WS_ALU, WS_MEM, WS_MULLO, WS_MULHI, WS_PSR, WS_LINK, WS_CP, WS_TEMP
  } wsrc_e;

  typedef enum logic [1:0] {
    AS_ALU,        // address = ALU result (pre-indexed)
    AS_A,          // address = port A (post-indexed, swap)
    AS_REG         // address = internal address register
  } asrc_e;

  // fetch-stage PC source
  typedef enum logic [2:0] {
    PCS_INC, PCS_BRANCH, PCS_ALU, PCS_MEM, PCS_VECTOR
  } pcsel_e;

  typedef enum logic [1:0] {
    MS_WORD = 2'd0, MS_BYTE = 2'd1, MS_HALF = 2'd2
  } msize_e;

  typedef struct packed {
    logic       rd_a;      // port A read enable
    logic [3:0] ra;        // port A logical register
    logic       rd_b;
    logic [3:0] rb;
    op2_e       op2;
    logic       sh_reg;    // shift amount from the saved Rs byte
    logic       save_sh;   // save port B[7:0] as shift amount
    logic       save_acc;  // save ports A/B as the multiply accumulator
    logic       mul_start; // start the multiplier
    logic       mul_wait;  // hold until the multiplier is done
    alu_op_e    alu_op;
    logic       set_flags;
    logic       wr_en;
    logic [3:0] wa;
    wsrc_e      wsrc;
    logic       mem_rd;
    logic       mem_wr;
    msize_e     msize;
    logic       msigned;
    asrc_e      asrc;
    logic       save_addr; // address register <= start address (block) or ALU
    logic       step_addr; // address register <= address + 4
    logic       branch;    // PC <= ALU result
    logic       bx;        // PC <= port A, T <= A[0]
    logic       pc_mem;    // when writing R15 from memory, load PC
    logic       psr_rd;    // MRS
    logic       psr_wr;    // MSR
    logic       exc;       // exception entry (SWI, UND, IRQ, FIQ)
    logic       cp;        // coprocessor handshake cycle
    logic       last;      // last execute cycle of this instruction
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{op2: OP2_ZERO, alu_op: ALU_MOV, wsrc: WS_ALU,
                                 msize: MS_WORD, asrc: AS_ALU, last: 1'b1,
                                 default: '0};

  // ---------------------------------------------------------------- banking
  // Physical map: 0..14 are R0..R14 of user/system mode, then FIQ R8..R14 at
  // 15..21, SVC R13/R14 at 22/23, ABT at 24/25, IRQ at 26/27, UND at 28/29:
  // 30 registers in all.  R15 is the program counter and lives outside.
  localparam int NPHYS = 30;

  function automatic logic [4:0] phys_reg(input logic [4:0] mode, input logic [3:0] r);
    logic [4:0] p;
    p = {1'b0, r};
    unique case (mode)
      M_FIQ: if (r >= 4'd8 && r <= 4'd14) p = 5'd15 + 5'(r - 4'd8);
      M_SVC: if (r == 4'd13 || r == 4'd14) p = 5'd22 + 5'(r - 4'd13);
      M_ABT: if (r == 4'd13 || r == 4'd14) p = 5'd24 + 5'(r - 4'd13);
      M_IRQ: if (r == 4'd13 || r == 4'd14) p = 5'd26 + 5'(r - 4'd13);
      M_UND: if (r == 4'd13 || r == 4'd14) p = 5'd28 + 5'(r - 4'd13);
      default: ;
    endcase
    return p;
  endfunction

endpackage
