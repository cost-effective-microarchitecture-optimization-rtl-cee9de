// fetch_stage: program counter, PC incrementer and instruction latch.
//
// The PC register addresses the instruction memory.  Every cycle that the
// pipeline advances, the word read at PC is captured, with its address, into
// the fetch/decode pipeline register (the instruction latch), and PC moves on
// by 4 in ARM state or by 2 in Thumb state (T flag).  While the later stages
// are busy with a multi-cycle instruction (`stall`), PC and the latched
// instruction hold.  When the execute stage changes the flow of control,
// `pc_sel` picks the new PC from the branch / branch-exchange address, the
// ALU result, data read from memory, or an exception vector; the latched
// instruction is then marked invalid (flushed).  A PC load takes priority
// over a stall.  Redirect addresses arrive already aligned for the state
// the processor is entering.
//
// Interface: `imem_addr` is combinational from PC; `imem_rdata` must be the
// 32-bit word at that (word-aligned) address in the same cycle.  In Thumb
// state the decode stage picks the halfword using address bit 1.  Reset
// clears PC to 0 (the reset vector).
module fetch_stage
  import arm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        thumb,        // T flag: 2-byte instructions
  input  logic        stall,        // hold PC and latch
  input  pcsel_e      pc_sel,       // PC source, PCS_INC when not redirecting
  input  logic [31:0] branch_addr,
  input  logic [31:0] alu_result,
  input  logic [31:0] mem_data,
  input  logic [31:0] vector_addr,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] fd_instr,     // latched instruction word
  output logic [31:0] fd_addr,      // its address
  output logic        fd_valid,
  output logic [31:0] pc
);
  logic [31:0] pc_inc, pc_target;

  assign pc_inc    = pc + (thumb ? 32'd2 : 32'd4);
  assign imem_addr = pc;

  always_comb begin
    unique case (pc_sel)
      PCS_BRANCH: pc_target = branch_addr;
      PCS_ALU:    pc_target = alu_result;
      PCS_MEM:    pc_target = mem_data;
      PCS_VECTOR: pc_target = vector_addr;
      default:    pc_target = pc_inc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      fd_instr <= '0;
      fd_addr  <= '0;
      fd_valid <= 1'b0;
    end else if (pc_sel != PCS_INC) begin
      pc       <= pc_target;
      fd_valid <= 1'b0;
    end else if (!stall) begin
      pc       <= pc_inc;
      fd_instr <= imem_rdata;
      fd_addr  <= pc;
      fd_valid <= 1'b1;
    end
  end
endmodule
