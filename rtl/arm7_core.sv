// arm7_core: three-stage (fetch, decode, execute) ARM7TDMI-compatible
// integer core, in the re-pipelined form where the register file and the
// control unit sit in the decode stage.
//
// Fetch.  fetch_stage holds PC, steps it by 4 (ARM) or 2 (Thumb) and latches
// the fetched word.  Decode.  In Thumb state the halfword chosen by address
// bit 1 (inverted for big-endian) is translated to ARM by
// thumb_decompressor; decode_index classifies the ARM instruction into an
// index; control_unit expands index + fields + cycle number into a control
// word; the two register-file read ports fetch the operands it names, and
// forwarding_unit substitutes the value the execute stage is writing in the
// same cycle.  Control word and operands are registered into the
// decode/execute pipeline register.  Execute.  condition_unit tests the
// condition field against the CPSR flags; on failure a NOP control word is
// used instead (the condition is decided after the control decode, not
// before).  The barrel shifter, ALU, booth_multiplier, data memory port,
// psr_unit and coprocessor handshake then do the cycle's work, and the
// single register write port and the PC redirect close the loop.
//
// Multi-cycle instructions: while the instruction in execute has further
// cycles, the control unit decodes that instruction again with the next
// cycle number (so operands for cycle k+1 are read during cycle k) and the
// fetch and decode stages stall; only in its last cycle does the control
// unit take the instruction waiting in decode.  Execute cycles that wait for
// the multiplier or for a busy coprocessor hold everything.  A write to the
// PC flushes the fetch and decode stages, so a taken branch costs two
// cycles after its own.
//
// Reading R15 gives the instruction's address + 8 in ARM state and + 4 in
// Thumb state (with bit 1 cleared), as the three-stage pipeline would.
//
// Interrupts: an IRQ or FIQ request (level, active high, masked by the I and
// F bits) is taken at an instruction boundary by replacing the instruction
// entering execute with an exception-entry pseudo-instruction; LR gets that
// instruction's address + 4 (return with SUBS PC, LR, #4).  SWI, undefined
// instructions and coprocessor instructions that no coprocessor accepts
// (CPA high) enter their exception modes in one cycle.
//
// Memory ports: instruction port read combinationally at imem_addr; data
// port with combinational read data and a write taken on the rising edge,
// byte enables for byte and halfword stores (little-endian lanes).
// Coprocessor port: nCPI low while a coprocessor instruction is in execute,
// CPA high = absent (sampled in the first cycle), CPB high = busy (wait),
// cp_dout carries MCR data and LDC memory data, cp_din MRC data and STC data.
// LDC/STC move one word per cycle at consecutive addresses; the coprocessor
// raises CPLAST with the word it wants to be the last (16 at most).
module arm7_core
  import arm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bigend,       // Thumb halfword order of the fetched word
  input  logic        irq,
  input  logic        fiq,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] dmem_addr,
  output logic        dmem_rd,
  output logic        dmem_wr,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  output logic        ncpi,
  input  logic        cpa,
  input  logic        cpb,
  input  logic        cplast,       // LDC/STC: this word is the last
  output logic [31:0] cp_instr,
  output logic [31:0] cp_dout,
  input  logic [31:0] cp_din,
  output psr_t        cpsr_o
);
  // ---------------------------------------------------------------- state
  psr_t        cpsr;
  logic [31:0] spsr;

  // decode/execute pipeline register
  logic        ex_valid;
  logic [31:0] ex_instr, ex_addr, ex_a, ex_b;
  index_e      ex_index;
  logic [4:0]  ex_step;
  ctrl_t       ex_ctrl;
  logic        ex_ncpi;

  // execute-stage internal registers
  logic [7:0]  sh_amt_q;
  logic [31:0] addr_q, temp_q, acc_lo_q, acc_hi_q;

  // ---------------------------------------------------------------- fetch
  pcsel_e      pc_sel;
  logic [31:0] br_addr, vec_addr, alu_pc, mem_pc;
  logic        fetch_stall;
  logic [31:0] fd_instr, fd_addr, pc;
  logic        fd_valid;

  fetch_stage u_fetch (
    .clk, .rst_n, .thumb(cpsr.t), .stall(fetch_stall), .pc_sel,
    .branch_addr(br_addr), .alu_result(alu_pc), .mem_data(mem_pc),
    .vector_addr(vec_addr), .imem_addr, .imem_rdata,
    .fd_instr, .fd_addr, .fd_valid, .pc
  );

  // ---------------------------------------------------------------- decode
  logic [15:0] t_half;
  logic [31:0] t_arm, d_instr;
  index_e      d_index_raw, d_index;
  logic        d_ncpi;
  logic        take_irq, take_fiq;

  assign t_half  = (fd_addr[1] ^ bigend) ? fd_instr[31:16] : fd_instr[15:0];
  thumb_decompressor u_decomp (.tin(t_half), .aout(t_arm));
  assign d_instr = cpsr.t ? t_arm : fd_instr;
  decode_index u_index (.instr(d_instr), .thumb(cpsr.t), .index(d_index_raw), .ncpi(d_ncpi));

  assign take_fiq = fiq && !cpsr.f;
  assign take_irq = irq && !cpsr.i;
  always_comb begin
    if (!fd_valid)     d_index = IDX_NOP;
    else if (take_fiq) d_index = IDX_FIQ;
    else if (take_irq) d_index = IDX_IRQ;
    else               d_index = d_index_raw;
  end

  // execute-stage status used by the Mealy control
  logic        ex_hold, ex_cont, flush;

  logic [31:0] cu_instr, cu_addr;
  index_e      cu_index;
  logic [4:0]  cu_step;
  ctrl_t       cu_ctrl;

  assign cu_instr = ex_cont ? ex_instr : d_instr;
  assign cu_index = ex_cont ? ex_index : d_index;
  assign cu_step  = ex_cont ? ex_step + 5'd1 : 5'd0;
  assign cu_addr  = ex_cont ? ex_addr : fd_addr;

  control_unit u_ctrl (.instr(cu_instr), .index(cu_index), .step(cu_step), .ctrl(cu_ctrl));

  // register file read (physical numbers) with forwarding
  logic [4:0]  rf_ra, rf_rb, rf_wa;
  logic [31:0] rf_da, rf_db, fw_a, fw_b, rd_a_val, rd_b_val, pc_read;
  logic        pc_word;
  logic        rf_we, fwd_a, fwd_b;
  logic [31:0] wdata;

  assign rf_ra = phys_reg(cpsr.mode, cu_ctrl.ra);
  assign rf_rb = phys_reg(cpsr.mode, cu_ctrl.rb);

  register_file #(.NREGS(NPHYS)) u_rf (
    .clk, .ra(rf_ra), .rda(rf_da), .rb(rf_rb), .rdb(rf_db),
    .we(rf_we), .wa(rf_wa), .wd(wdata)
  );

  forwarding_unit #(.AW(5)) u_fwd (
    .ra(rf_ra), .rb(rf_rb), .rf_a(rf_da), .rf_b(rf_db),
    .we(rf_we), .wa(rf_wa), .wd(wdata), .a(fw_a), .b(fw_b), .fwd_a, .fwd_b
  );

  // In Thumb state bit 1 of the PC is cleared only for the PC-relative load
  // and ADD Rd,PC,#imm (translated to a load/store or an immediate data
  // operation); branches and the hi-register operations see address + 4.
  assign pc_word  = cu_instr[27:26] == 2'b01 || cu_instr[27:25] == 3'b001;
  assign pc_read  = !cpsr.t ? cu_addr + 32'd8
                  : pc_word  ? ((cu_addr + 32'd4) & 32'hFFFF_FFFD) : cu_addr + 32'd4;
  assign rd_a_val = (cu_ctrl.ra == 4'd15) ? pc_read : fw_a;
  assign rd_b_val = (cu_ctrl.rb == 4'd15) ? pc_read : fw_b;

  // ---------------------------------------------------------------- execute
  logic  cond_ok, pass;
  ctrl_t c;

  condition_unit u_cond (.cond(ex_instr[31:28]), .n(cpsr.n), .z(cpsr.z), .c(cpsr.c),
                         .v(cpsr.v), .pass(cond_ok));

  assign pass = ex_valid && (ex_step != 5'd0 || cond_ok ||
                             ex_index inside {IDX_TBL, IDX_IRQ, IDX_FIQ});
  assign c    = pass ? ex_ctrl : CTRL_NOP;          // NOP control on failure

  // multiplier
  logic        mul_done, mul_busy;
  logic [63:0] mul_res, mul_acc;
  logic [2:0]  mul_cycles;
  logic        mul_long;

  assign mul_long = ex_instr[23];
  always_comb begin
    if (!ex_instr[21])  mul_acc = '0;
    else if (mul_long)  mul_acc = {acc_hi_q, acc_lo_q};
    else                mul_acc = {32'd0, acc_lo_q};
  end

  booth_multiplier u_mul (
    .clk, .rst_n, .start(c.mul_start), .a(ex_a), .b(ex_b), .acc(mul_acc),
    .is_signed(mul_long ? ex_instr[22] : 1'b1),
    .busy(mul_busy), .done(mul_done), .result(mul_res), .booth_cycles(mul_cycles)
  );

  // coprocessor handshake
  logic cp_absent, cp_xfer, c_last;
  assign cp_xfer = c.cp && (ex_index == IDX_LDC || ex_index == IDX_STC);
  assign cp_absent = c.cp && cpa && ex_step == 5'd0;
  assign c_last    = c.last || (cp_xfer && cplast);
  assign ex_hold   = (c.mul_wait && !mul_done) || (c.cp && !cpa && cpb);
  assign ex_cont   = ex_valid && pass && !ex_hold && !c_last && !cp_absent && !c.exc;

  // operand 2
  logic        imm_dp;
  logic [31:0] sh_out, op2;
  logic        sh_cout;
  logic [4:0]  nregs;

  assign imm_dp = ex_instr[25] && (ex_index inside {IDX_DP, IDX_PSR});

  barrel_shifter u_shift (
    .din(imm_dp ? {24'd0, ex_instr[7:0]} : ex_b),
    .stype(imm_dp ? SH_ROR : shift_e'(ex_instr[6:5])),
    .amount(imm_dp ? {3'd0, ex_instr[11:8], 1'b0} : (c.sh_reg ? sh_amt_q : {3'd0, ex_instr[11:7]})),
    .imm_form(!imm_dp && !c.sh_reg),
    .cin(cpsr.c), .dout(sh_out), .cout(sh_cout)
  );

  always_comb begin
    nregs = '0;
    for (int r = 0; r < 16; r++) nregs = nregs + {4'd0, ex_instr[r]};
    unique case (c.op2)
      OP2_SHIFT:  op2 = sh_out;
      OP2_IMM12:  op2 = {20'd0, ex_instr[11:0]};
      OP2_IMM8H:  op2 = {24'd0, ex_instr[11:8], ex_instr[3:0]};
      OP2_BRANCH: op2 = cpsr.t ? {{7{ex_instr[23]}}, ex_instr[23:0], 1'b0}
                               : {{6{ex_instr[23]}}, ex_instr[23:0], 2'b00};
      OP2_BLOCK:  op2 = {25'd0, nregs, 2'b00};
      OP2_CPOFS:  op2 = {22'd0, ex_instr[7:0], 2'b00};
      OP2_REGB:   op2 = ex_b;
      default:    op2 = '0;
    endcase
  end

  // ALU
  logic [31:0] alu_y;
  logic        alu_n, alu_z, alu_c, alu_v, alu_wr;

  alu u_alu (
    .op(c.alu_op), .a(ex_a), .b(op2), .cin(cpsr.c), .vin(cpsr.v),
    .shift_cout(sh_cout), .y(alu_y), .n(alu_n), .z(alu_z), .c(alu_c), .v(alu_v),
    .wr_result(alu_wr)
  );

  // data memory
  logic [31:0] mem_addr, st_data, ld_rot, ld_fmt;
  logic        mem_fire;
  logic        is_block;

  assign is_block = ex_index inside {IDX_LDM, IDX_STM};
  always_comb begin
    unique case (c.asrc)
      AS_A:    mem_addr = ex_a;
      AS_REG:  mem_addr = addr_q;
      default: mem_addr = alu_y;
    endcase
  end

  assign mem_fire   = !ex_hold && !cp_absent;
  assign dmem_addr  = mem_addr;
  assign dmem_rd    = c.mem_rd && mem_fire;
  assign dmem_wr    = c.mem_wr && mem_fire;
  assign st_data    = (ex_index == IDX_STC) ? cp_din : ex_b;

  always_comb begin
    unique case (c.msize)
      MS_BYTE: begin dmem_wdata = {4{st_data[7:0]}};  dmem_be = 4'b0001 << mem_addr[1:0]; end
      MS_HALF: begin dmem_wdata = {2{st_data[15:0]}}; dmem_be = mem_addr[1] ? 4'b1100 : 4'b0011; end
      default: begin dmem_wdata = st_data;            dmem_be = 4'b1111; end
    endcase
    ld_rot = (dmem_rdata >> {mem_addr[1:0], 3'b000}) | (dmem_rdata << (6'd32 - {1'b0, mem_addr[1:0], 3'b000}));
    unique case (c.msize)
      MS_BYTE: ld_fmt = {{24{c.msigned & ld_rot[7]}}, ld_rot[7:0]};
      MS_HALF: ld_fmt = {{16{c.msigned & ld_rot[15]}}, ld_rot[15:0]};
      default: ld_fmt = ld_rot;
    endcase
  end

  // write-back source
  logic [31:0] link;
  assign link = cpsr.t ? ((ex_addr + 32'd2) | 32'd1) : ex_addr + 32'd4;

  // exceptions
  logic        exc_take;
  logic [4:0]  exc_mode;
  logic [31:0] exc_lr;
  assign exc_take = pass && !ex_hold && (c.exc || cp_absent);
  always_comb begin
    exc_lr = ex_addr + (cpsr.t ? 32'd2 : 32'd4);
    unique case (ex_index)
      IDX_SWI: begin exc_mode = M_SVC; vec_addr = 32'h08; end
      IDX_IRQ: begin exc_mode = M_IRQ; vec_addr = 32'h18; exc_lr = ex_addr + 32'd4; end
      IDX_FIQ: begin exc_mode = M_FIQ; vec_addr = 32'h1C; exc_lr = ex_addr + 32'd4; end
      default: begin exc_mode = M_UND; vec_addr = 32'h04; end
    endcase
  end

  logic do_wr, pc_wr, dp_restore, msr_ctrl;
  always_comb begin
    unique case (c.wsrc)
      WS_MEM:   wdata = ld_fmt;
      WS_MULLO: wdata = mul_res[31:0];
      WS_MULHI: wdata = mul_res[63:32];
      WS_PSR:   wdata = ex_instr[22] ? spsr : 32'(cpsr);
      WS_LINK:  wdata = link;
      WS_CP:    wdata = cp_din;
      WS_TEMP:  wdata = temp_q;
      default:  wdata = alu_y;
    endcase
    if (exc_take) wdata = exc_lr;
  end

  assign do_wr      = c.wr_en && !ex_hold && !cp_absent && !(c.wsrc == WS_ALU && !alu_wr);
  assign pc_wr      = do_wr && c.wa == 4'd15 && ex_index != IDX_MRC;
  assign dp_restore = pc_wr && c.set_flags && (ex_index inside {IDX_DP, IDX_DP_RS});
  assign rf_we      = exc_take || (do_wr && c.wa != 4'd15);
  assign rf_wa      = exc_take ? phys_reg(exc_mode, 4'd14) : phys_reg(cpsr.mode, c.wa);
  assign msr_ctrl   = c.psr_wr && !ex_instr[22] && ex_instr[16] && cpsr.mode != M_USR;

  // PC redirect
  logic        t_next;
  logic [31:0] pc_align;
  assign t_next   = dp_restore ? spsr[5] : cpsr.t;
  assign pc_align = t_next ? 32'hFFFF_FFFE : 32'hFFFF_FFFC;
  assign alu_pc   = (c.branch ? alu_y : wdata) & pc_align;
  assign mem_pc   = wdata & pc_align;

  always_comb begin
    pc_sel  = PCS_INC;
    br_addr = ex_addr + (cpsr.t ? 32'd2 : 32'd4);    // refetch after MSR
    if (exc_take)                      pc_sel = PCS_VECTOR;
    else if (c.branch && !ex_hold)     pc_sel = PCS_ALU;
    else if (c.bx)                     begin pc_sel = PCS_BRANCH; br_addr = ex_a & 32'hFFFF_FFFE; end
    else if (pc_wr)                    pc_sel = (c.wsrc inside {WS_MEM, WS_TEMP}) ? PCS_MEM : PCS_ALU;
    else if (msr_ctrl)                 pc_sel = PCS_BRANCH;
    if (c.bx && !ex_a[0]) br_addr = ex_a & 32'hFFFF_FFFC;
  end
  assign flush       = (pc_sel != PCS_INC);
  assign fetch_stall = ex_hold || ex_cont;

  // PSR updates
  logic        flags_we, cpsr_we, spsr_we, force_priv;
  logic [3:0]  flags_in, cpsr_mask, spsr_mask;
  logic [31:0] cpsr_in, spsr_in;
  logic [4:0]  spsr_mode;
  always_comb begin
    flags_we = 1'b0; flags_in = {alu_n, alu_z, alu_c, alu_v};
    cpsr_we = 1'b0; cpsr_mask = '0; cpsr_in = 32'(cpsr); force_priv = 1'b0;
    spsr_we = 1'b0; spsr_mask = '0; spsr_in = 32'(cpsr); spsr_mode = cpsr.mode;
    if (exc_take) begin
      cpsr_we = 1'b1; cpsr_mask = 4'b0001; force_priv = 1'b1;
      cpsr_in[7:0] = {1'b1, cpsr.f || (ex_index == IDX_FIQ), 1'b0, exc_mode};
      spsr_we = 1'b1; spsr_mask = 4'b1111; spsr_mode = exc_mode;
    end else if (c.bx) begin
      cpsr_we = 1'b1; cpsr_mask = 4'b0001; force_priv = 1'b1;
      cpsr_in[5] = ex_a[0];
    end else if (dp_restore) begin
      cpsr_we = 1'b1; cpsr_mask = 4'b1111; cpsr_in = spsr;
    end else if (c.psr_wr) begin
      if (ex_instr[22]) begin spsr_we = 1'b1; spsr_mask = ex_instr[19:16]; spsr_in = op2; end
      else begin cpsr_we = 1'b1; cpsr_mask = ex_instr[19:16]; cpsr_in = op2; end
    end else if (c.set_flags && !ex_hold) begin
      flags_we = 1'b1;
      if (c.wsrc == WS_MULLO)
        flags_in = mul_long ? {mul_res[63], mul_res == 64'd0, cpsr.c, cpsr.v}
                            : {mul_res[31], mul_res[31:0] == 32'd0, cpsr.c, cpsr.v};
    end else if (ex_index == IDX_MRC && c.wr_en && c.wa == 4'd15 && !ex_hold && !cp_absent) begin
      flags_we = 1'b1; flags_in = cp_din[31:28];
    end
  end

  psr_unit u_psr (
    .clk, .rst_n, .flags_we, .flags_in, .cpsr_we, .cpsr_mask, .cpsr_in, .force_priv,
    .spsr_we, .spsr_mask, .spsr_mode, .spsr_in, .cpsr, .spsr
  );

  // coprocessor port
  assign ncpi     = !(ex_valid && pass && c.cp) || ex_ncpi;
  assign cp_instr = ex_instr;
  assign cp_dout  = (ex_index == IDX_LDC) ? ld_rot : ex_b;
  assign cpsr_o   = cpsr;

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex_instr <= '0; ex_addr <= '0; ex_a <= '0; ex_b <= '0;
      ex_index <= IDX_NOP; ex_step <= '0; ex_ctrl <= CTRL_NOP; ex_ncpi <= 1'b1;
      sh_amt_q <= '0; addr_q <= '0; temp_q <= '0; acc_lo_q <= '0; acc_hi_q <= '0;
    end else begin
      // execute-stage internal registers
      if (c.save_sh) sh_amt_q <= ex_b[7:0];
      if (c.save_acc) begin acc_lo_q <= ex_a; acc_hi_q <= ex_b; end
      if (c.mem_rd && mem_fire) temp_q <= ld_fmt;
      if (c.save_addr) begin
        if (is_block)
          addr_q <= ex_instr[23] ? ex_a + (ex_instr[24] ? 32'd4 : 32'd0)
                                 : alu_y + (ex_instr[24] ? 32'd0 : 32'd4);
        else if (cp_xfer)
          addr_q <= mem_addr + 32'd4;
        else
          addr_q <= mem_addr;
      end else if (c.step_addr && mem_fire) addr_q <= addr_q + 32'd4;

      // decode/execute pipeline register
      if (ex_hold) begin
        // hold everything
      end else if (ex_cont) begin
        ex_step <= ex_step + 5'd1;
        ex_ctrl <= cu_ctrl;
        ex_a    <= rd_a_val;
        ex_b    <= rd_b_val;
      end else if (flush || d_index == IDX_NOP) begin
        ex_valid <= 1'b0;
        ex_index <= IDX_NOP;
        ex_ctrl  <= CTRL_NOP;
        ex_step  <= '0;
      end else begin
        ex_valid <= 1'b1;
        ex_instr <= d_instr;
        ex_addr  <= fd_addr;
        ex_index <= d_index;
        ex_ncpi  <= d_ncpi;
        ex_step  <= '0;
        ex_ctrl  <= cu_ctrl;
        ex_a     <= rd_a_val;
        ex_b     <= rd_b_val;
      end
    end
  end

  // the decode/execute register never holds a continuing NOP
  a_nop_single: assert property (@(posedge clk) disable iff (!rst_n)
                                 ex_cont |-> ex_index != IDX_NOP);
endmodule
