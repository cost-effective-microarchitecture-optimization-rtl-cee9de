// psr_unit: the current program status register (CPSR) and the five saved
// program status registers (SPSR_fiq, _svc, _abt, _irq, _und).
//
// The CPSR holds the N, Z, C, V condition flags, the I and F interrupt
// disables, the T (Thumb) state bit and the 5-bit mode.  Three kinds of
// update arrive from the execute stage, all on the rising clock edge:
//   * flags_we   - N/Z/C/V from the ALU or multiplier,
//   * cpsr_we    - a new CPSR under a byte mask (MSR, exception entry,
//                  return from exception); control bits are only written
//                  in a privileged mode unless `force_priv` is set,
//   * spsr_we    - the SPSR of `spsr_mode` under a byte mask.
// `cpsr_we` has priority over `flags_we`.  Reset enters supervisor mode
// with IRQ and FIQ disabled in ARM state, as the ARM7TDMI does.
// `spsr` reads the SPSR of the current mode (the CPSR in user and system
// mode, which have none).
module psr_unit
  import arm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flags_we,
  input  logic [3:0]  flags_in,     // N Z C V
  input  logic        cpsr_we,
  input  logic [3:0]  cpsr_mask,    // byte enables: [3] flags .. [0] control
  input  logic [31:0] cpsr_in,
  input  logic        force_priv,   // exception entry: write control bits
  input  logic        spsr_we,
  input  logic [3:0]  spsr_mask,
  input  logic [4:0]  spsr_mode,
  input  logic [31:0] spsr_in,
  output psr_t        cpsr,
  output logic [31:0] spsr
);
  logic [31:0] spsr_q [5];
  logic [31:0] cpsr_new;
  logic        priv;

  function automatic int spsr_idx(input logic [4:0] m);
    unique case (m)
      M_FIQ:   return 0;
      M_SVC:   return 1;
      M_ABT:   return 2;
      M_IRQ:   return 3;
      M_UND:   return 4;
      default: return 5;
    endcase
  endfunction

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] mask);
    logic [31:0] r;
    for (int k = 0; k < 4; k++) r[8*k +: 8] = mask[k] ? nw[8*k +: 8] : old[8*k +: 8];
    return r;
  endfunction

  assign priv = (cpsr.mode != M_USR);

  always_comb begin
    cpsr_new = merge(cpsr, cpsr_in, {cpsr_mask[3:1], cpsr_mask[0] && (priv || force_priv)});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpsr <= '{mode: M_SVC, i: 1'b1, f: 1'b1, default: '0};
      for (int k = 0; k < 5; k++) spsr_q[k] <= 32'h0000_00D3;
    end else begin
      if (cpsr_we)       cpsr <= psr_t'(cpsr_new);
      else if (flags_we) {cpsr.n, cpsr.z, cpsr.c, cpsr.v} <= flags_in;
      if (spsr_we && spsr_idx(spsr_mode) < 5)
        spsr_q[spsr_idx(spsr_mode)] <= merge(spsr_q[spsr_idx(spsr_mode)], spsr_in, spsr_mask);
    end
  end

  always_comb begin
    spsr = (spsr_idx(cpsr.mode) < 5) ? spsr_q[spsr_idx(cpsr.mode)] : 32'(cpsr);
  end
endmodule
