// tb_psr_unit: reset state, flag updates, masked CPSR writes, the user-mode
// protection of the control byte, forced (exception) writes, and the
// per-mode SPSRs, then 3000 cycles of random simultaneous updates checked
// against a model.
`timescale 1ns/1ps
module tb_psr_unit;
  import arm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        flags_we, cpsr_we, spsr_we, force_priv;
  logic [3:0]  flags_in, cpsr_mask, spsr_mask;
  logic [31:0] cpsr_in, spsr_in, spsr;
  logic [4:0]  spsr_mode;
  psr_t        cpsr;
  int checks = 0, failures = 0;

  psr_unit dut (.clk, .rst_n, .flags_we, .flags_in, .cpsr_we, .cpsr_mask, .cpsr_in, .force_priv,
                .spsr_we, .spsr_mask, .spsr_mode, .spsr_in, .cpsr, .spsr);

  task automatic idle();
    flags_we = 0; cpsr_we = 0; spsr_we = 0; force_priv = 0;
    flags_in = 0; cpsr_mask = 0; spsr_mask = 0; cpsr_in = 0; spsr_in = 0; spsr_mode = 0;
  endtask
  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  // random updates against a model of the CPSR and the five SPSRs
  function automatic int sidx(logic [4:0] m);
    case (m)
      M_FIQ: return 0;  M_SVC: return 1;  M_ABT: return 2;
      M_IRQ: return 3;  M_UND: return 4;  default: return 5;
    endcase
  endfunction
  function automatic logic [31:0] mrg(logic [31:0] o, logic [31:0] n, logic [3:0] m);
    for (int k = 0; k < 4; k++) if (m[k]) o[8*k +: 8] = n[8*k +: 8];
    return o;
  endfunction
  task automatic random_phase();
    logic [4:0]  modes [7] = '{M_USR, M_FIQ, M_IRQ, M_SVC, M_ABT, M_UND, M_SYS};
    logic [31:0] mc, ms [5];
    logic [3:0]  m;
    mc = 32'(cpsr);
    for (int k = 0; k < 5; k++) begin
      spsr_we = 1; spsr_mask = 4'hF; spsr_mode = modes[k + 1]; spsr_in = $urandom;
      ms[sidx(spsr_mode)] = spsr_in;
      @(negedge clk);
    end
    idle();
    for (int t = 0; t < 3000; t++) begin
      flags_we = 1'($urandom); flags_in = 4'($urandom);
      cpsr_we = ($urandom_range(0, 3) == 0); cpsr_mask = 4'($urandom);
      force_priv = ($urandom_range(0, 3) == 0);
      cpsr_in = {$urandom} & 32'hFFFF_FFE0 | 32'(modes[$urandom_range(0, 6)]);
      spsr_we = 1'($urandom); spsr_mask = 4'($urandom); spsr_mode = modes[$urandom_range(0, 6)];
      spsr_in = $urandom;
      // model
      if (sidx(spsr_mode) < 5 && spsr_we) ms[sidx(spsr_mode)] = mrg(ms[sidx(spsr_mode)], spsr_in, spsr_mask);
      if (cpsr_we) begin
        m = cpsr_mask;
        if (mc[4:0] == M_USR && !force_priv) m[0] = 1'b0;
        mc = mrg(mc, cpsr_in, m);
      end else if (flags_we) mc[31:28] = flags_in;
      @(negedge clk);
      chk("random cpsr", 32'(cpsr), mc);
      chk("random spsr", spsr, (sidx(mc[4:0]) < 5) ? ms[sidx(mc[4:0])] : mc);
    end
    idle();
  endtask

  initial begin
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk("reset", 32'(cpsr), 32'h0000_00D3);
    flags_we = 1; flags_in = 4'b1010;
    @(negedge clk); idle();
    chk("flags", 32'(cpsr), 32'hA000_00D3);
    // SPSR_svc write, read back in SVC
    spsr_we = 1; spsr_mask = 4'hF; spsr_mode = M_SVC; spsr_in = 32'h6000_0010;
    @(negedge clk); idle();
    chk("spsr_svc", spsr, 32'h6000_0010);
    // switch to IRQ mode: SPSR_irq is separate
    cpsr_we = 1; cpsr_mask = 4'b0001; cpsr_in = 32'h0000_0092;
    @(negedge clk); idle();
    chk("mode irq", 32'(cpsr), 32'hA000_0092);
    chk("spsr_irq reset value", spsr, 32'h0000_00D3);
    // flags byte only
    cpsr_we = 1; cpsr_mask = 4'b1000; cpsr_in = 32'h5000_001F;
    @(negedge clk); idle();
    chk("flags byte", 32'(cpsr), 32'h5000_0092);
    // to user mode
    cpsr_we = 1; cpsr_mask = 4'b0001; cpsr_in = 32'h0000_0010;
    @(negedge clk); idle();
    chk("user", 32'(cpsr), 32'h5000_0010);
    chk("spsr in user = cpsr", spsr, 32'h5000_0010);
    // control byte protected in user mode
    cpsr_we = 1; cpsr_mask = 4'b1001; cpsr_in = 32'h8000_00D3;
    @(negedge clk); idle();
    chk("user protect", 32'(cpsr), 32'h8000_0010);
    // forced write (exception entry)
    cpsr_we = 1; cpsr_mask = 4'b0001; cpsr_in = 32'h0000_009B; force_priv = 1;
    flags_we = 1; flags_in = 4'b0001;                 // ignored: CPSR write has priority
    @(negedge clk); idle();
    chk("forced und", 32'(cpsr), 32'h8000_009B);
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
