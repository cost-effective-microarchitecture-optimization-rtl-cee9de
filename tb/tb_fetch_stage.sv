// tb_fetch_stage: sequential fetch by 4, stall, each redirect source with
// its flush, and fetch by 2 in Thumb state.  The instruction memory model
// returns a word derived from its address.
`timescale 1ns/1ps
module tb_fetch_stage;
  import arm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        thumb, stall;
  pcsel_e      pc_sel;
  logic [31:0] branch_addr, alu_result, mem_data, vector_addr;
  logic [31:0] imem_addr, imem_rdata, fd_instr, fd_addr, pc;
  logic        fd_valid;
  int checks = 0, failures = 0;

  fetch_stage dut (.clk, .rst_n, .thumb, .stall, .pc_sel, .branch_addr, .alu_result, .mem_data,
                   .vector_addr, .imem_addr, .imem_rdata, .fd_instr, .fd_addr, .fd_valid, .pc);

  assign imem_rdata = {imem_addr[15:2], 2'b00, ~imem_addr[15:0]};

  function automatic logic [31:0] word_at(logic [31:0] ad);
    return {ad[15:2], 2'b00, ~ad[15:0]};
  endfunction
  task automatic chk(string what, logic v, logic [31:0] ad);
    checks++;
    if (fd_valid !== v || (v && (fd_addr !== ad || fd_instr !== word_at(ad)))) begin
      failures++;
      $display("FAIL %s: valid %b addr %h instr %h (expected %b %h)", what, fd_valid, fd_addr, fd_instr, v, ad);
    end
  endtask
  task automatic cyc(); @(negedge clk); endtask

  initial begin
    thumb = 0; stall = 0; pc_sel = PCS_INC;
    branch_addr = 32'h100; alu_result = 32'h200; mem_data = 32'h300; vector_addr = 32'h18;
    cyc(); rst_n = 1;
    chk("after reset", 0, 0);
    cyc(); chk("fetch 0", 1, 32'h0);
    cyc(); chk("fetch 4", 1, 32'h4);
    stall = 1;
    cyc(); chk("stall 1", 1, 32'h4);
    cyc(); chk("stall 2", 1, 32'h4);
    stall = 0;
    cyc(); chk("resume", 1, 32'h8);
    pc_sel = PCS_BRANCH; cyc(); pc_sel = PCS_INC; chk("branch flush", 0, 0);
    cyc(); chk("branch target", 1, 32'h100);
    pc_sel = PCS_ALU; stall = 1; cyc(); pc_sel = PCS_INC; stall = 0; chk("alu flush over stall", 0, 0);
    cyc(); chk("alu target", 1, 32'h200);
    pc_sel = PCS_MEM; cyc(); pc_sel = PCS_INC; chk("mem flush", 0, 0);
    cyc(); chk("mem target", 1, 32'h300);
    pc_sel = PCS_VECTOR; cyc(); pc_sel = PCS_INC; chk("vector flush", 0, 0);
    cyc(); chk("vector", 1, 32'h18);
    thumb = 1;
    cyc(); chk("thumb +4 first", 1, 32'h1C);
    cyc(); chk("thumb +2", 1, 32'h1E);
    cyc(); chk("thumb +2 again", 1, 32'h20);
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
