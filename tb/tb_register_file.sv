// tb_register_file: random writes and reads on both ports against an array
// model; reads are asynchronous and see a write only after its clock edge.
`timescale 1ns/1ps
module tb_register_file;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0]  ra, rb, wa;
  logic [31:0] rda, rdb, wd;
  logic        we;
  logic [31:0] model [30];
  int checks = 0, failures = 0;

  register_file dut (.clk, .ra, .rda, .rb, .rdb, .we, .wa, .wd);

  initial begin
    we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    // initialise every register
    for (int r = 0; r < 30; r++) begin
      @(negedge clk); we = 1; wa = 5'(r); wd = $urandom; model[r] = wd;
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom_range(0, 29)); wd = $urandom;
      ra = 5'($urandom_range(0, 29)); rb = (k % 4 == 0) ? wa : 5'($urandom_range(0, 29));
      #1;
      checks += 2;
      if (rda !== model[ra]) begin failures++; $display("FAIL A r%0d %h exp %h", ra, rda, model[ra]); end
      if (rdb !== model[rb]) begin failures++; $display("FAIL B r%0d %h exp %h", rb, rdb, model[rb]); end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
