// tb_forwarding_unit: random read/write address pairs, with matches forced
// often; the selected data must be the write data exactly when a write is
// active to the same register.
`timescale 1ns/1ps
module tb_forwarding_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0]  ra, rb, wa;
  logic [31:0] rf_a, rf_b, wd, a, b;
  logic        we, fwd_a, fwd_b;
  int checks = 0, failures = 0, hits = 0;

  forwarding_unit dut (.ra, .rb, .rf_a, .rf_b, .we, .wa, .wd, .a, .b, .fwd_a, .fwd_b);

  initial begin
    for (int k = 0; k < 2000; k++) begin
      ra = 5'($urandom_range(0, 29)); rb = 5'($urandom_range(0, 29));
      wa = (k % 3 == 0) ? ra : (k % 3 == 1) ? rb : 5'($urandom_range(0, 29));
      we = 1'($urandom); rf_a = $urandom; rf_b = $urandom; wd = $urandom;
      @(posedge clk);
      checks += 4;
      if (a !== ((we && wa == ra) ? wd : rf_a)) failures++;
      if (b !== ((we && wa == rb) ? wd : rf_b)) failures++;
      if (fwd_a !== (we && wa == ra)) failures++;
      if (fwd_b !== (we && wa == rb)) failures++;
      if (we && wa == ra) hits++;
    end
    checks++;
    if (hits == 0) failures++;
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
