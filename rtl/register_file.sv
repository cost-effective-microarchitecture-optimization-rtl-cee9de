// register_file: the 30 x 32-bit banked general-purpose register file.
//
// A flip-flop RAM with two asynchronous read ports and one synchronous write
// port, addressed by physical register number.  The mapping from a logical
// register (R0..R14) and the processor mode onto the 30 physical registers
// is done outside, by arm_pkg::phys_reg, so that the forwarding unit can
// compare physical numbers.  R15 is the program counter and is not stored
// here.  Reads see the contents before the clock edge that writes; bypassing
// a same-cycle write is the forwarding unit's job.  No reset: software
// initialises the registers it uses, as on the ARM7TDMI.
module register_file #(
  parameter int unsigned NREGS = 30,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic [AW-1:0]    ra,
  output logic [WIDTH-1:0] rda,
  input  logic [AW-1:0]    rb,
  output logic [WIDTH-1:0] rdb,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);
  logic [WIDTH-1:0] mem [NREGS];

  always_ff @(posedge clk)
    if (we && wa < AW'(NREGS)) mem[wa] <= wd;

  assign rda = (ra < AW'(NREGS)) ? mem[ra] : '0;
  assign rdb = (rb < AW'(NREGS)) ? mem[rb] : '0;
endmodule
