// forwarding_unit: bypass of the execute-stage register write into the
// decode-stage operand reads.
//
// The register file is read in the decode stage while the instruction ahead
// of it may write the same register at the end of the same cycle in the
// execute stage.  For each of the two read ports this unit compares the
// physical read address with the physical write address; on a match with an
// active write it selects the write data instead of the (stale) register
// file output.  Port reads of R15 bypass both and are handled by the core.
// Combinational; `fwd_a`/`fwd_b` report when a bypass is taken.
module forwarding_unit #(
  parameter int unsigned AW = 5
) (
  input  logic [AW-1:0] ra, rb,        // physical read addresses
  input  logic [31:0]   rf_a, rf_b,    // register file outputs
  input  logic          we,            // execute-stage write enable
  input  logic [AW-1:0] wa,
  input  logic [31:0]   wd,
  output logic [31:0]   a, b,
  output logic          fwd_a, fwd_b
);
  assign fwd_a = we && (wa == ra);
  assign fwd_b = we && (wa == rb);
  assign a = fwd_a ? wd : rf_a;
  assign b = fwd_b ? wd : rf_b;
endmodule
