// barrel_shifter: the ARM operand-2 shifter.
//
// Performs LSL (which is also ASL), LSR, ASR and ROR on a 32-bit operand, and
// RRX, together with the shifter carry-out that logical data-processing
// instructions copy into the C flag.  Two forms exist, as in the ARM
// instruction set: with `imm_form` set the amount is the 5-bit field of the
// instruction and amount 0 means LSL #0 (no shift), LSR #32, ASR #32 or RRX;
// with `imm_form` clear the amount is the bottom byte of a register, amount 0
// leaves operand and carry untouched and amounts of 32 and above follow the
// ARM rules.  Combinational.
module barrel_shifter
  import arm_pkg::*;
(
  input  logic [31:0] din,
  input  shift_e      stype,
  input  logic [7:0]  amount,
  input  logic        imm_form,
  input  logic        cin,
  output logic [31:0] dout,
  output logic        cout
);
  logic [63:0] dbl;
  logic [4:0]  a5;

  always_comb begin
    a5   = amount[4:0];
    dout = din;
    cout = cin;
    dbl  = '0;
    if (imm_form) begin
      unique case (stype)
        SH_LSL: if (a5 != 0) begin dout = din << a5; cout = din[5'(6'd32 - {1'b0, a5})]; end
        SH_LSR: if (a5 != 0) begin dout = din >> a5; cout = din[a5 - 5'd1]; end
                else begin dout = '0; cout = din[31]; end
        SH_ASR: if (a5 != 0) begin dout = 32'($signed(din) >>> a5); cout = din[a5 - 5'd1]; end
                else begin dout = {32{din[31]}}; cout = din[31]; end
        SH_ROR: if (a5 != 0) begin dbl = {din, din} >> a5; dout = dbl[31:0]; cout = din[a5 - 5'd1]; end
                else begin dout = {cin, din[31:1]}; cout = din[0]; end   // RRX
      endcase
    end else if (amount != 0) begin
      unique case (stype)
        SH_LSL: if (amount < 8'd32) begin dout = din << a5; cout = din[5'(6'd32 - {1'b0, a5})]; end
                else if (amount == 8'd32) begin dout = '0; cout = din[0]; end
                else begin dout = '0; cout = 1'b0; end
        SH_LSR: if (amount < 8'd32) begin dout = din >> a5; cout = din[a5 - 5'd1]; end
                else if (amount == 8'd32) begin dout = '0; cout = din[31]; end
                else begin dout = '0; cout = 1'b0; end
        SH_ASR: if (amount < 8'd32) begin dout = 32'($signed(din) >>> a5); cout = din[a5 - 5'd1]; end
                else begin dout = {32{din[31]}}; cout = din[31]; end
        SH_ROR: if (a5 != 0) begin dbl = {din, din} >> a5; dout = dbl[31:0]; cout = din[a5 - 5'd1]; end
                else begin dout = din; cout = din[31]; end
      endcase
    end
  end
endmodule
