// flexarm_shifter - operand-2 barrel shifter of the FlexARM1 EX stage.
//
// Shifts or rotates the Rm operand as an ARM data-processing or load/store
// instruction asks: LSL, LSR, ASR, ROR, and RRX (ROR #0 in the immediate form),
// and produces the shifter carry-out that logical operations copy into C.
// The amount comes either from the 5-bit instruction field (by_reg = 0, where
// LSR #0 and ASR #0 mean a shift by 32) or from the low byte of Rs
// (by_reg = 1, where amounts of 32 and above follow the ARM rules and an amount
// of 0 leaves the operand and the carry unchanged).
//
// The FlexARM1 uses a reduced shifter and leaves multiplication to software;
// here that reduction is read as "one 32-bit shifter and no multiplier": the
// shift semantics themselves are complete. Purely combinational.
module flexarm_shifter
  import flexarm_pkg::*;
(
  input  logic [31:0] din,
  input  shift_e      typ,
  input  logic [7:0]  amt,
  input  logic        by_reg,
  input  logic        cin,
  output logic [31:0] dout,
  output logic        cout
);

  logic [5:0]  n;        // effective shift distance, 0..33
  logic [63:0] t;
  logic [4:0]  r;

  always_comb begin
    dout = din;
    cout = cin;
    n    = 6'd0;
    t    = 64'd0;
    r    = amt[4:0];
    unique case (typ)
      SH_LSL: begin
        // register amounts above 32 are clipped to 33, which clears result and carry
        if (by_reg) n = (amt > 8'd32) ? 6'd33 : amt[5:0];
        else        n = {1'b0, amt[4:0]};
        t = {32'd0, din} << n;
        if (n != 6'd0) begin
          dout = t[31:0];
          cout = t[32];
        end
      end
      SH_LSR: begin
        if (by_reg) n = (amt > 8'd32) ? 6'd33 : amt[5:0];
        else        n = (amt[4:0] == 5'd0) ? 6'd32 : {1'b0, amt[4:0]};
        t = {din, 32'd0} >> n;
        if (n != 6'd0) begin
          dout = t[63:32];
          cout = t[31];
        end
      end
      SH_ASR: begin
        if (by_reg) n = (amt > 8'd32) ? 6'd32 : amt[5:0];
        else        n = (amt[4:0] == 5'd0) ? 6'd32 : {1'b0, amt[4:0]};
        t = $signed({din, 32'd0}) >>> n;
        if (n != 6'd0) begin
          dout = t[63:32];
          cout = t[31];
        end
      end
      SH_ROR: begin
        if (!by_reg && r == 5'd0) begin
          // RRX: rotate right by one through the carry
          dout = {cin, din[31:1]};
          cout = din[0];
        end else if (by_reg && amt == 8'd0) begin
          dout = din;
          cout = cin;
        end else if (r == 5'd0) begin
          // register amount a multiple of 32: operand unchanged, carry = bit 31
          dout = din;
          cout = din[31];
        end else begin
          dout = (din >> r) | (din << (6'd32 - {1'b0, r}));
          cout = dout[31];
        end
      end
      default: ;
    endcase
  end

endmodule
