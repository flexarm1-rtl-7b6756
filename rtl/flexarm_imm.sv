// flexarm_imm - the FlexARM1 immediate unit.
//
// Builds the 32-bit constant an instruction carries, from the ARM encodings:
//   data processing, I = 1 : imm8 (bits 7:0) rotated right by 2 * rot (bits 11:8);
//                            rot_nz tells that the shifter carry is imm[31]
//   load/store, I = 0      : 12-bit offset (bits 11:0), zero-extended
//   branch                 : 24-bit offset (bits 23:0), sign-extended, times 4
// Other classes give 0. Purely combinational; used in the ID stage.
module flexarm_imm (
  input  logic [31:0] instr,
  output logic [31:0] imm,
  output logic        rot_nz
);

  logic [4:0]  rot;
  logic [31:0] imm8;

  always_comb begin
    rot    = {instr[11:8], 1'b0};
    imm8   = {24'd0, instr[7:0]};
    imm    = 32'd0;
    rot_nz = 1'b0;
    unique case (instr[27:25])
      3'b001: begin
        imm    = (imm8 >> rot) | (imm8 << (6'd32 - {1'b0, rot}));
        rot_nz = (rot != 5'd0);
      end
      3'b010:  imm = {20'd0, instr[11:0]};
      3'b101:  imm = {{6{instr[23]}}, instr[23:0], 2'b00};
      default: imm = 32'd0;
    endcase
  end

endmodule
