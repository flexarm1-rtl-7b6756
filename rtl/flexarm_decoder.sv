// flexarm_decoder - the FlexARM1 instruction decoder (ID stage).
//
// Turns one 32-bit ARM instruction into the pipeline's control word (ctrl_t).
// Supported classes:
//   data processing, operand 2 immediate, immediate-shifted or register-shifted
//   Rm (all sixteen opcodes, with or without S);
//   LDR/STR/LDRB/STRB with an immediate or shifted-register offset, added or
//   subtracted (U bit), pre-indexed without write-back;
//   B and BL (BL writes the return address to R14).
// Everything else - multiply, swap, halfword transfers, status-register
// access, post-indexed or write-back transfers, LDR into R15, load/store
// multiple, coprocessor and software-interrupt instructions - decodes with
// valid = 0 and behaves as a no-op. The instruction classes follow the
// FlexARM1 addressing-mode list; treating the rest as no-ops is this
// design's choice. A load/store computes its address in the ALU (ADD or SUB
// of the offset); a branch computes its target as R15 (PC + 8) plus the
// immediate unit's offset. Purely combinational.
module flexarm_decoder
  import flexarm_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);

  logic is_extra;   // multiply / swap / halfword space inside class 00
  logic is_psr;     // TST..CMN with S = 0: status-register access, BX

  always_comb begin
    ctrl = '0;
    ctrl.alu_op     = alu_op_e'(instr[24:21]);
    ctrl.shift_type = shift_e'(instr[6:5]);
    ctrl.shift_imm  = instr[11:7];
    ctrl.rn         = instr[19:16];
    ctrl.rm         = instr[3:0];
    ctrl.rd         = instr[15:12];
    is_extra = (instr[27:25] == 3'b000) && instr[7] && instr[4];
    is_psr   = (instr[24:23] == 2'b10) && !instr[20];

    unique case (instr[27:26])
      2'b00: if (!is_extra && !is_psr) begin
        ctrl.valid     = 1'b1;
        ctrl.set_flags = instr[20];
        ctrl.reg_write = (instr[24:23] != 2'b10);
        ctrl.use_rn    = !(instr[24:21] == OP_MOV || instr[24:21] == OP_MVN);
        if (instr[25]) begin
          ctrl.op2_imm = 1'b1;
          ctrl.imm_dp  = 1'b1;
        end else begin
          ctrl.use_rm = 1'b1;
          if (instr[4]) begin
            ctrl.shift_reg = 1'b1;
            ctrl.use_rc    = 1'b1;
            ctrl.rc        = instr[11:8];
          end
        end
      end
      2'b01: if (!(instr[25] && instr[4]) && instr[24] && !instr[21] &&
                 !(instr[20] && instr[15:12] == 4'd15)) begin
        ctrl.valid     = 1'b1;
        ctrl.alu_op    = instr[23] ? OP_ADD : OP_SUB;
        ctrl.use_rn    = 1'b1;
        ctrl.mem_byte  = instr[22];
        ctrl.mem_read  = instr[20];
        ctrl.mem_write = !instr[20];
        ctrl.reg_write = instr[20];
        if (!instr[20]) begin
          ctrl.use_rc = 1'b1;
          ctrl.rc     = instr[15:12];
        end
        if (!instr[25]) begin
          ctrl.op2_imm = 1'b1;
        end else begin
          ctrl.use_rm = 1'b1;
        end
      end
      2'b10: if (instr[25]) begin
        ctrl.valid     = 1'b1;
        ctrl.branch    = 1'b1;
        ctrl.link      = instr[24];
        ctrl.alu_op    = OP_ADD;
        ctrl.use_rn    = 1'b1;
        ctrl.rn        = 4'd15;
        ctrl.op2_imm   = 1'b1;
        ctrl.reg_write = instr[24];
        ctrl.rd        = 4'd14;
      end
      default: ;
    endcase
  end

endmodule
