// tb_flexarm_decoder - directed decode of every supported instruction class
// and of unsupported encodings, which must come out as no-ops.
module tb_flexarm_decoder;
  import flexarm_pkg::*;
  import flexarm_tb_pkg::*;

  logic [31:0] instr;
  ctrl_t       c;
  int checks = 0, failures = 0;
  // MUL, MRS, post-indexed LDR, LDR with write-back, LDM, SWI, LDR pc, MCR
  logic [31:0] unsup [8] = '{32'hE000_0291, 32'hE10F_0000, 32'hE498_1004, 32'hE5B8_1004,
                             32'hE898_0003, 32'hEF00_0000, 32'hE598_F000, 32'hEE01_0F10};

  flexarm_decoder dut (.instr, .ctrl(c));

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s instr=%h got %0d exp %0d", what, instr, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ADDS r3, r1, #5
    instr = dp_imm(AL, 4'h4, 1, 4'd1, 4'd3, 4'd0, 8'd5); #1;
    chk("add valid", c.valid, 1); chk("add we", c.reg_write, 1); chk("add s", c.set_flags, 1);
    chk("add imm", c.op2_imm, 1); chk("add imm_dp", c.imm_dp, 1); chk("add rn", c.use_rn, 1);
    chk("add rd", c.rd == 4'd3, 1); chk("add op", c.alu_op == OP_ADD, 1); chk("add mem", c.mem_read | c.mem_write, 0);
    // SUB r4, r2, r5, ASR r6
    instr = dp_rsr(AL, 4'h2, 0, 4'd2, 4'd4, 4'd5, 2'd2, 4'd6); #1;
    chk("rsr valid", c.valid, 1); chk("rsr shreg", c.shift_reg, 1); chk("rsr rc", c.use_rc && c.rc == 4'd6, 1);
    chk("rsr rm", c.use_rm && c.rm == 4'd5, 1); chk("rsr type", c.shift_type == SH_ASR, 1); chk("rsr s", c.set_flags, 0);
    // MOV r1, r2, LSL #7
    instr = dp_rsi(AL, 4'hD, 0, 4'd0, 4'd1, 4'd2, 2'd0, 5'd7); #1;
    chk("mov rn", c.use_rn, 0); chk("mov shimm", c.shift_imm == 5'd7, 1); chk("mov shreg", c.shift_reg, 0);
    chk("mov op2imm", c.op2_imm, 0);
    // CMP r1, #0 : no register write
    instr = dp_imm(AL, 4'hA, 1, 4'd1, 4'd0, 4'd0, 8'd0); #1;
    chk("cmp valid", c.valid, 1); chk("cmp we", c.reg_write, 0); chk("cmp s", c.set_flags, 1);
    // LDR r2, [r8, #-12]
    instr = ls_imm(AL, 1, 0, 0, 4'd8, 4'd2, 12'd12); #1;
    chk("ldr valid", c.valid, 1); chk("ldr rd", c.mem_read && c.reg_write && c.rd == 4'd2, 1);
    chk("ldr sub", c.alu_op == OP_SUB, 1); chk("ldr imm", c.op2_imm && !c.imm_dp, 1); chk("ldr s", c.set_flags, 0);
    // STRB r3, [r8, r9, LSL #2]
    instr = ls_reg(AL, 0, 1, 1, 4'd8, 4'd3, 4'd9, 2'd0, 5'd2); #1;
    chk("strb valid", c.valid, 1); chk("strb wr", c.mem_write && !c.reg_write && c.mem_byte, 1);
    chk("strb data", c.use_rc && c.rc == 4'd3, 1); chk("strb rm", c.use_rm && !c.op2_imm, 1);
    chk("strb add", c.alu_op == OP_ADD, 1);
    // BL
    instr = br(AL, 1, 10); #1;
    chk("bl valid", c.valid && c.branch && c.link, 1); chk("bl lr", c.reg_write && c.rd == 4'd14, 1);
    chk("bl pc", c.use_rn && c.rn == 4'd15, 1);
    // B
    instr = br(4'h1, 0, -3); #1;
    chk("b", c.branch && !c.link && !c.reg_write, 1);
    // unsupported: MUL, MRS, post-indexed LDR, LDR with write-back, LDM, SWI, LDR pc
    for (int i = 0; i < 8; i++) begin
      instr = unsup[i]; #1;
      chk("unsupported", c.valid | c.reg_write | c.mem_write | c.mem_read | c.branch | c.set_flags, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
