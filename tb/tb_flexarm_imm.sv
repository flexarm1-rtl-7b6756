// tb_flexarm_imm - checks the immediate unit for rotated data-processing
// constants, load/store offsets and branch offsets.
module tb_flexarm_imm;
  import flexarm_tb_pkg::*;

  logic [31:0] instr, imm, e;
  logic        rot_nz;
  int checks = 0, failures = 0;

  flexarm_imm dut (.instr, .imm, .rot_nz);

  task automatic chk(logic [31:0] exp_imm, logic exp_rnz);
    #1;
    checks++;
    if (imm !== exp_imm || rot_nz !== exp_rnz) begin
      failures++;
      $display("FAIL instr=%h imm=%h/%0d exp %h/%0d", instr, imm, rot_nz, exp_imm, exp_rnz);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // known constants
    instr = dp_imm(AL, 4'hD, 0, 0, 0, 4'd12, 8'h01); chk(32'h0000_0100, 1);
    instr = dp_imm(AL, 4'hD, 0, 0, 0, 4'd1,  8'h02); chk(32'h8000_0000, 1);
    instr = dp_imm(AL, 4'hD, 0, 0, 0, 4'd0,  8'hFF); chk(32'h0000_00FF, 0);
    instr = dp_imm(AL, 4'hD, 0, 0, 0, 4'd4,  8'hAB); chk(32'hAB00_0000, 1);
    instr = ls_imm(AL, 1, 0, 1, 0, 0, 12'hFFF);      chk(32'h0000_0FFF, 0);
    instr = br(AL, 0, -2);                           chk(32'hFFFF_FFF8, 0);
    instr = br(AL, 1, 5);                            chk(32'h0000_0014, 0);
    // random rotated immediates against a rotate loop
    for (int i = 0; i < 500; i++) begin
      logic [3:0] rot;
      logic [7:0] i8;
      rot = 4'($urandom); i8 = 8'($urandom);
      e = {24'd0, i8};
      for (int k = 0; k < 2 * rot; k++) e = {e[0], e[31:1]};
      instr = dp_imm(4'($urandom), 4'($urandom), 1'($urandom), 4'($urandom), 4'($urandom), rot, i8);
      chk(e, rot != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
