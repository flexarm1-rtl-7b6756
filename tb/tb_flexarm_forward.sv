// tb_flexarm_forward - operand source selection: EX/MEM beats MEM/WB beats the
// register file, and R15 is never forwarded.
module tb_flexarm_forward;
  import flexarm_pkg::*;
  logic [3:0] rn, rm, rc, mrd, wrd;
  logic       mwe, wwe;
  fwd_e       srn, srm, src;
  int checks = 0, failures = 0;

  flexarm_forward dut (.ex_rn(rn), .ex_rm(rm), .ex_rc(rc), .mem_we(mwe), .mem_rd(mrd),
                       .wb_we(wwe), .wb_rd(wrd), .sel_rn(srn), .sel_rm(srm), .sel_rc(src));

  function automatic fwd_e ref_sel(logic [3:0] r);
    fwd_e s = FWD_RF;
    if (r != 4'd15) begin
      if (wwe && wrd == r) s = FWD_WB;
      if (mwe && mrd == r) s = FWD_MEM;   // the younger result overrides
    end
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      rn = 4'($urandom_range(3)); rm = 4'($urandom_range(3)); rc = 4'($urandom_range(3));
      if (i % 10 == 0) rn = 4'd15;
      mwe = $urandom_range(1); wwe = $urandom_range(1);
      mrd = 4'($urandom_range(3)); wrd = 4'($urandom_range(3));
      if (i % 10 == 0) begin mrd = 4'd15; wrd = 4'd15; end
      #1;
      checks++;
      if (srn !== ref_sel(rn) || srm !== ref_sel(rm) || src !== ref_sel(rc)) begin
        failures++;
        if (failures < 10) $display("FAIL rn=%0d rm=%0d rc=%0d mem=%0d/%0d wb=%0d/%0d -> %0d %0d %0d",
                                    rn, rm, rc, mwe, mrd, wwe, wrd, srn, srm, src);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
