// tb_flexarm_hazard - load-use detection: directed cases and random register
// patterns compared with a list-based reference.
module tb_flexarm_hazard;
  logic       urn, urm, urc, ld, stall;
  logic [3:0] rn, rm, rc, rd;
  int checks = 0, failures = 0;

  flexarm_hazard dut (.id_use_rn(urn), .id_rn(rn), .id_use_rm(urm), .id_rm(rm),
                      .id_use_rc(urc), .id_rc(rc), .ex_load(ld), .ex_rd(rd), .stall);

  function automatic bit ref_stall();
    bit hit = 0;
    logic [3:0] regs [3] = '{rn, rm, rc};
    bit uses [3] = '{urn, urm, urc};
    if (!ld || rd == 4'd15) return 0;
    for (int i = 0; i < 3; i++) if (uses[i] && regs[i] == rd) hit = 1;
    return hit;
  endfunction

  task automatic chk(bit exp);
    #1; checks++;
    if (stall !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL ld=%0d rd=%0d rn=%0d/%0d rm=%0d/%0d rc=%0d/%0d -> %0d",
                                  ld, rd, urn, rn, urm, rm, urc, rc, stall);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // load r3, consumer uses r3 as Rn / Rm / Rs, or not at all
    ld = 1; rd = 3; urn = 1; rn = 3; urm = 0; rm = 3; urc = 0; rc = 3; chk(1);
    urn = 0; urm = 1; chk(1);
    urm = 0; urc = 1; chk(1);
    urc = 0; chk(0);
    ld = 0; urn = 1; chk(0);
    for (int i = 0; i < 2000; i++) begin
      ld = $urandom_range(1); rd = 4'($urandom_range(7));
      urn = $urandom_range(1); urm = $urandom_range(1); urc = $urandom_range(1);
      rn = 4'($urandom_range(7)); rm = 4'($urandom_range(7)); rc = 4'($urandom_range(7));
      chk(ref_stall());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
