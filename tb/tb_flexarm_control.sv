// tb_flexarm_control - all sixteen condition codes against all sixteen flag
// combinations, and the pipeline controls for every stall/redirect pair.
module tb_flexarm_control;
  import flexarm_pkg::*;
  import flexarm_tb_pkg::*;

  cond_e  cond;
  flags_t flags;
  logic   cond_pass, stall, redirect, pc_en, ifid_en, ifid_flush, idex_flush;
  int checks = 0, failures = 0;

  flexarm_control dut (.cond, .flags, .cond_pass, .stall, .redirect,
                       .pc_en, .ifid_en, .ifid_flush, .idex_flush);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = 0; redirect = 0;
    for (int c = 0; c < 16; c++)
      for (int f = 0; f < 16; f++) begin
        cond = cond_e'(c); flags = flags_t'(f); #1;
        checks++;
        if (cond_pass !== cond_ref(4'(c), flags.n, flags.z, flags.c, flags.v)) begin
          failures++; $display("FAIL cond %0d flags %b -> %0d", c, flags, cond_pass);
        end
      end
    // {pc_en, ifid_en, ifid_flush, idex_flush} for stall, redirect
    for (int k = 0; k < 4; k++) begin
      logic [3:0] e;
      {stall, redirect} = 2'(k); #1;
      case (k)
        0: e = 4'b1100;   // run
        1: e = 4'b1111;   // redirect
        2: e = 4'b0001;   // stall: hold PC and IF/ID, bubble into EX
        default: e = 4'b1111; // redirect wins over stall
      endcase
      checks++;
      if ({pc_en, ifid_en, ifid_flush, idex_flush} !== e) begin
        failures++; $display("FAIL stall=%0d redirect=%0d -> %b", stall, redirect,
                             {pc_en, ifid_en, ifid_flush, idex_flush});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
