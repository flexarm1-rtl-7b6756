// flexarm_control - the FlexARM1 control unit.
//
// Directs the pipeline in two ways. First, it evaluates an instruction's
// ARM condition field against the N, Z, C, V flags when the instruction is in
// EX (EQ, NE, CS, CC, MI, PL, VS, VC, HI, LS, GE, LT, GT, LE and AL; NV never
// passes); an instruction that fails is squashed there. Second, it turns the
// hazard unit's stall and EX's redirect (taken branch or write to R15) into
// pipeline-register controls:
//   stall    : PC and IF/ID hold, a bubble enters ID/EX;
//   redirect : PC loads the target, IF/ID and ID/EX are flushed (two
//              instructions lost); it overrides a stall.
// Flush and stall policy are this design's choices. Purely combinational.
module flexarm_control
  import flexarm_pkg::*;
(
  input  cond_e  cond,
  input  flags_t flags,
  output logic   cond_pass,
  input  logic   stall,
  input  logic   redirect,
  output logic   pc_en,
  output logic   ifid_en,
  output logic   ifid_flush,
  output logic   idex_flush
);

  always_comb begin
    unique case (cond)
      C_EQ: cond_pass =  flags.z;
      C_NE: cond_pass = !flags.z;
      C_CS: cond_pass =  flags.c;
      C_CC: cond_pass = !flags.c;
      C_MI: cond_pass =  flags.n;
      C_PL: cond_pass = !flags.n;
      C_VS: cond_pass =  flags.v;
      C_VC: cond_pass = !flags.v;
      C_HI: cond_pass =  flags.c && !flags.z;
      C_LS: cond_pass = !flags.c ||  flags.z;
      C_GE: cond_pass = (flags.n == flags.v);
      C_LT: cond_pass = (flags.n != flags.v);
      C_GT: cond_pass = !flags.z && (flags.n == flags.v);
      C_LE: cond_pass =  flags.z || (flags.n != flags.v);
      C_AL: cond_pass = 1'b1;
      default: cond_pass = 1'b0;
    endcase

    pc_en      = redirect || !stall;
    ifid_en    = redirect || !stall;
    ifid_flush = redirect;
    idex_flush = redirect || stall;
  end

endmodule
