// flexarm_forward - the FlexARM1 forwarding unit.
//
// For each of the three operands of the instruction in EX (Rn, Rm, and Rs or
// store data) it picks the newest value: the result waiting in EX/MEM if that
// instruction writes the register, otherwise the one in MEM/WB, otherwise the
// value read from the register file in ID. R15 is never forwarded (it is the
// PC, supplied by the register file). Loads in EX/MEM are never a source
// because the hazard unit has already delayed their consumers by a cycle.
// Purely combinational.
module flexarm_forward
  import flexarm_pkg::*;
(
  input  logic [3:0] ex_rn,
  input  logic [3:0] ex_rm,
  input  logic [3:0] ex_rc,
  input  logic       mem_we,
  input  logic [3:0] mem_rd,
  input  logic       wb_we,
  input  logic [3:0] wb_rd,
  output fwd_e       sel_rn,
  output fwd_e       sel_rm,
  output fwd_e       sel_rc
);

  function automatic fwd_e pick(input logic [3:0] r);
    if (r == 4'd15)                return FWD_RF;
    else if (mem_we && mem_rd == r) return FWD_MEM;
    else if (wb_we && wb_rd == r)   return FWD_WB;
    else                            return FWD_RF;
  endfunction

  always_comb begin
    sel_rn = pick(ex_rn);
    sel_rm = pick(ex_rm);
    sel_rc = pick(ex_rc);
  end

endmodule
