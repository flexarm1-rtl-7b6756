// flexarm_hazard - the FlexARM1 data hazard unit.
//
// A value is forwarded to EX from EX/MEM and MEM/WB, so the one read-after-
// write case that forwarding cannot cover is a load in EX whose result one
// of the registers read by the instruction in ID needs: the data exists only
// after MEM. The unit then asks for a one-cycle stall (the control unit holds
// PC and IF/ID and inserts a bubble). R15 is never a load destination here.
// The stall is raised whether or not the load will pass its condition.
// Purely combinational.
module flexarm_hazard (
  input  logic       id_use_rn,
  input  logic [3:0] id_rn,
  input  logic       id_use_rm,
  input  logic [3:0] id_rm,
  input  logic       id_use_rc,
  input  logic [3:0] id_rc,
  input  logic       ex_load,
  input  logic [3:0] ex_rd,
  output logic       stall
);

  always_comb begin
    stall = ex_load && ex_rd != 4'd15 &&
            ((id_use_rn && id_rn == ex_rd) ||
             (id_use_rm && id_rm == ex_rd) ||
             (id_use_rc && id_rc == ex_rd));
  end

endmodule
