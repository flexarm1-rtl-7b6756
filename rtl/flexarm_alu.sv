// flexarm_alu - the FlexARM1 arithmetic and logic unit.
//
// Performs the sixteen ARM data-processing operations on operand A (Rn) and
// operand B (the shifted operand 2) and computes the N, Z, C and V flags the
// operation would set. Arithmetic operations (SUB, RSB, ADD, ADC, SBC, RSC,
// CMP, CMN) share one 33-bit adder whose inputs are inverted as needed; C is
// its carry-out (for subtraction, "no borrow") and V its signed overflow.
// Logical operations take C from the barrel shifter (shc) and keep V.
// Whether the flags are written, and whether the result is, is decided
// outside (set_flags, and the TST/TEQ/CMP/CMN opcodes write no register).
// The operation set is the ARM one; the adder-sharing structure is this
// design's choice. Purely combinational.
module flexarm_alu
  import flexarm_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  flags_t      flags_in,
  input  logic        shc,
  output logic [31:0] y,
  output flags_t      flags_out
);

  logic [31:0] x1, x2;
  logic        ci;
  logic [32:0] sum;
  logic        arith;

  always_comb begin
    // adder operand selection
    x1 = a; x2 = b; ci = 1'b0; arith = 1'b1;
    unique case (op)
      OP_SUB, OP_CMP: begin x1 = a;  x2 = ~b; ci = 1'b1;        end
      OP_RSB:         begin x1 = b;  x2 = ~a; ci = 1'b1;        end
      OP_ADD, OP_CMN: begin x1 = a;  x2 = b;  ci = 1'b0;        end
      OP_ADC:         begin x1 = a;  x2 = b;  ci = flags_in.c;  end
      OP_SBC:         begin x1 = a;  x2 = ~b; ci = flags_in.c;  end
      OP_RSC:         begin x1 = b;  x2 = ~a; ci = flags_in.c;  end
      default:        arith = 1'b0;
    endcase
    sum = {1'b0, x1} + {1'b0, x2} + {32'd0, ci};

    unique case (op)
      OP_AND, OP_TST: y = a & b;
      OP_EOR, OP_TEQ: y = a ^ b;
      OP_ORR:         y = a | b;
      OP_MOV:         y = b;
      OP_BIC:         y = a & ~b;
      OP_MVN:         y = ~b;
      default:        y = sum[31:0];
    endcase

    flags_out.n = y[31];
    flags_out.z = (y == 32'd0);
    if (arith) begin
      flags_out.c = sum[32];
      flags_out.v = (x1[31] == x2[31]) && (sum[31] != x1[31]);
    end else begin
      flags_out.c = shc;
      flags_out.v = flags_in.v;
    end
  end

endmodule
