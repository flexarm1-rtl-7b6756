// tb_flexarm_alu - checks all sixteen ALU operations and their flags
// against a 64-bit integer reference, with random and boundary operands.
module tb_flexarm_alu;
  import flexarm_pkg::*;
  import flexarm_tb_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y, ey;
  flags_t      fi, fo;
  logic        shc;
  bit          en, ez, ec, ev;
  int checks = 0, failures = 0;
  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h8000_0001};

  flexarm_alu dut (.op, .a, .b, .flags_in(fi), .shc, .y, .flags_out(fo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      op  = alu_op_e'(i % 16);
      a   = (i % 5 == 0) ? corner[$urandom_range(5)] : $urandom;
      b   = (i % 3 == 0) ? corner[$urandom_range(5)] : $urandom;
      fi  = flags_t'($urandom_range(15));
      shc = $urandom_range(1);
      #1;
      alu_ref(op, a, b, fi.c, shc, fi.v, ey, en, ez, ec, ev);
      checks++;
      if (y !== ey || fo !== {en, ez, ec, ev}) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%s a=%h b=%h fi=%b -> %h %b exp %h %b%b%b%b",
                   op.name(), a, b, fi, y, fo, ey, en, ez, ec, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
