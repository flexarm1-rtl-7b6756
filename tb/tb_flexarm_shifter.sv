// tb_flexarm_shifter - random and corner-case check of the barrel shifter
// against a bit-at-a-time reference shifter, in both the instruction-field
// (immediate) and the register-amount forms.
module tb_flexarm_shifter;
  import flexarm_pkg::*;
  import flexarm_tb_pkg::*;

  logic [31:0] din, dout, exp_d;
  shift_e      typ;
  logic [7:0]  amt;
  logic        by_reg, cin, cout;
  bit          exp_c;
  int checks = 0, failures = 0;

  flexarm_shifter dut (.din, .typ, .amt, .by_reg, .cin, .dout, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      din    = $urandom;
      if (i % 7 == 0) din = 32'h8000_0001;
      typ    = shift_e'($urandom_range(3));
      by_reg = $urandom_range(1);
      cin    = $urandom_range(1);
      if (by_reg) amt = (i % 3 == 0) ? 8'($urandom) : 8'($urandom_range(40));
      else        amt = 8'($urandom_range(31));
      if (i < 8) begin by_reg = 0; amt = 0; typ = shift_e'(i % 4); end
      #1;
      shift_ref(din, typ, int'(amt), !by_reg, cin, exp_d, exp_c);
      checks++;
      if (dout !== exp_d || cout !== exp_c) begin
        failures++;
        if (failures < 10)
          $display("FAIL din=%h typ=%0d amt=%0d reg=%0d cin=%0d -> %h/%0d exp %h/%0d",
                   din, typ, amt, by_reg, cin, dout, cout, exp_d, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
