// tb_flexarm_regfile - random writes and reads of the register file against
// an array model: reset value, write-through, R15 as PC + 8, ignored R15
// writes, and the display port.
module tb_flexarm_regfile;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  ra, rb, rc, wa, da;
  logic [31:0] qa, qb, qc, pc8, wd, dq;
  logic        we;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  flexarm_regfile dut (.clk, .rst_n, .ra_addr(ra), .rb_addr(rb), .rc_addr(rc),
                       .ra_data(qa), .rb_data(qb), .rc_data(qc), .pc8, .we, .wa, .wd,
                       .dbg_addr(da), .dbg_data(dq));

  always #5 clk = ~clk;

  function automatic logic [31:0] expect_rd(logic [3:0] a);
    if (a == 4'd15) return pc8;
    if (we && wa == a) return wd;
    return model[a];
  endfunction

  task automatic chk(logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL got %h exp %h", got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0; rc = 0; da = 0; pc8 = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      da = 4'(i); pc8 = 32'h100; #1; chk(dq, (i == 15) ? 32'h100 : 32'd0);
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = $urandom_range(1); wa = 4'($urandom); wd = $urandom;
      ra = 4'($urandom); rb = 4'($urandom); rc = (i % 4 == 0) ? wa : 4'($urandom);
      da = 4'($urandom); pc8 = $urandom;
      #1;
      chk(qa, expect_rd(ra)); chk(qb, expect_rd(rb)); chk(qc, expect_rd(rc)); chk(dq, expect_rd(da));
      @(posedge clk);
      if (we && wa != 4'd15) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
