// tb_flexarm1_up3 - whole-design test of the FlexARM1 test bed at its default
// sizes. It loads a program that multiplies two numbers in software (shift
// and add, the FlexARM1 has no multiplier), writes the product to the output
// port, bounces it through RAM (load-use stall), applies a register-specified
// shift and reads the input port. The expected registers come from the
// independent reference model; the product is also checked against a
// hand-computed value. Then one full VGA frame is captured and decoded: every
// register R0..R14 must be readable from the colours of its row of bit cells,
// and the sync timing must match 640x480 at 800x525 pixels of two clocks.
// The pipeline events seen during the run are counted; each must occur.
module tb_flexarm1_up3;
  import flexarm_pkg::*;
  import flexarm_tb_pkg::*;

  localparam logic [31:0] HALT = 32'hEAFF_FFFE;

  logic        clk = 0, rst_n = 0, prog_we = 0;
  logic [7:0]  prog_addr = 0;
  logic [31:0] prog_data = 0, sw_in = 32'h0BAD_F00D, led_out;
  stat_t       stat;
  logic        vga_hs, vga_vs, vga_r, vga_g, vga_b;

  int checks = 0, failures = 0;
  int n_fail, n_stall, n_flush, n_fmem, n_fwb, n_shr, n_io;
  logic [31:0] prog [$];
  logic [31:0] seen [16];
  int x, y, ph;
  bit capturing = 0, done = 0;
  logic vs_q = 1;
  longint cyc = 0, vs_fall [$], hs_fall [$];
  logic hs_q = 1;

  flexarm1_up3 dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      n_fail += int'(stat.cond_fail); n_stall += int'(stat.stall); n_flush += int'(stat.flush);
      n_fmem += int'(stat.fwd_mem);   n_fwb   += int'(stat.fwd_wb); n_shr  += int'(stat.shift_by_reg);
      n_io   += int'(stat.io_access);
    end
  end

  // Raster follower, started at a vertical sync edge once the program is done.
  always @(posedge clk) begin
    #1;
    if (hs_q && !vga_hs) hs_fall.push_back(cyc);
    if (vs_q && !vga_vs) vs_fall.push_back(cyc);
    if (done && !capturing && vs_q && !vga_vs) begin
      capturing = 1; x = 0; y = 490; ph = 0;
    end else if (capturing) begin
      ph++;
      if (ph == 2) begin
        ph = 0; x++;
        if (x == 800) begin x = 0; y = (y == 524) ? 0 : y + 1; end
      end
      if (x < 640 && y < 480 && x % 20 == 10 && y % 30 == 15 && ph == 0) begin
        seen[y / 30][31 - x / 20] = vga_g;
        checks++;
        if (vga_g == vga_b || vga_r) begin
          failures++; $display("FAIL colour at %0d,%0d", x, y);
        end
      end
    end
    vs_q = vga_vs; hs_q = vga_hs;
  end

  function automatic logic [31:0] mov_imm(logic [3:0] rd, logic [3:0] rot, logic [7:0] v);
    return dp_imm(AL, 4'hD, 0, 0, rd, rot, v);
  endfunction

  initial begin
    iss_t iss;
    logic [31:0] pc;
    int steps;
    n_fail = 0; n_stall = 0; n_flush = 0; n_fmem = 0; n_fwb = 0; n_shr = 0; n_io = 0;
    prog.push_back(mov_imm(1, 0, 8'd200));                      //    MOV r1,#200
    prog.push_back(mov_imm(2, 0, 8'd173));                      //    MOV r2,#173
    prog.push_back(mov_imm(0, 0, 8'd0));                        //    MOV r0,#0
    prog.push_back(dp_rsi(AL, 4'hD, 1, 0, 2, 2, 2'd1, 5'd1));   // L: MOVS r2,r2,LSR #1
    prog.push_back(dp_rsi(4'h2, 4'h4, 0, 0, 0, 1, 2'd0, 5'd0)); //    ADDCS r0,r0,r1
    prog.push_back(dp_rsi(AL, 4'hD, 0, 0, 1, 1, 2'd0, 5'd1));   //    MOV r1,r1,LSL #1
    prog.push_back(br(4'h1, 0, -5));                            //    BNE L
    prog.push_back(mov_imm(10, 1, 2));                          //    MOV r10,#0x80000000
    prog.push_back(ls_imm(AL, 0, 0, 1, 10, 0, 12'd0));          //    STR r0,[r10]
    prog.push_back(mov_imm(8, 12, 1));                          //    MOV r8,#0x100
    prog.push_back(ls_imm(AL, 0, 0, 1, 8, 0, 12'd8));           //    STR r0,[r8,#8]
    prog.push_back(ls_imm(AL, 1, 0, 1, 8, 4, 12'd8));           //    LDR r4,[r8,#8]
    prog.push_back(dp_imm(AL, 4'h4, 0, 4, 4, 0, 8'd1));         //    ADD r4,r4,#1
    prog.push_back(mov_imm(9, 0, 8'd4));                        //    MOV r9,#4
    prog.push_back(dp_rsr(AL, 4'hD, 0, 0, 5, 4, 2'd1, 9));      //    MOV r5,r4,LSR r9
    prog.push_back(ls_imm(AL, 1, 0, 1, 10, 6, 12'd4));          //    LDR r6,[r10,#4]
    prog.push_back(HALT);

    iss = new(128);
    iss.sw = sw_in;
    pc = 0; steps = 0;
    while (prog[pc[31:2]] != HALT && steps < 1000) begin
      pc = iss.step(pc, prog[pc[31:2]]);
      steps++;
    end

    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i);
      prog_data = (i < prog.size()) ? prog[i] : HALT;
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst_n = 1;
    repeat (3 * steps + 40) @(posedge clk);
    chk("product on output port", led_out, 32'd34600);
    chk("reference product", iss.r[0], 32'd34600);
    done = 1;
    wait (capturing);
    wait (vs_fall.size() >= 3);
    for (int i = 0; i < 15; i++) chk($sformatf("display r%0d", i), seen[i], iss.r[i]);
    chk("frame period", 32'(vs_fall[2] - vs_fall[1]), 32'(800 * 525 * 2));
    chk("line period", 32'(hs_fall[hs_fall.size() - 1] - hs_fall[hs_fall.size() - 2]), 32'(1600));
    $display("events: cond_fail=%0d stall=%0d flush=%0d fwd_mem=%0d fwd_wb=%0d shift_by_reg=%0d io=%0d",
             n_fail, n_stall, n_flush, n_fmem, n_fwb, n_shr, n_io);
    chk("seen cond_fail", 32'(n_fail > 0), 1); chk("seen stall", 32'(n_stall > 0), 1);
    chk("seen flush", 32'(n_flush > 0), 1);    chk("seen fwd_mem", 32'(n_fmem > 0), 1);
    chk("seen fwd_wb", 32'(n_fwb > 0), 1);     chk("seen shift_by_reg", 32'(n_shr > 0), 1);
    chk("seen io", 32'(n_io > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
