// tb_flexarm1 - end-to-end test of the FlexARM1 core.
//
// 1. A directed program checks pipeline timing from the retire strobes: a
//    chain of dependent data-processing instructions retires one per clock
//    (forwarding), a load followed by its consumer costs one stall cycle, a
//    taken branch costs two, and a subroutine call/return (BL, MOV pc, lr),
//    conditional execution, a register-specified shift and the I/O ports work.
// 2. Random programs (data processing in all three operand forms, loads and
//    stores of words and bytes, conditional forward branches, I/O accesses,
//    unsupported encodings) run on the core and on an independent
//    instruction-level reference model; registers, flags, RAM and the output
//    port must agree at the end.
// Every pipeline mechanism (forwarding from both stages, load-use stall,
// flush, condition squash, register shift, I/O access) is counted and must
// occur.
module tb_flexarm1;
  import flexarm_pkg::*;
  import flexarm_tb_pkg::*;

  localparam int ROMW = 256, RAMW = 128;
  localparam logic [31:0] HALT = 32'hEAFF_FFFE;   // B .

  logic        clk = 0, rst_n = 0, prog_we = 0;
  logic [7:0]  prog_addr = 0;
  logic [31:0] prog_data = 0, sw_in = 0, led_out, dbg_data;
  logic [3:0]  dbg_addr = 0;
  stat_t       stat;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_retire, n_fail, n_stall, n_flush, n_fmem, n_fwb, n_shr, n_io;
  logic [31:0] prog [$];

  flexarm1 #(.ROM_WORDS(ROMW), .RAM_WORDS(RAMW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      n_retire += int'(stat.retire); n_fail += int'(stat.cond_fail); n_stall += int'(stat.stall);
      n_flush  += int'(stat.flush);  n_fmem += int'(stat.fwd_mem);  n_fwb   += int'(stat.fwd_wb);
      n_shr    += int'(stat.shift_by_reg); n_io += int'(stat.io_access);
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic load_and_reset();
    rst_n = 0;
    for (int i = 0; i < ROMW; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i);
      prog_data = (i < prog.size()) ? prog[i] : HALT;
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst_n = 1;
  endtask

  function automatic logic [31:0] mov_imm(logic [3:0] rd, logic [3:0] rot, logic [7:0] v);
    return dp_imm(AL, 4'hD, 0, 0, rd, rot, v);
  endfunction

  // ---------------------------------------------------------------- directed
  task automatic directed();
    longint stamps [$];
    int exp_gap [11] = '{1, 1, 1, 1, 1, 1, 1, 1, 2, 1, 3};
    int sub_at;
    prog = {};
    prog.push_back(mov_imm(8, 12, 1));                              // MOV r8,#0x100
    prog.push_back(mov_imm(1, 0, 1));                               // MOV r1,#1
    for (int i = 0; i < 5; i++) prog.push_back(dp_rsi(AL, 4'h4, 0, 1, 1, 1, 0, 0)); // ADD r1,r1,r1
    prog.push_back(ls_imm(AL, 0, 0, 1, 8, 1, 12'd0));               // STR r1,[r8]
    prog.push_back(ls_imm(AL, 1, 0, 1, 8, 2, 12'd0));               // LDR r2,[r8]
    prog.push_back(dp_imm(AL, 4'h4, 0, 2, 3, 0, 8'd1));             // ADD r3,r2,#1   (stall)
    prog.push_back(br(AL, 0, 0));                                   // B   skip one
    prog.push_back(mov_imm(4, 0, 99));                              // MOV r4,#99     (skipped)
    prog.push_back(dp_rsi(AL, 4'h4, 0, 3, 5, 1, 0, 0));             // ADD r5,r3,r1   = 65
    prog.push_back(dp_imm(AL, 4'hA, 1, 1, 0, 0, 8'd32));            // CMP r1,#32
    prog.push_back(dp_imm(4'h1, 4'hD, 0, 0, 4, 0, 8'd5));           // MOVNE r4,#5    (fails)
    prog.push_back(dp_imm(4'h0, 4'hD, 0, 0, 4, 0, 8'd2));           // MOVEQ r4,#2
    prog.push_back(mov_imm(9, 0, 3));                               // MOV r9,#3
    prog.push_back(dp_rsr(AL, 4'hD, 0, 0, 11, 1, 2'd1, 9));         // MOV r11,r1,LSR r9 = 4
    prog.push_back(mov_imm(10, 1, 2));                              // MOV r10,#0x80000000
    sub_at = 24;
    prog.push_back(br(AL, 1, sub_at - prog.size() - 2));            // BL sub
    prog.push_back(ls_imm(AL, 0, 0, 1, 10, 5, 12'd0));              // STR r5,[r10]   led
    prog.push_back(ls_imm(AL, 1, 0, 1, 10, 6, 12'd4));              // LDR r6,[r10,#4] switches
    prog.push_back(HALT);
    while (prog.size() < sub_at) prog.push_back(HALT);
    prog.push_back(mov_imm(7, 0, 7));                               // sub: MOV r7,#7
    prog.push_back(dp_rsi(AL, 4'hD, 0, 0, 15, 14, 0, 0));           //      MOV pc,lr
    sw_in = 32'h1357_9BDF;
    load_and_reset();
    for (int i = 0; i < 80; i++) begin
      @(posedge clk); #1;
      if (stat.retire) stamps.push_back(cyc);
    end
    for (int i = 0; i < 11; i++) chk($sformatf("retire gap %0d", i), 32'(stamps[i + 1] - stamps[i]), 32'(exp_gap[i]));
    begin
      logic [31:0] expv [16] = '{0, 32, 32, 33, 2, 65, 32'h1357_9BDF, 7, 32'h100, 3, 32'h8000_0000, 4, 0, 0, 0, 0};
      expv[14] = 32'd4 * 20;   // return address: instruction after BL
      for (int i = 0; i < 15; i++) begin
        dbg_addr = 4'(i); #1; chk($sformatf("directed r%0d", i), dbg_data, expv[i]);
      end
    end
    chk("directed led", led_out, 32'd65);
    chk("directed flags", 32'(dut.flags), 32'(4'b0110));  // CMP 32,32: Z and C set
  endtask

  // ---------------------------------------------------------------- random
  function automatic logic [3:0] rcond();
    if ($urandom_range(9) < 3) return 4'($urandom_range(15));
    return AL;
  endfunction

  function automatic logic [31:0] rand_instr(int left);
    logic [3:0] rd, rn, rm;
    rd = 4'($urandom_range(7)); rn = 4'($urandom_range(10)); rm = 4'($urandom_range(10));
    if ($urandom_range(19) == 0) rn = 4'd15;
    case ($urandom_range(15))
      0, 1, 2, 3: return dp_imm(rcond(), 4'($urandom), 1'($urandom), rn, rd, 4'($urandom), 8'($urandom));
      4, 5, 6:    return dp_rsi(rcond(), 4'($urandom), 1'($urandom), rn, rd, rm, 2'($urandom), 5'($urandom));
      7, 8:       return dp_rsr(rcond(), 4'($urandom), 1'($urandom), rn, rd, rm, 2'($urandom),
                                4'($urandom_range(7)));
      9: begin
        logic l = 1'($urandom);
        if ($urandom_range(1)) return ls_imm(rcond(), l, 0, 1'($urandom), 8, rd, 12'(4 * $urandom_range(15)));
        return ls_imm(rcond(), l, 1, 1'($urandom), 8, rd, 12'($urandom_range(63)));
      end
      10: return ls_reg(rcond(), 1'($urandom), 1'($urandom), 1'($urandom), 8, rd, 9, 2'd0, 5'($urandom_range(3)));
      11: return ls_imm(AL, 1, 0, 1, 8, rd, 12'(4 * $urandom_range(15)));   // load then likely use
      12: return br(rcond(), 0, (left > 3) ? $urandom_range(2) : 0);
      13: case ($urandom_range(3))
            0: return ls_imm(rcond(), 0, 0, 1, 10, rd, 12'd0);
            1: return ls_imm(rcond(), 0, 1, 1, 10, rd, 12'($urandom_range(3)));
            2: return ls_imm(rcond(), 1, 0, 1, 10, rd, 12'd4);
            default: return ls_imm(rcond(), 1, 1'($urandom), 1, 10, rd, 12'($urandom_range(3)));
          endcase
      14: return {AL, 7'b0000000, 1'($urandom), rd, rn, rm, 4'b1001, 4'($urandom_range(7))}; // MUL: unsupported
      default: return dp_rsi(AL, 4'h4, 0, rd, rd, rd, 0, 0);                 // dependent chain
    endcase
  endfunction

  task automatic random_prog(int n);
    iss_t iss;
    logic [31:0] pc;
    int steps, loop_at, i;
    prog = {};
    prog.push_back(mov_imm(8, 12, 1));                      // r8  = 0x100  RAM base
    prog.push_back(mov_imm(9, 0, 4));                       // r9  = 4      index
    prog.push_back(mov_imm(10, 1, 2));                      // r10 = 0x80000000 I/O base
    prog.push_back(mov_imm(0, 0, 8'hC0));                   // r0  = 0xC0
    prog.push_back(mov_imm(1, 4'($urandom), 8'($urandom))); // r1  = seed
    loop_at = prog.size();                                  // fill 0xC0..0x13C
    prog.push_back(ls_imm(AL, 0, 0, 1, 0, 1, 12'd0));       // L: STR r1,[r0]
    prog.push_back(dp_rsi(AL, 4'h4, 0, 1, 1, 1, 2'd3, 5'd3)); //   ADD r1,r1,r1,ROR #3
    prog.push_back(dp_imm(AL, 4'h4, 0, 0, 0, 0, 8'd4));     //    ADD r0,r0,#4
    prog.push_back(dp_imm(AL, 4'hA, 1, 0, 0, 15, 8'h50));   //    CMP r0,#0x140
    prog.push_back(br(4'h1, 0, loop_at - prog.size() - 2)); //    BNE L
    for (int k = 0; k < 8; k++) prog.push_back(mov_imm(4'(k), 4'($urandom), 8'($urandom)));
    for (int k = 0; k < n; k++) prog.push_back(rand_instr(n - k));
    for (int k = 0; k < 3; k++) prog.push_back(dp_rsi(AL, 4'hD, 0, 0, 0, 0, 0, 0));
    prog.push_back(HALT);

    sw_in = $urandom;
    iss = new(RAMW);
    iss.sw = sw_in;
    pc = 0; steps = 0;
    while (prog[pc[31:2]] != HALT && steps < 5000) begin
      pc = iss.step(pc, prog[pc[31:2]]);
      steps++;
    end

    load_and_reset();
    repeat (3 * steps + 40) @(posedge clk);
    #1;
    for (i = 0; i < 15; i++) begin
      dbg_addr = 4'(i); #1; chk($sformatf("r%0d", i), dbg_data, iss.r[i]);
    end
    chk("flags", 32'(dut.flags), 32'({iss.n, iss.z, iss.c, iss.v}));
    chk("led", led_out, iss.led);
    foreach (iss.mem[wa]) chk($sformatf("ram[%0d]", wa), dut.u_ram.mem[wa], iss.mem[wa]);
  endtask

  initial begin
    n_retire = 0; n_fail = 0; n_stall = 0; n_flush = 0; n_fmem = 0; n_fwb = 0; n_shr = 0; n_io = 0;
    directed();
    for (int p = 0; p < 40; p++) random_prog(150);
    $display("events: retire=%0d cond_fail=%0d stall=%0d flush=%0d fwd_mem=%0d fwd_wb=%0d shift_by_reg=%0d io=%0d",
             n_retire, n_fail, n_stall, n_flush, n_fmem, n_fwb, n_shr, n_io);
    chk("seen retire", 32'(n_retire > 0), 1); chk("seen cond_fail", 32'(n_fail > 0), 1);
    chk("seen stall", 32'(n_stall > 0), 1);   chk("seen flush", 32'(n_flush > 0), 1);
    chk("seen fwd_mem", 32'(n_fmem > 0), 1);  chk("seen fwd_wb", 32'(n_fwb > 0), 1);
    chk("seen shift_by_reg", 32'(n_shr > 0), 1); chk("seen io", 32'(n_io > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
