// tb_forward_seq - forwarding workload: long runs of single-cycle
// data-processing instructions, each reading the results of the one or two
// instructions just before it (immediate, immediate-shift and register-shift
// forms, with and without S, some conditional). The core must execute one
// instruction per clock with no stall, and its registers and flags must match
// the independent reference model at the end. Several random sequences run.
module tb_forward_seq;
  import flexarm_pkg::*;
  import flexarm_tb_pkg::*;

  localparam logic [31:0] HALT = 32'hEAFF_FFFE;
  localparam int N = 200;

  logic        clk = 0, rst_n = 0, prog_we = 0;
  logic [7:0]  prog_addr = 0;
  logic [31:0] prog_data = 0, sw_in = 0, led_out, dbg_data;
  logic [3:0]  dbg_addr = 0;
  stat_t       stat;
  logic [31:0] prog [$];
  int checks = 0, failures = 0;

  flexarm1 dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 10; run++) begin
      iss_t iss;
      logic [31:0] pc;
      logic [3:0] last1, last2, rd, rn, rm;
      int steps, first, last, busy, stalls;
      prog = {};
      for (int k = 0; k < 8; k++) prog.push_back(dp_imm(AL, 4'hD, 0, 0, 4'(k), 4'($urandom), 8'($urandom)));
      last1 = 7; last2 = 6;
      for (int k = 0; k < N; k++) begin
        logic [3:0] cond;
        rd = 4'($urandom_range(7));
        rn = $urandom_range(1) ? last1 : last2;
        rm = $urandom_range(1) ? last1 : last2;
        cond = ($urandom_range(4) == 0) ? 4'($urandom_range(14)) : AL;
        case ($urandom_range(2))
          0: prog.push_back(dp_imm(cond, 4'($urandom), 1'($urandom), rn, rd, 4'($urandom), 8'($urandom)));
          1: prog.push_back(dp_rsi(cond, 4'($urandom), 1'($urandom), rn, rd, rm, 2'($urandom), 5'($urandom)));
          default: prog.push_back(dp_rsr(cond, 4'($urandom), 1'($urandom), rn, rd, rm, 2'($urandom),
                                         $urandom_range(1) ? last1 : last2));
        endcase
        // test/compare opcodes always set flags (with S clear they are status-register access)
        if (prog[prog.size() - 1][24:23] == 2'b10) prog[prog.size() - 1][20] = 1'b1;
        // test/compare opcodes write nothing; keep the dependency chain on real writers
        if (prog[prog.size() - 1][24:23] != 2'b10) begin last2 = last1; last1 = rd; end
      end
      prog.push_back(HALT);

      iss = new(128);
      pc = 0; steps = 0;
      while (prog[pc[31:2]] != HALT && steps < 1000) begin
        pc = iss.step(pc, prog[pc[31:2]]);
        steps++;
      end

      rst_n = 0;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk); prog_we = 1; prog_addr = 8'(i);
        prog_data = (i < prog.size()) ? prog[i] : HALT;
      end
      @(negedge clk); prog_we = 0;
      @(negedge clk); rst_n = 1;
      first = -1; last = -1; busy = 0; stalls = 0;
      for (int c = 0; c < N + 40; c++) begin
        @(posedge clk); #1;
        if (stat.stall) stalls++;
        // an instruction of the sequence (passed or squashed) is in EX
        if ((stat.retire || stat.cond_fail) && busy < N + 8) begin
          if (first < 0) first = c;
          last = c; busy++;
        end
      end
      chk("instructions through EX", 32'(busy), 32'(N + 8));
      chk("one instruction per clock", 32'(last - first + 1), 32'(N + 8));
      chk("no stall", 32'(stalls), 0);
      for (int i = 0; i < 15; i++) begin
        dbg_addr = 4'(i); #1; chk($sformatf("run %0d r%0d", run, i), dbg_data, iss.r[i]);
      end
      chk("flags", 32'(dut.flags), 32'({iss.n, iss.z, iss.c, iss.v}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
