// tb_flexarm_ram - random word and byte-lane writes to the data memory,
// checked against an array model at the registered read port, including
// reads of the word being written in the same clock edge.
module tb_flexarm_ram;
  localparam int W = 128;
  logic        clk = 0, we;
  logic [6:0]  waddr, raddr;
  logic [3:0]  be;
  logic [31:0] wdata, rdata, expv;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  flexarm_ram #(.WORDS(W)) dut (.clk, .waddr, .we, .be, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; be = 0; wdata = 0; waddr = 0; raddr = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; be = 4'hF; waddr = 7'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      raddr = 7'($urandom);
      we = $urandom_range(1); be = 4'($urandom); wdata = $urandom;
      waddr = (i % 3 == 0) ? raddr : 7'($urandom);
      if (we) for (int b = 0; b < 4; b++) if (be[b]) model[waddr][8*b +: 8] = wdata[8*b +: 8];
      expv = model[raddr];
      @(posedge clk); #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL raddr %0d %h exp %h", raddr, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
