// tb_flexarm_rom - loads the instruction memory through its load port and
// reads every word back at the fetch port, one clock after the address.
module tb_flexarm_rom;
  localparam int W = 256;
  logic        clk = 0;
  logic [7:0]  addr, ld_addr;
  logic [31:0] data, ld_data;
  logic        ld_we;
  int checks = 0, failures = 0;

  flexarm_rom #(.WORDS(W)) dut (.clk, .addr, .data, .ld_we, .ld_addr, .ld_data);

  always #5 clk = ~clk;

  function automatic logic [31:0] pat(int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'h1234_5678;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 0; ld_addr = 0; ld_data = 0; addr = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 8'(i); ld_data = pat(i);
    end
    @(negedge clk); ld_we = 0;
    for (int i = W - 1; i >= 0; i--) begin
      addr = 8'(i);
      @(posedge clk); #1;
      addr = 8'($urandom);   // must not disturb the word already read
      #1;
      checks++;
      if (data !== pat(i)) begin failures++; $display("FAIL %0d %h", i, data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
