// tb_flexarm_vga - runs the VGA core for more than a frame and checks every
// clock against an independent raster model synchronised at the first
// vertical sync: sync widths and positions, frame period (800 x 525 pixels of
// two clocks), and the colour of every visible pixel for a known register set.
module tb_flexarm_vga;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  reg_addr;
  logic [31:0] reg_data;
  logic        hs, vs, r, g, b;
  int checks = 0, failures = 0;
  int x, y, ph, frames;
  bit synced = 0;
  logic vs_q = 1;

  flexarm_vga #(.PIX_DIV(2)) dut (.clk, .rst_n, .reg_addr, .reg_data, .hs, .vs, .r, .g, .b);

  function automatic logic [31:0] regval(int k);
    return 32'hA5C3_0F01 ^ (32'(k) * 32'h0101_1011);
  endfunction
  assign reg_data = regval(int'(reg_addr));

  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d y=%0d got %0d exp %0d", what, x, y, got, exp);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (!synced && vs_q && !vs) begin
      synced = 1; x = 0; y = 490; ph = 0; frames = 0;
    end else if (synced) begin
      ph++;
      if (ph == 2) begin
        ph = 0; x++;
        if (x == 800) begin
          x = 0; y++;
          if (y == 525) begin y = 0; end
          if (y == 490) frames++;
        end
      end
    end
    vs_q = vs;
    if (synced) begin
      bit vis, border, bv;
      logic [31:0] rv;
      chk("hs", hs, !(x >= 656 && x < 752));
      chk("vs", vs, !(y >= 490 && y < 492));
      vis = (x < 640) && (y < 480);
      border = (x % 20 == 0) || (y % 30 == 0);
      rv = regval(y / 30);
      bv = vis ? rv[31 - x / 20] : 0;
      chk("r", r, 0);
      chk("g", g, vis && !border && bv);
      chk("b", b, vis && !border && !bv);
      if (frames == 1 && y == 100) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #25 rst_n = 1;
  end
endmodule
