// tb_flexarm_io - the data-side address decoder with a RAM attached: word and
// byte accesses to RAM, the output register and the input port. The RAM read
// address is presented one cycle ahead (ex_addr), as the pipeline does.
module tb_flexarm_io;
  logic        clk = 0, rst_n = 0;
  logic [31:0] addr, ex_addr, wdata, rdata, ram_wdata, ram_rdata, sw_in, led_out;
  logic        re, we, byte_acc, io_access, ram_we;
  logic [6:0]  ram_waddr, ram_raddr;
  logic [3:0]  ram_be;
  logic [31:0] model [128];
  logic [31:0] led_model;
  int checks = 0, failures = 0;

  flexarm_io #(.RAM_WORDS(128)) dut (.clk, .rst_n, .addr, .ex_addr, .re, .we, .byte_acc, .wdata,
    .rdata, .io_access, .ram_waddr, .ram_raddr, .ram_we, .ram_be, .ram_wdata, .ram_rdata,
    .sw_in, .led_out);
  flexarm_ram #(.WORDS(128)) u_ram (.clk, .waddr(ram_waddr), .we(ram_we), .be(ram_be),
    .wdata(ram_wdata), .raddr(ram_raddr), .rdata(ram_rdata));

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%h got %h exp %h", what, addr, got, exp);
    end
  endtask

  function automatic logic [31:0] rand_addr();
    case ($urandom_range(3))
      0: return 32'h8000_0000 | 32'($urandom_range(3));
      1: return 32'h8000_0004 | 32'($urandom_range(3));
      default: return 32'($urandom_range(511));
    endcase
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] nxt;
    re = 0; we = 0; byte_acc = 0; addr = 0; ex_addr = 0; wdata = 0;
    sw_in = 32'hCAFE_F00D; led_model = 0;
    #12 rst_n = 1;
    chk("led reset", led_out, 0);
    // fill RAM with words
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); we = 1; byte_acc = 0; addr = 32'(4 * i); wdata = $urandom; model[i] = wdata;
    end
    nxt = rand_addr();
    @(negedge clk); we = 0; ex_addr = nxt;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = nxt; nxt = rand_addr(); ex_addr = nxt;
      byte_acc = $urandom_range(1);
      we = $urandom_range(1); re = !we; wdata = $urandom;
      #1;
      chk("io_access", io_access, addr[31]);
      if (re) begin
        logic [31:0] w;
        w = !addr[31] ? model[addr[8:2]] : (addr[2] ? sw_in : led_model);
        chk("read", rdata, byte_acc ? {24'd0, w[8*addr[1:0] +: 8]} : w);
      end else begin
        if (!addr[31]) begin
          if (byte_acc) model[addr[8:2]][8*addr[1:0] +: 8] = wdata[7:0];
          else model[addr[8:2]] = wdata;
        end else if (!addr[2]) begin
          if (byte_acc) led_model[8*addr[1:0] +: 8] = wdata[7:0];
          else led_model = wdata;
        end
        chk("ram we", ram_we, !addr[31]);
      end
      @(posedge clk); #1;
      chk("led", led_out, led_model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
