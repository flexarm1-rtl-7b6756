// flexarm_io - the FlexARM1 I/O controller (memory-mapped data side).
//
// Decodes each MEM-stage data access. Address bit 31 low selects the data
// RAM (word address = addr[AW+1:2]); bit 31 high selects the I/O ports:
//   0x8000_0000  output register, read/write, drives led_out
//   0x8000_0004  input port, read-only, returns sw_in
// Byte stores write one lane (addr[1:0]) with the low byte replicated; byte
// loads return that lane zero-extended; word accesses ignore addr[1:0].
// The output register is written on the rising clock edge and cleared by
// reset. The RAM reads synchronously, so its read address is taken one stage
// early, from the address the EX stage is computing (ex_addr); its data
// then arrives in MEM together with the access it belongs to. I/O reads are
// combinational in MEM. The address map and byte handling are this design's
// choices.
module flexarm_io #(
  parameter int unsigned RAM_WORDS = 128,
  localparam int unsigned AW       = $clog2(RAM_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   addr,
  input  logic [31:0]   ex_addr,
  input  logic          re,
  input  logic          we,
  input  logic          byte_acc,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,
  output logic          io_access,
  output logic [AW-1:0] ram_waddr,
  output logic [AW-1:0] ram_raddr,
  output logic          ram_we,
  output logic [3:0]    ram_be,
  output logic [31:0]   ram_wdata,
  input  logic [31:0]   ram_rdata,
  input  logic [31:0]   sw_in,
  output logic [31:0]   led_out
);

  logic        sel_io;
  logic [31:0] word;
  logic [3:0]  be;

  always_comb begin
    sel_io    = addr[31];
    io_access = sel_io && (re || we);
    be        = byte_acc ? (4'b0001 << addr[1:0]) : 4'b1111;
    ram_waddr = addr[AW+1:2];
    ram_raddr = ex_addr[AW+1:2];
    ram_we    = we && !sel_io;
    ram_be    = be;
    ram_wdata = byte_acc ? {4{wdata[7:0]}} : wdata;

    if (!sel_io)      word = ram_rdata;
    else if (addr[2]) word = sw_in;
    else              word = led_out;
    rdata = byte_acc ? {24'd0, word[8*addr[1:0] +: 8]} : word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) led_out <= 32'd0;
    else if (we && sel_io && !addr[2]) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) led_out[8*i +: 8] <= ram_wdata[8*i +: 8];
    end
  end

endmodule
