// flexarm_ram - the FlexARM1 data memory.
//
// WORDS 32-bit words, built like a simple dual-port FPGA block memory:
//   write port : waddr, we, be, wdata - on the rising clock edge, only the
//                byte lanes whose be bit is set;
//   read port  : raddr captured on the rising edge, the word appears on
//                rdata during the following cycle.
// The core drives raddr from the address computed in EX, so a load's data is
// ready in MEM, and writes from MEM. When both ports hit the same word in one
// edge, rdata returns the word as written (the enabled new bytes merged with
// the old ones), so a store directly followed by a load of the same word
// needs no stall. The contents are not reset. Size and port timing are this
// design's choices.
module flexarm_ram #(
  parameter int unsigned WORDS = 128,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] waddr,
  input  logic          we,
  input  logic [3:0]    be,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);

  logic [31:0] mem [WORDS];
  logic [31:0] merged;

  always_comb begin
    merged = mem[raddr];
    if (we && waddr == raddr)
      for (int i = 0; i < 4; i++)
        if (be[i]) merged[8*i +: 8] = wdata[8*i +: 8];
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[waddr][8*i +: 8] <= wdata[8*i +: 8];
    end
    rdata <= merged;
  end

endmodule
