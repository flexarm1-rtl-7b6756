// flexarm_rom - the FlexARM1 instruction memory (Harvard instruction side).
//
// WORDS 32-bit instruction words with a registered read, the way FPGA block
// memory works: on each rising clock edge the word at addr is captured and
// appears on data for the following cycle. The core therefore presents the
// address of the next PC, and data always holds the instruction at the
// current PC. The contents are written through the load port (ld_we,
// ld_addr, ld_data) on the rising edge, normally while the core is held in
// reset, which is how a program produced by an assembler is placed in it; a
// read of the word being loaded in the same edge returns the old contents.
// Seen from the core it is read-only. Size and load port are this design's
// choices.
module flexarm_rom #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [31:0]   data,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [31:0]   ld_data
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
    data <= mem[addr];
  end

endmodule
