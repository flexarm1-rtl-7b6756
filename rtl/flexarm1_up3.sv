// flexarm1_up3 - FlexARM1 test-bed top: the processor and its VGA display.
//
// Puts the FlexARM1 core (with its ROM, RAM and I/O controller inside) next
// to the VGA core, which reads the register file through the core's display
// port and shows all sixteen registers on a 640x480 monitor while the program
// runs. A program is loaded into the instruction ROM through prog_* while
// rst_n is held low; releasing rst_n starts execution at address 0.
// sw_in and led_out are the memory-mapped input (0x8000_0004) and output
// (0x8000_0000) ports. stat exposes the core's one-cycle event strobes.
// One clock drives everything; the VGA pixel rate is clk / 2.
module flexarm1_up3
  import flexarm_pkg::*;
#(
  parameter int unsigned ROM_WORDS = 256,
  parameter int unsigned RAM_WORDS = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         prog_we,
  input  logic [$clog2(ROM_WORDS)-1:0] prog_addr,
  input  logic [31:0]                  prog_data,
  input  logic [31:0]                  sw_in,
  output logic [31:0]                  led_out,
  output stat_t                        stat,
  output logic                         vga_hs,
  output logic                         vga_vs,
  output logic                         vga_r,
  output logic                         vga_g,
  output logic                         vga_b
);

  logic [3:0]  dbg_addr;
  logic [31:0] dbg_data;

  flexarm1 #(.ROM_WORDS(ROM_WORDS), .RAM_WORDS(RAM_WORDS)) u_cpu (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .sw_in, .led_out, .dbg_addr, .dbg_data, .stat
  );

  flexarm_vga #(.PIX_DIV(2)) u_vga (
    .clk, .rst_n, .reg_addr(dbg_addr), .reg_data(dbg_data),
    .hs(vga_hs), .vs(vga_vs), .r(vga_r), .g(vga_g), .b(vga_b)
  );

endmodule
