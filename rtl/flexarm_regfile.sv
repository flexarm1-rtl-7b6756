// flexarm_regfile - the FlexARM1 register file, R0..R15.
//
// Fifteen 32-bit registers R0..R14 with three combinational read ports for
// the ID stage (Rn, Rm, and Rs or the store data Rd), a fourth read port for
// the display core, and one write port driven by the WB stage on the rising
// clock edge. R15 is the program counter and is not stored here: reading
// R15 returns the pc8 input (the reading instruction's address + 8, as ARM
// defines), and writes to R15 are ignored because the pipeline turns them
// into branches. A register written in WB is seen by a read in the same
// cycle (write-through), so no stall is needed between WB and ID.
// Reset clears R0..R14. The port count and write-through are this design's
// choices.
module flexarm_regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  ra_addr,
  input  logic [3:0]  rb_addr,
  input  logic [3:0]  rc_addr,
  output logic [31:0] ra_data,
  output logic [31:0] rb_data,
  output logic [31:0] rc_data,
  input  logic [31:0] pc8,
  input  logic        we,
  input  logic [3:0]  wa,
  input  logic [31:0] wd,
  input  logic [3:0]  dbg_addr,
  output logic [31:0] dbg_data
);

  logic [31:0] regs [15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 15; i++) regs[i] <= 32'd0;
    end else if (we && wa != 4'd15) begin
      regs[wa] <= wd;
    end
  end

  function automatic logic [31:0] rd_port(input logic [3:0] a);
    if (a == 4'd15)            return pc8;
    else if (we && wa == a)    return wd;
    else                       return regs[a];
  endfunction

  always_comb begin
    ra_data  = rd_port(ra_addr);
    rb_data  = rd_port(rb_addr);
    rc_data  = rd_port(rc_addr);
    dbg_data = rd_port(dbg_addr);
  end

endmodule
