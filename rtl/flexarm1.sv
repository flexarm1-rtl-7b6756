// flexarm1 - the FlexARM1 processor: five-stage pipelined ARM-subset CPU.
//
// A Harvard load/store machine. The instruction ROM feeds the pipeline
//   IF  : the ROM holds the instruction at PC; it reads synchronously, so it
//         is addressed with the next PC (PC + 4, PC when stalled, or a
//         redirect target). The first cycle after reset only reads word 0.
//   ID  : decoder, immediate unit and three register-file reads (R15 reads as
//         the instruction's address + 8); the hazard unit checks for a
//         load-use conflict.
//   EX  : forwarding muxes, barrel shifter, ALU; the control unit tests the
//         condition field against the flags. A failed condition squashes the
//         instruction. Flags are written here when S is set. A taken branch,
//         or a data-processing result written to R15, redirects the PC and
//         flushes the two younger instructions (two-cycle penalty).
//   MEM : the I/O controller routes the access to data RAM or the I/O ports.
//         The RAM reads synchronously with the address computed in EX, so load
//         data is ready in MEM.
//   WB  : register write (load data or the EX result; BL writes PC + 4 to R14).
// Data hazards: EX/MEM and MEM/WB results are forwarded into EX; a load
// followed directly by a consumer costs one stall cycle. Every other
// instruction completes one per clock.
//
// Interface: prog_* writes the instruction ROM (hold rst_n low meanwhile);
// sw_in / led_out are the memory-mapped input and output ports; dbg_addr /
// dbg_data read a register for the display; stat carries one-cycle event
// strobes. Reset (rst_n low, asynchronous) sets PC to 0 and clears registers
// and flags. The component split follows the FlexARM1 component list; the
// stage contents, address map and flush/stall policy are this design's.
module flexarm1
  import flexarm_pkg::*;
#(
  parameter int unsigned ROM_WORDS = 256,
  parameter int unsigned RAM_WORDS = 128,
  localparam int unsigned PAW      = $clog2(ROM_WORDS),
  localparam int unsigned DAW      = $clog2(RAM_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           prog_we,
  input  logic [PAW-1:0] prog_addr,
  input  logic [31:0]    prog_data,
  input  logic [31:0]    sw_in,
  output logic [31:0]    led_out,
  input  logic [3:0]     dbg_addr,
  output logic [31:0]    dbg_data,
  output stat_t          stat
);

  // ---------------------------------------------------------------- IF
  logic [31:0] pc, pc_next, instr_if;
  logic        pc_en, ifid_en, ifid_flush, idex_flush;
  logic        redirect;
  logic [31:0] target;

  logic        run;   // low in the first cycle after reset, while the ROM reads word 0

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run <= 1'b0;
    else        run <= 1'b1;
  end

  always_comb begin
    if (!run)          pc_next = pc;
    else if (redirect) pc_next = {target[31:2], 2'b00};
    else if (pc_en)    pc_next = pc + 32'd4;
    else               pc_next = pc;
  end

  // instr_if is the word at pc: the ROM captured it at pc_next last edge
  flexarm_rom #(.WORDS(ROM_WORDS)) u_rom (
    .clk, .addr(pc_next[PAW+1:2]), .data(instr_if),
    .ld_we(prog_we), .ld_addr(prog_addr), .ld_data(prog_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc <= 32'd0;
    else        pc <= pc_next;
  end

  // IF/ID
  logic [31:0] ifid_instr, ifid_pc;
  logic        ifid_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ifid_instr <= NOP_INSTR; ifid_pc <= 32'd0; ifid_valid <= 1'b0;
    end else if (ifid_flush || !run) begin
      ifid_instr <= NOP_INSTR; ifid_valid <= 1'b0;
    end else if (ifid_en) begin
      ifid_instr <= instr_if; ifid_pc <= pc; ifid_valid <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- ID
  ctrl_t       ctrl_id;
  logic [31:0] imm_id, rn_id, rm_id, rc_id;
  logic        rot_nz_id, stall;
  logic        wb_we;
  logic [3:0]  wb_rd;
  logic [31:0] wb_data;

  flexarm_decoder u_dec (.instr(ifid_instr), .ctrl(ctrl_id));
  flexarm_imm     u_imm (.instr(ifid_instr), .imm(imm_id), .rot_nz(rot_nz_id));

  flexarm_regfile u_rf (
    .clk, .rst_n,
    .ra_addr(ctrl_id.rn), .rb_addr(ctrl_id.rm), .rc_addr(ctrl_id.rc),
    .ra_data(rn_id), .rb_data(rm_id), .rc_data(rc_id),
    .pc8(ifid_pc + 32'd8),
    .we(wb_we), .wa(wb_rd), .wd(wb_data),
    .dbg_addr, .dbg_data
  );

  // ID/EX
  ctrl_t       idex_ctrl;
  cond_e       idex_cond;
  logic [31:0] idex_pc, idex_imm, idex_rn, idex_rm, idex_rc;
  logic        idex_rot_nz;

  flexarm_hazard u_haz (
    .id_use_rn(ctrl_id.use_rn), .id_rn(ctrl_id.rn),
    .id_use_rm(ctrl_id.use_rm), .id_rm(ctrl_id.rm),
    .id_use_rc(ctrl_id.use_rc), .id_rc(ctrl_id.rc),
    .ex_load(idex_ctrl.mem_read), .ex_rd(idex_ctrl.rd),
    .stall
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idex_ctrl <= '0; idex_cond <= C_AL; idex_pc <= '0; idex_imm <= '0;
      idex_rn <= '0; idex_rm <= '0; idex_rc <= '0; idex_rot_nz <= 1'b0;
    end else if (idex_flush) begin
      idex_ctrl <= '0;
    end else begin
      idex_ctrl   <= ifid_valid ? ctrl_id : '0;
      idex_cond   <= cond_e'(ifid_instr[31:28]);
      idex_pc     <= ifid_pc;
      idex_imm    <= imm_id;
      idex_rn     <= rn_id;
      idex_rm     <= rm_id;
      idex_rc     <= rc_id;
      idex_rot_nz <= rot_nz_id;
    end
  end

  // ---------------------------------------------------------------- EX
  flags_t      flags, alu_flags;
  logic        cond_pass, ex_go;
  fwd_e        sel_rn, sel_rm, sel_rc;
  logic [31:0] a_ex, m_ex, c_ex, sh_out, op2, alu_y;
  logic        sh_c, op2_c;

  // EX/MEM
  logic        exmem_we, exmem_rd_n, exmem_wr_n, exmem_byte;
  logic [3:0]  exmem_rd;
  logic [31:0] exmem_res, exmem_sdata;

  flexarm_forward u_fwd (
    .ex_rn(idex_ctrl.rn), .ex_rm(idex_ctrl.rm), .ex_rc(idex_ctrl.rc),
    .mem_we(exmem_we), .mem_rd(exmem_rd),
    .wb_we, .wb_rd,
    .sel_rn, .sel_rm, .sel_rc
  );

  function automatic logic [31:0] fwd_mux(input fwd_e s, input logic [31:0] rf,
                                          input logic [31:0] m, input logic [31:0] w);
    unique case (s)
      FWD_MEM: return m;
      FWD_WB:  return w;
      default: return rf;
    endcase
  endfunction

  always_comb begin
    a_ex = fwd_mux(sel_rn, idex_rn, exmem_res, wb_data);
    m_ex = fwd_mux(sel_rm, idex_rm, exmem_res, wb_data);
    c_ex = fwd_mux(sel_rc, idex_rc, exmem_res, wb_data);
  end

  flexarm_shifter u_sh (
    .din(m_ex), .typ(idex_ctrl.shift_type),
    .amt(idex_ctrl.shift_reg ? c_ex[7:0] : {3'd0, idex_ctrl.shift_imm}),
    .by_reg(idex_ctrl.shift_reg), .cin(flags.c),
    .dout(sh_out), .cout(sh_c)
  );

  always_comb begin
    op2   = idex_ctrl.op2_imm ? idex_imm : sh_out;
    op2_c = idex_ctrl.op2_imm ? ((idex_ctrl.imm_dp && idex_rot_nz) ? idex_imm[31] : flags.c)
                              : sh_c;
  end

  flexarm_alu u_alu (
    .op(idex_ctrl.alu_op), .a(a_ex), .b(op2), .flags_in(flags), .shc(op2_c),
    .y(alu_y), .flags_out(alu_flags)
  );

  flexarm_control u_ctl (
    .cond(idex_cond), .flags, .cond_pass,
    .stall, .redirect,
    .pc_en, .ifid_en, .ifid_flush, .idex_flush
  );

  always_comb begin
    ex_go    = idex_ctrl.valid && cond_pass;
    redirect = ex_go && (idex_ctrl.branch ||
                         (idex_ctrl.reg_write && idex_ctrl.rd == 4'd15 && !idex_ctrl.mem_read));
    target   = alu_y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flags <= '0;
    else if (ex_go && idex_ctrl.set_flags) flags <= alu_flags;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exmem_we <= 1'b0; exmem_rd_n <= 1'b0; exmem_wr_n <= 1'b0; exmem_byte <= 1'b0;
      exmem_rd <= '0; exmem_res <= '0; exmem_sdata <= '0;
    end else begin
      exmem_we    <= ex_go && idex_ctrl.reg_write && idex_ctrl.rd != 4'd15;
      exmem_rd_n  <= ex_go && idex_ctrl.mem_read;
      exmem_wr_n  <= ex_go && idex_ctrl.mem_write;
      exmem_byte  <= idex_ctrl.mem_byte;
      exmem_rd    <= idex_ctrl.rd;
      exmem_res   <= idex_ctrl.link ? idex_pc + 32'd4 : alu_y;
      exmem_sdata <= c_ex;
    end
  end

  // ---------------------------------------------------------------- MEM
  logic [DAW-1:0] ram_waddr, ram_raddr;
  logic           ram_we, io_access;
  logic [3:0]     ram_be;
  logic [31:0]    ram_wdata, ram_rdata, load_data;

  flexarm_io #(.RAM_WORDS(RAM_WORDS)) u_io (
    .clk, .rst_n,
    .addr(exmem_res), .ex_addr(alu_y), .re(exmem_rd_n), .we(exmem_wr_n), .byte_acc(exmem_byte),
    .wdata(exmem_sdata), .rdata(load_data), .io_access,
    .ram_waddr, .ram_raddr, .ram_we, .ram_be, .ram_wdata, .ram_rdata,
    .sw_in, .led_out
  );

  flexarm_ram #(.WORDS(RAM_WORDS)) u_ram (
    .clk, .waddr(ram_waddr), .we(ram_we), .be(ram_be),
    .wdata(ram_wdata), .raddr(ram_raddr), .rdata(ram_rdata)
  );

  // MEM/WB
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_we <= 1'b0; wb_rd <= '0; wb_data <= '0;
    end else begin
      wb_we   <= exmem_we;
      wb_rd   <= exmem_rd;
      wb_data <= exmem_rd_n ? load_data : exmem_res;
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    stat.retire       = ex_go;
    stat.cond_fail    = idex_ctrl.valid && !cond_pass;
    stat.stall        = stall && !redirect;
    stat.flush        = redirect;
    stat.fwd_mem      = (idex_ctrl.use_rn && sel_rn == FWD_MEM) ||
                        (idex_ctrl.use_rm && sel_rm == FWD_MEM) ||
                        (idex_ctrl.use_rc && sel_rc == FWD_MEM);
    stat.fwd_wb       = (idex_ctrl.use_rn && sel_rn == FWD_WB) ||
                        (idex_ctrl.use_rm && sel_rm == FWD_WB) ||
                        (idex_ctrl.use_rc && sel_rc == FWD_WB);
    stat.shift_by_reg = ex_go && idex_ctrl.shift_reg;
    stat.io_access    = io_access;
  end

  // ---------------------------------------------------------------- rules
  // R15 is the PC: it is never written through the register file.
  a_no_r15_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(wb_we && wb_rd == 4'd15));
  // Load data exists only after MEM: the hazard unit must have kept a load's
  // consumer out of EX, so EX/MEM never forwards a load.
  a_no_load_forward: assert property (@(posedge clk) disable iff (!rst_n)
    !(exmem_rd_n && stat.fwd_mem));
  // A redirect target is word aligned once it reaches the PC.
  a_pc_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    pc[1:0] == 2'b00);

endmodule
