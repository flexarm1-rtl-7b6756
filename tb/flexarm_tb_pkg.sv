// flexarm_tb_pkg - testbench support for the FlexARM1: an instruction
// encoder (a tiny assembler for the supported ARM subset) and a reference
// model written independently of the RTL. The model evaluates shifts one bit
// at a time and arithmetic in 64-bit integers, so it shares no structure
// with the hardware it checks. iss_t executes one instruction per step()
// with ARM semantics for the subset the FlexARM1 implements (everything
// else is a no-op, as in the hardware).
package flexarm_tb_pkg;

  // ------------------------------------------------------------ encoder
  localparam logic [3:0] AL = 4'hE;

  function automatic logic [31:0] dp_imm(logic [3:0] cond, logic [3:0] op, logic s,
                                         logic [3:0] rn, logic [3:0] rd, logic [3:0] rot, logic [7:0] imm8);
    return {cond, 3'b001, op, s, rn, rd, rot, imm8};
  endfunction

  function automatic logic [31:0] dp_rsi(logic [3:0] cond, logic [3:0] op, logic s,
                                         logic [3:0] rn, logic [3:0] rd, logic [3:0] rm,
                                         logic [1:0] sh, logic [4:0] amt);
    return {cond, 3'b000, op, s, rn, rd, amt, sh, 1'b0, rm};
  endfunction

  function automatic logic [31:0] dp_rsr(logic [3:0] cond, logic [3:0] op, logic s,
                                         logic [3:0] rn, logic [3:0] rd, logic [3:0] rm,
                                         logic [1:0] sh, logic [3:0] rs);
    return {cond, 3'b000, op, s, rn, rd, rs, 1'b0, sh, 1'b1, rm};
  endfunction

  function automatic logic [31:0] ls_imm(logic [3:0] cond, logic l, logic b, logic u,
                                         logic [3:0] rn, logic [3:0] rd, logic [11:0] off);
    return {cond, 3'b010, 1'b1, u, b, 1'b0, l, rn, rd, off};
  endfunction

  function automatic logic [31:0] ls_reg(logic [3:0] cond, logic l, logic b, logic u,
                                         logic [3:0] rn, logic [3:0] rd, logic [3:0] rm,
                                         logic [1:0] sh, logic [4:0] amt);
    return {cond, 3'b011, 1'b1, u, b, 1'b0, l, rn, rd, amt, sh, 1'b0, rm};
  endfunction

  function automatic logic [31:0] br(logic [3:0] cond, logic link, int off_words);
    logic [23:0] o;
    o = 24'(off_words);
    return {cond, 3'b101, link, o};
  endfunction

  // ------------------------------------------------------------ reference
  function automatic bit cond_ref(logic [3:0] c, bit n, bit z, bit cf, bit v);
    case (c)
      4'h0: return z;            4'h1: return !z;
      4'h2: return cf;           4'h3: return !cf;
      4'h4: return n;            4'h5: return !n;
      4'h6: return v;            4'h7: return !v;
      4'h8: return cf & !z;      4'h9: return !cf | z;
      4'hA: return n == v;       4'hB: return n != v;
      4'hC: return !z & (n == v);4'hD: return z | (n != v);
      4'hE: return 1;            default: return 0;
    endcase
  endfunction

  // Shift one bit at a time. imm_form selects the instruction-field rules.
  function automatic void shift_ref(logic [31:0] din, logic [1:0] typ, int amt, bit imm_form,
                                    bit cin, output logic [31:0] dout, output bit cout);
    logic [31:0] v;
    bit c;
    int n;
    v = din; c = cin; n = amt;
    if (imm_form) begin
      if (typ == 2'd3 && amt == 0) begin
        dout = {cin, din[31:1]}; cout = din[0]; return;
      end
      if ((typ == 2'd1 || typ == 2'd2) && amt == 0) n = 32;
    end
    for (int i = 0; i < n; i++) begin
      case (typ)
        2'd0: begin c = v[31]; v = v << 1; end
        2'd1: begin c = v[0];  v = v >> 1; end
        2'd2: begin c = v[0];  v = {v[31], v[31:1]}; end
        default: begin c = v[0]; v = {v[0], v[31:1]}; end
      endcase
    end
    dout = v; cout = c;
  endfunction

  // Data-processing reference: returns result and new flags.
  function automatic void alu_ref(logic [3:0] op, logic [31:0] a, logic [31:0] b, bit cin, bit shc,
                                  bit vin, output logic [31:0] y, output bit n, output bit z,
                                  output bit c, output bit v);
    longint sa, sb, sr;
    longint unsigned ua, ub, ur;
    bit arith;
    ua = a; ub = b; sa = $signed(a); sb = $signed(b);
    arith = 1; c = shc; v = vin; ur = 0; sr = 0;
    case (op)
      4'h2, 4'hA: begin ur = ua - ub;          sr = sa - sb;          c = (ua >= ub); end
      4'h3:       begin ur = ub - ua;          sr = sb - sa;          c = (ub >= ua); end
      4'h4, 4'hB: begin ur = ua + ub;          sr = sa + sb;          c = ur[32];     end
      4'h5:       begin ur = ua + ub + cin;    sr = sa + sb + cin;    c = ur[32];     end
      4'h6:       begin ur = ua - ub - !cin;   sr = sa - sb - !cin;   c = (ua >= ub + !cin); end
      4'h7:       begin ur = ub - ua - !cin;   sr = sb - sa - !cin;   c = (ub >= ua + !cin); end
      default: arith = 0;
    endcase
    case (op)
      4'h0, 4'h8: y = a & b;
      4'h1, 4'h9: y = a ^ b;
      4'hC: y = a | b;
      4'hD: y = b;
      4'hE: y = a & ~b;
      4'hF: y = ~b;
      default: y = ur[31:0];
    endcase
    if (arith) v = (sr > 64'sd2147483647) || (sr < -64'sd2147483648);
    n = y[31]; z = (y == 0);
  endfunction

  class iss_t;
    logic [31:0] r[16];
    bit n, z, c, v;
    logic [31:0] mem[int];     // word address -> word
    logic [31:0] led, sw;
    int unsigned ram_words;

    function new(int unsigned words);
      ram_words = words;
      foreach (r[i]) r[i] = 0;
      n = 0; z = 0; c = 0; v = 0; led = 0; sw = 0;
    endfunction

    function logic [31:0] rd_reg(int i, logic [31:0] pc);
      return (i == 15) ? pc + 8 : r[i];
    endfunction

    function logic [31:0] rd_mem(logic [31:0] addr);
      int wa;
      if (addr[31]) return addr[2] ? sw : led;
      wa = int'(addr[31:2]) % int'(ram_words);
      return mem.exists(wa) ? mem[wa] : 32'hDEAD_BEEF;
    endfunction

    // Executes the instruction at pc, returns the next pc.
    function logic [31:0] step(logic [31:0] pc, logic [31:0] ins);
      logic [31:0] op2, res, a, addr, w;
      bit sc, nn, zz, cc, vv;
      int wa, lane;
      if (!cond_ref(ins[31:28], n, z, c, v)) return pc + 4;
      if (ins[27:26] == 2'b00) begin
        if ((ins[25] == 0 && ins[7] && ins[4]) || (ins[24:23] == 2'b10 && !ins[20])) return pc + 4;
        if (ins[25]) begin
          op2 = {24'd0, ins[7:0]};
          for (int i = 0; i < 2 * ins[11:8]; i++) op2 = {op2[0], op2[31:1]};
          sc = (ins[11:8] != 0) ? op2[31] : c;
        end else if (ins[4]) begin
          shift_ref(rd_reg(ins[3:0], pc), ins[6:5], int'(rd_reg(ins[11:8], pc) & 32'hFF), 0, c, op2, sc);
        end else begin
          shift_ref(rd_reg(ins[3:0], pc), ins[6:5], int'(ins[11:7]), 1, c, op2, sc);
        end
        alu_ref(ins[24:21], rd_reg(ins[19:16], pc), op2, c, sc, v, res, nn, zz, cc, vv);
        if (ins[20]) begin n = nn; z = zz; c = cc; v = vv; end
        if (ins[24:23] != 2'b10) begin
          if (ins[15:12] == 15) return {res[31:2], 2'b00};
          r[ins[15:12]] = res;
        end
        return pc + 4;
      end else if (ins[27:26] == 2'b01) begin
        if ((ins[25] && ins[4]) || !ins[24] || ins[21] || (ins[20] && ins[15:12] == 15)) return pc + 4;
        if (ins[25]) shift_ref(rd_reg(ins[3:0], pc), ins[6:5], int'(ins[11:7]), 1, c, op2, sc);
        else         op2 = {20'd0, ins[11:0]};
        a = rd_reg(ins[19:16], pc);
        addr = ins[23] ? a + op2 : a - op2;
        if (ins[20]) begin
          w = rd_mem(addr);
          if (ins[22]) w = {24'd0, w[8*addr[1:0] +: 8]};
          r[ins[15:12]] = w;
        end else begin
          w = rd_reg(ins[15:12], pc);
          if (addr[31]) begin
            if (!addr[2]) begin
              if (ins[22]) led[8*addr[1:0] +: 8] = w[7:0]; else led = w;
            end
          end else begin
            wa = int'(addr[31:2]) % int'(ram_words);
            if (ins[22]) begin
              logic [31:0] old;
              old = rd_mem(addr);
              lane = int'(addr[1:0]);
              old[8*lane +: 8] = w[7:0];
              mem[wa] = old;
            end else mem[wa] = w;
          end
        end
        return pc + 4;
      end else if (ins[27:25] == 3'b101) begin
        if (ins[24]) r[14] = pc + 4;
        return pc + 8 + {{6{ins[23]}}, ins[23:0], 2'b00};
      end
      return pc + 4;
    endfunction
  endclass

endpackage
