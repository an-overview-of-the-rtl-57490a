// fm9001_ref_pkg: instruction-level reference model of the FM9001, for the
// testbenches. It executes one whole instruction at a time on a copy of the
// architectural state (16 registers, four flags and a word memory of 2^AW
// words, addresses taken modulo its size) and reports how many bus accesses
// the instruction made, from which the testbenches predict cycle counts.
// Flags are computed from wide integer arithmetic, independently of the
// adder-based formulation of the RTL.
package fm9001_ref_pkg;

  class fm9001_ref;
    logic [31:0] regs [16];
    logic        c, v, n, z;
    logic [31:0] mem [];
    int unsigned aw;
    logic [3:0]  pcr;
    // Bus activity of the last instruction.
    int unsigned last_reads, last_writes;
    bit          last_store;

    function new(int unsigned aw_i);
      aw  = aw_i;
      mem = new[1 << aw_i];
      foreach (mem[i]) mem[i] = '0;
      foreach (regs[i]) regs[i] = '0;
      {c, v, n, z} = '0;
      pcr = 4'd15;
    endfunction

    function logic [31:0] rd(logic [31:0] addr);
      return mem[addr & ((32'd1 << aw) - 1)];
    endfunction

    function void wr(logic [31:0] addr, logic [31:0] d);
      mem[addr & ((32'd1 << aw) - 1)] = d;
    endfunction

    static function bit cond(logic [3:0] cc, logic fc, logic fv, logic fn, logic fz);
      case (cc)
        4'd0:  return !fc;
        4'd1:  return fc;
        4'd2:  return !fv;
        4'd3:  return fv;
        4'd4:  return !fn;
        4'd5:  return fn;
        4'd6:  return !fz;
        4'd7:  return fz;
        4'd8:  return !fc && !fz;
        4'd9:  return fc || fz;
        4'd10: return fn == fv;
        4'd11: return fn != fv;
        4'd12: return (fn == fv) && !fz;
        4'd13: return fz || (fn != fv);
        4'd14: return 1'b1;
        default: return 1'b0;
      endcase
    endfunction

    // Result and flags of one ALU operation, by integer arithmetic.
    static function void alu(logic [3:0] op, logic [31:0] a, logic [31:0] b, logic cin,
                             output logic [31:0] r, output logic co, output logic vo);
      longint ua, ub, sa, sb, t, st;
      ua = longint'(a); ub = longint'(b);
      sa = longint'($signed(a)); sb = longint'($signed(b));
      co = 1'b0; vo = 1'b0;
      case (op)
        4'd1, 4'd2, 4'd3: begin   // INC, ADDC, ADD: x + y + k
          longint ux, uy, sx, sy, k;
          if (op == 4'd1) begin ux = ua; uy = 1; sx = sa; sy = 1; k = 0; end
          else begin ux = ub; uy = ua; sx = sb; sy = sa; k = (op == 4'd2) ? longint'(cin) : 0; end
          t  = ux + uy + k;
          st = sx + sy + k;
          r  = t[31:0];
          co = (t > 64'sh0_FFFF_FFFF);
          vo = (st > 64'sh7FFF_FFFF) || (st < -64'sh8000_0000);
        end
        4'd4, 4'd5, 4'd6, 4'd7: begin   // NEG, DEC, SUBB, SUB: x - y - k
          longint ux, uy, sx, sy, k;
          k = 0;
          case (op)
            4'd4: begin ux = 0;  uy = ua; sx = 0;  sy = sa; end
            4'd5: begin ux = ua; uy = 1;  sx = sa; sy = 1;  end
            default: begin ux = ub; uy = ua; sx = sb; sy = sa;
                           k = (op == 4'd6) ? longint'(cin) : 0; end
          endcase
          t  = ux - uy - k;
          st = sx - sy - k;
          r  = t[31:0];
          co = (ux < uy + k);
          vo = (st > 64'sh7FFF_FFFF) || (st < -64'sh8000_0000);
        end
        4'd8:  begin r = (a >> 1) | (32'(cin) << 31); co = a[0]; end
        4'd9:  begin r = 32'($signed(a) >>> 1); co = a[0]; end
        4'd10: begin r = a >> 1; co = a[0]; end
        4'd11: r = a ^ b;
        4'd12: r = a | b;
        4'd13: r = a & b;
        4'd14: r = ~a;
        default: r = a;
      endcase
    endfunction

    // Execute the instruction at the PC.
    function void step();
      logic [31:0] ins, a, b, addr_b, r;
      logic [3:0]  op, cc, ra, rb;
      logic [1:0]  ma, mb;
      logic        co, vo, st;
      last_reads = 1; last_writes = 0;
      ins = rd(regs[pcr]);
      regs[pcr] = regs[pcr] + 1;
      op = ins[27:24]; cc = ins[23:20];
      mb = ins[15:14]; rb = ins[13:10];
      ma = ins[5:4];   ra = ins[3:0];
      if (ins[9]) a = {{23{ins[8]}}, ins[8:0]};
      else begin
        case (ma)
          2'd0: a = regs[ra];
          2'd1: begin a = rd(regs[ra]); last_reads++; end
          2'd2: begin regs[ra] = regs[ra] - 1; a = rd(regs[ra]); last_reads++; end
          default: begin a = rd(regs[ra]); regs[ra] = regs[ra] + 1; last_reads++; end
        endcase
      end
      addr_b = regs[rb];
      case (mb)
        2'd0: ;
        2'd1: ;
        2'd2: begin regs[rb] = regs[rb] - 1; addr_b = regs[rb]; end
        default: regs[rb] = regs[rb] + 1;
      endcase
      b = (mb == 2'd0) ? regs[rb] : rd(addr_b);
      if (mb != 2'd0 && (op inside {4'd2, 4'd3, 4'd6, 4'd7, 4'd11, 4'd12, 4'd13}))
        last_reads++;
      alu(op, a, b, c, r, co, vo);
      st = cond(cc, c, v, n, z);
      last_store = st;
      if (ins[19]) c = co;
      if (ins[18]) v = vo;
      if (ins[17]) n = r[31];
      if (ins[16]) z = (r == 0);
      if (st) begin
        if (mb == 2'd0) regs[rb] = r;
        else begin wr(addr_b, r); last_writes = 1; end
      end
    endfunction
  endclass

  // Instruction word builders for directed programs.
  function automatic logic [31:0] ins2(logic [3:0] op, logic [3:0] cc, logic [3:0] cvnz,
                                       logic [1:0] mb, logic [3:0] rb,
                                       logic [1:0] ma, logic [3:0] ra);
    return {4'd0, op, cc, cvnz, mb, rb, 1'b0, 3'd0, ma, ra};
  endfunction

  function automatic logic [31:0] insi(logic [3:0] op, logic [3:0] cc, logic [3:0] cvnz,
                                       logic [1:0] mb, logic [3:0] rb, logic [8:0] imm);
    return {4'd0, op, cc, cvnz, mb, rb, 1'b1, imm};
  endfunction

endpackage
