// dla_tb_pkg: testbench helpers for the DLA: the flash content, a reference SFU,
// a small program builder and the expected results of that program.
//
// The test program computes, in every lane l, a P-word dot product of input memory A
// with the lane's weight rows 0..P-1 (the first DOT starts a fresh sum, the next ones
// accumulate in a BNZ loop, the last applies the SFU function FN with shift SH), then
// copies the int8 results of all lanes into input memory B word 0 and computes one
// recurrent step: a dot product of that word with weight row P, through hard tanh.
// Weights for lane l are (P+1) rows at flash byte address FBASE + l*(P+1)*VEC.
package dla_tb_pkg;
  import dla_pkg::*;

  localparam int FBASE = 'h100;

  function automatic logic [7:0] flash_byte(logic [31:0] a);
    return 8'((a * 32'd37) ^ (a >> 3) ^ 32'h5a);
  endfunction

  function automatic longint floordiv(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && (a < 0)) q -= 1;
    return q;
  endfunction

  function automatic longint lim(longint v, longint lo, longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic longint ref_sfu(longint xv, int f, int s);
    longint p = longint'(1) << s;
    longint r = floordiv(xv + p / 2, p);
    case (f)
      0: return xv;
      2: return lim(r, 0, 127);
      3: return lim(floordiv(r, 4) + 32, 0, 64);
      4: return lim(r, -64, 64);
      default: return lim(r, -128, 127);
    endcase
  endfunction

  function automatic longint wgt(int lanes_unused, int vec, int p, int lane, int k);
    return longint'($signed(flash_byte(32'(FBASE + lane * (p + 1) * vec + k))));
  endfunction

  // Build the test program.
  function automatic void build_program(int lanes, int vec, int p, int fn, int sh, int sh2,
                                        ref instr_t prog[$]);
    int loop_pc;
    prog.delete();
    prog.push_back(mk_instr(OP_LDI, 0, 0, 3'd0, 3'd0, 27'(FBASE)));
    prog.push_back(mk_instr(OP_LDI, 0, 0, 3'd1, 3'd0, 27'd0));
    for (int l = 0; l < lanes; l++) begin
      prog.push_back(mk_instr(OP_WLOAD, 0, 0, 3'd0, 3'd1, 27'((l << 12) | (p + 1))));
      prog.push_back(mk_instr(OP_ADDI, 0, 0, 3'd0, 3'd0, 27'((p + 1) * vec)));
    end
    prog.push_back(mk_instr(OP_LDI, 0, 0, 3'd2, 3'd0, 27'd0));
    prog.push_back(mk_instr(OP_LDI, 0, 0, 3'd3, 3'd0, 27'd0));
    prog.push_back(mk_instr(OP_DOT, 0, 0, 3'd2, 3'd3, 27'(SFU_PASS << 8)));
    prog.push_back(mk_instr(OP_ADDI, 0, 0, 3'd2, 3'd2, 27'd1));
    prog.push_back(mk_instr(OP_ADDI, 0, 0, 3'd3, 3'd3, 27'd1));
    if (p > 2) begin
      prog.push_back(mk_instr(OP_LDI, 0, 0, 3'd4, 3'd0, 27'(p - 2)));
      loop_pc = prog.size();
      prog.push_back(mk_instr(OP_DOT, 1, 0, 3'd2, 3'd3, 27'(SFU_PASS << 8)));
      prog.push_back(mk_instr(OP_ADDI, 0, 0, 3'd2, 3'd2, 27'd1));
      prog.push_back(mk_instr(OP_ADDI, 0, 0, 3'd3, 3'd3, 27'd1));
      prog.push_back(mk_instr(OP_ADDI, 0, 0, 3'd4, 3'd4, 27'h7ffffff));  // -1
      prog.push_back(mk_instr(OP_BNZ, 0, 0, 3'd4, 3'd0, 27'(loop_pc)));
    end
    prog.push_back(mk_instr(OP_DOT, 1, 0, 3'd2, 3'd3, 27'((sh << 11) | (fn << 8))));
    prog.push_back(mk_instr(OP_LDI, 0, 0, 3'd5, 3'd0, 27'd0));
    prog.push_back(mk_instr(OP_COPY, 0, 0, 3'd5, 3'd0, 27'd0));
    prog.push_back(mk_instr(OP_LDI, 0, 0, 3'd6, 3'd0, 27'(p)));
    prog.push_back(mk_instr(OP_DOT, 0, 1, 3'd5, 3'd6, 27'((sh2 << 11) | (int'(SFU_TANH) << 8) | 1)));
    prog.push_back(mk_instr(OP_HALT, 0, 0, 3'd0, 3'd0, 27'd0));
  endfunction

  // Expected accumulation entries 0 (layer output) and 1 (recurrent step) per lane.
  // Requires lanes == vec so that the copied word is fully defined.
  function automatic void expected(int lanes, int vec, int p, int fn, int sh, int sh2,
                                   const ref logic [7:0] in_bytes[$],
                                   ref longint res0[$], ref longint res1[$]);
    res0.delete();
    res1.delete();
    for (int l = 0; l < lanes; l++) begin
      longint s = 0;
      for (int k = 0; k < p * vec; k++) s += longint'($signed(in_bytes[k])) * wgt(lanes, vec, p, l, k);
      s = longint'(32'(s));
      res0.push_back(ref_sfu(s, fn, sh));
    end
    for (int l = 0; l < lanes; l++) begin
      longint s = 0;
      for (int j = 0; j < vec; j++) s += longint'($signed(8'(res0[j]))) * wgt(lanes, vec, p, l, p * vec + j);
      res1.push_back(ref_sfu(s, 4, sh2));
    end
  endfunction

endpackage
