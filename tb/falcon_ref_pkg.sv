// falcon_ref_pkg: reference model and assembler for Falcon testbenches.
//
// The functions compute the architectural result of each SIMD operation
// directly from its definition, lane by lane, without the datapath structure
// of the RTL (no exec units, no multi-pass network, no digit-serial
// multiply). falcon_model interprets a program given as a list of
// instruction records, loops included, and assemble() turns the same list
// into the 16-bit instruction stream. Together they let a testbench generate
// a program, run it on the RTL and compare every output word.
package falcon_ref_pkg;
  import falcon_pkg::*;

  typedef logic [255:0] v256_t;

  function automatic int unsigned wbits(input int w);
    return 8 << w;
  endfunction

  function automatic v256_t lane_get_mask(input int w);
    return (w == 5) ? '1 : ((v256_t'(1) << wbits(w)) - 1);
  endfunction

  function automatic v256_t r_lanewise(input v256_t a, input v256_t b, input int w, input int kind);
    v256_t r, m, la, lb;
    logic [511:0] p;
    int unsigned W;
    W = wbits(w);
    m = lane_get_mask(w);
    r = '0;
    for (int l = 0; l < 256 / W; l++) begin
      la = (a >> (l * W)) & m;
      lb = (b >> (l * W)) & m;
      case (kind)
        0: p = 512'(la) + 512'(lb);
        1: p = 512'(la) - 512'(lb);
        default: p = 512'(la) * 512'(lb);
      endcase
      r |= (p[255:0] & m) << (l * W);
    end
    return r;
  endfunction

  function automatic v256_t r_shift(input v256_t a, input int w, input int kind, input int amt);
    v256_t r, m, la, t;
    int unsigned W, s;
    W = wbits(w);
    m = lane_get_mask(w);
    r = '0;
    for (int l = 0; l < 256 / W; l++) begin
      la = (a >> (l * W)) & m;
      s  = amt % W;
      case (kind)
        0: t = (amt >= W) ? '0 : (la << amt) & m;
        1: t = (amt >= W) ? '0 : la >> amt;
        2: t = ((la << s) | (s == 0 ? '0 : la >> (W - s))) & m;
        default: t = ((la >> s) | (s == 0 ? '0 : la << (W - s))) & m;
      endcase
      r |= t << (l * W);
    end
    return r;
  endfunction

  function automatic v256_t r_perm(input v256_t idx, input v256_t data, input int w);
    v256_t r, m;
    int unsigned W, N, s;
    W = wbits(w);
    N = 256 / W;
    m = lane_get_mask(w);
    r = '0;
    for (int l = 0; l < N; l++) begin
      s = 32'((idx >> (l * W)) & 256'hffff) % N;
      r |= ((data >> (s * W)) & m) << (l * W);
    end
    return r;
  endfunction

  function automatic logic lane_masked(input logic [31:0] mask, input int w, input int lane);
    return mask[lane * (wbits(w) / 8)];
  endfunction

  function automatic v256_t r_bslice(input v256_t x, input int w, input logic [31:0] mask);
    v256_t r;
    int unsigned W, N;
    W = wbits(w);
    N = 256 / W;
    r = '0;
    for (int j = 0; j < N; j++)
      if (!lane_masked(mask, w, j))
        for (int i = 0; i < W; i++) r[i * N + j] = x[j * W + i];
    return r;
  endfunction

  function automatic v256_t r_spread(input v256_t v, input int lw, input int w);
    v256_t r, vm;
    int unsigned L, W;
    L = wbits(lw);
    W = wbits(w);
    vm = v & lane_get_mask(lw);
    r = '0;
    if (L >= W) begin
      for (int k = 0; k < 256 / L; k++) r |= vm << (k * L);
    end else begin
      for (int k = 0; k < 256 / W; k++) r |= vm << (k * W);
    end
    return r;
  endfunction

  function automatic logic [31:0] r_be(input logic [31:0] mask, input int w);
    logic [31:0] be;
    int unsigned bpl;
    bpl = wbits(w) / 8;
    for (int b = 0; b < 32; b++) be[b] = !mask[(b / bpl) * bpl];
    return be;
  endfunction

  function automatic v256_t r_merge(input v256_t old_v, input v256_t new_v, input logic [31:0] be);
    v256_t r;
    for (int b = 0; b < 32; b++) r[8*b +: 8] = be[b] ? new_v[8*b +: 8] : old_v[8*b +: 8];
    return r;
  endfunction

  function automatic logic [31:0] r_setmask(input v256_t src, input int w);
    logic [31:0] m;
    int unsigned bpl;
    bpl = wbits(w) / 8;
    for (int b = 0; b < 32; b++) m[b] = src[(b / bpl) * bpl * 8];
    return m;
  endfunction

  // One instruction of a test program.
  typedef struct {
    opcode_e op;
    int      rd, rs2, rs3, imm7;
    int      lw;      // LDi immediate width code
    v256_t   val;     // LDi immediate
    int      count;   // LOOP_BEGIN count
  } instr_t;

  function automatic instr_t mk(input opcode_e op, input int rd = 0, input int rs2 = 0,
                                input int rs3 = 0, input int imm7 = 0);
    instr_t i;
    // R3 is encoded in three bits and takes its top bit from R1.
    i.op = op; i.rd = rd; i.rs2 = rs2; i.rs3 = (rd & 8) | (rs3 & 7); i.imm7 = imm7;
    i.lw = 0; i.val = '0; i.count = 0;
    return i;
  endfunction

  function automatic instr_t mk_ldi(input int rd, input int lw, input v256_t val);
    instr_t i;
    i = mk(OP_LDI, rd);
    i.lw = lw;
    i.val = val & lane_get_mask(lw);
    return i;
  endfunction

  function automatic instr_t mk_loop(input int count);
    instr_t i;
    i = mk(OP_LOOPB);
    i.count = count;
    return i;
  endfunction

  // ISA-level interpreter.
  class falcon_model;
    v256_t       regs[16];
    int          width;
    logic [31:0] mask;
    logic [31:0] inq[$];
    logic [31:0] outq[$];
    logic [31:0] mem[int unsigned];
    int          executed;
    bit          trace;

    function new();
      foreach (regs[r]) regs[r] = '0;
      width = 0; mask = '0; executed = 0;
    endfunction

    function void wr(int rd, v256_t v);
      regs[rd] = r_merge(regs[rd], v, r_be(mask, width));
    endfunction

    function void exec(instr_t i);
      v256_t a, b, c, t;
      a = regs[i.rd]; b = regs[i.rs2]; c = regs[i.rs3];
      executed++;
      case (i.op)
        OP_SETW:   width = i.imm7;
        OP_SETM:   mask = r_setmask(a, width);
        OP_LDI:    wr(i.rd, r_spread(i.val, i.lw, width));
        OP_PERM:   wr(i.rd, r_perm(b, c, width));
        OP_BSLICE: regs[i.rd] = r_bslice(b, width, mask);
        OP_ADD:    wr(i.rd, r_lanewise(b, c, width, 0));
        OP_SUB:    wr(i.rd, r_lanewise(b, c, width, 1));
        OP_MUL:    wr(i.rd, r_lanewise(b, c, width, 2));
        OP_AND:    wr(i.rd, b & c);
        OP_OR:     wr(i.rd, b | c);
        OP_XOR:    wr(i.rd, b ^ c);
        OP_NOT:    wr(i.rd, ~b);
        OP_MOV:    wr(i.rd, b);
        OP_SLI:    wr(i.rd, r_shift(a, width, 0, i.imm7));
        OP_SRI:    wr(i.rd, r_shift(a, width, 1, i.imm7));
        OP_ROLI:   wr(i.rd, r_shift(a, width, 2, i.imm7));
        OP_RORI:   wr(i.rd, r_shift(a, width, 3, i.imm7));
        OP_IN: begin
          t = '0;
          for (int k = 0; k < 8; k++) t[32*k +: 32] = inq.pop_front();
          wr(i.rd, t);
        end
        OP_OUT: for (int k = 0; k < 8; k++) outq.push_back(a[32*k +: 32]);
        OP_LD: begin
          t = '0;
          for (int k = 0; k < 8; k++)
            t[32*k +: 32] = mem.exists(b[31:0] + 4*k) ? mem[b[31:0] + 4*k] : 32'h0;
          wr(i.rd, t);
        end
        OP_ST: for (int k = 0; k < 8; k++) mem[b[31:0] + 4*k] = a[32*k +: 32];
        default: ;
      endcase
      if (trace) $display("model: %s rd=%0d rs2=%0d rs3=%0d w=%0d -> %h", i.op.name(), i.rd, i.rs2, i.rs3,
                          width, regs[i.rd]);
    endfunction

    // Run a whole program, loops included; stops at HALT.
    function void run(instr_t prog[$]);
      int pc, lp[$], lc[$];
      pc = 0;
      while (pc < prog.size()) begin
        instr_t i;
        i = prog[pc];
        if (i.op == OP_HALT) break;
        if (i.op == OP_LOOPB) begin
          lp.push_back(pc + 1);
          lc.push_back(i.count);
          pc++;
        end else if (i.op == OP_LOOPE) begin
          if (lc[$] > 0) begin
            lc[$] = lc[$] - 1;
            pc = lp[$];
          end else begin
            void'(lp.pop_back());
            void'(lc.pop_back());
            pc++;
          end
        end else begin
          exec(i);
          pc++;
        end
      end
    endfunction
  endclass

  // Assembler: instruction records to 16-bit words.
  function automatic void assemble(instr_t prog[$], ref logic [15:0] hw[$]);
    hw.delete();
    foreach (prog[n]) begin
      instr_t i;
      i = prog[n];
      case (i.op)
        OP_LOOPB, OP_LOOPE: begin
          if (hw.size() % 2 == 1) hw.push_back(16'h0);   // align with a NOP
          hw.push_back({5'(i.op), 11'(i.count)});
          hw.push_back(16'h0);
        end
        OP_LDI: begin
          hw.push_back({5'(OP_LDI), 7'(i.lw), 4'(i.rd)});
          for (int k = 0; k < int'(ldi_halfwords(wcode_t'(i.lw))); k++)
            hw.push_back(i.val[16*k +: 16]);
        end
        OP_SETW, OP_SLI, OP_SRI, OP_ROLI, OP_RORI:
          hw.push_back({5'(i.op), 7'(i.imm7), 4'(i.rd)});
        default:
          hw.push_back({5'(i.op), 3'(i.rs3), 4'(i.rs2), 4'(i.rd)});
      endcase
    end
    if (hw.size() % 2 == 1) hw.push_back(16'h0);
  endfunction

endpackage
