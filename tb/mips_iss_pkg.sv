// mips_iss_pkg: instruction-level reference model of one MIPS slice, for
// testbenches.
//
// The class executes a program one instruction at a time with no pipeline,
// using the architectural rules only (PC counts words, branch target is
// PC+1+offset, no delay slot, word-addressed data memory, signed mult into
// hi/lo). It records every register write in order, so a testbench can
// compare the pipelined slice's write-back stream, final registers and
// final memory with it. Execution stops at an instruction that jumps to
// itself or after a step limit.
package mips_iss_pkg;

  class mips_iss;
    int unsigned imem_depth;
    int unsigned dmem_depth;
    logic [31:0] imem [];
    logic [31:0] dmem [];
    logic [31:0] regs [32];
    logic [31:0] hi, lo;
    logic [31:0] pc;
    // register write trace
    logic [4:0]  wr_dest [$];
    logic [31:0] wr_val  [$];
    int unsigned steps;

    function new(int unsigned idepth, int unsigned ddepth);
      imem_depth = idepth;
      dmem_depth = ddepth;
      imem = new[idepth];
      dmem = new[ddepth];
      foreach (imem[i]) imem[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      foreach (regs[i]) regs[i] = '0;
      hi = '0; lo = '0; pc = '0; steps = 0;
    endfunction

    function void load_word(int unsigned addr, logic [31:0] w);
      imem[addr] = w;
    endfunction

    function void wr(logic [4:0] d, logic [31:0] v);
      if (d != 0) begin
        regs[d] = v;
        wr_dest.push_back(d);
        wr_val.push_back(v);
      end
    endfunction

    // Execute one instruction; returns 1 when the instruction jumps to itself.
    function bit step();
      logic [31:0] ins, a, b, sx, zx, npc;
      logic [5:0]  op, fn;
      logic [4:0]  rs, rt, rd, sh;
      logic signed [63:0] prod;
      bit halt;
      ins = imem[pc % imem_depth];
      op = ins[31:26]; fn = ins[5:0];
      rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11]; sh = ins[10:6];
      a  = regs[rs]; b = regs[rt];
      sx = {{16{ins[15]}}, ins[15:0]};
      zx = {16'h0, ins[15:0]};
      npc = pc + 1;
      halt = 0;
      case (op)
        6'h00: case (fn)
          6'h00: wr(rd, b << sh);
          6'h02: wr(rd, b >> sh);
          6'h08: npc = a;
          6'h10: wr(rd, hi);
          6'h12: wr(rd, lo);
          6'h18: begin prod = $signed(a) * $signed(b); hi = prod[63:32]; lo = prod[31:0]; end
          6'h20, 6'h21: wr(rd, a + b);
          6'h22, 6'h23: wr(rd, a - b);
          6'h24: wr(rd, a & b);
          6'h25: wr(rd, a | b);
          6'h26: wr(rd, a ^ b);
          6'h27: wr(rd, ~(a | b));
          6'h2A: wr(rd, ($signed(a) < $signed(b)) ? 32'd1 : 32'd0);
          default: ;
        endcase
        6'h02: npc = {npc[31:26], ins[25:0]};
        6'h03: begin wr(5'd31, npc); npc = {npc[31:26], ins[25:0]}; end
        6'h04: if (a == b) npc = npc + sx;
        6'h05: if (a != b) npc = npc + sx;
        6'h08, 6'h09: wr(rt, a + sx);
        6'h0A: wr(rt, ($signed(a) < $signed(sx)) ? 32'd1 : 32'd0);
        6'h0C: wr(rt, a & zx);
        6'h0D: wr(rt, a | zx);
        6'h0E: wr(rt, a ^ zx);
        6'h0F: wr(rt, {ins[15:0], 16'h0});
        6'h23: wr(rt, dmem[(a + sx) % dmem_depth]);
        6'h2B: dmem[(a + sx) % dmem_depth] = b;
        default: ;
      endcase
      if (npc == pc) halt = 1;
      pc = npc;
      steps++;
      return halt;
    endfunction

    function void run(int unsigned max_steps);
      for (int unsigned i = 0; i < max_steps; i++)
        if (step()) break;
    endfunction
  endclass

endpackage
