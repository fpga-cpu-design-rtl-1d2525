// Reference instruction-set model of RV32I for checking the pipeline.
//
// rv32i_ref executes one instruction per call of step() on its own register
// file and a word memory of MEM_WORDS words (addresses wrap), and reports the
// register write the instruction makes, if any. FENCE and SYSTEM
// instructions do nothing; counter reads are not modelled (they depend on
// timing), so test programs that compare against this model avoid them.
package rv32i_ref_pkg;
  localparam int MEM_WORDS = 4096;

  class rv32i_ref;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] mem [MEM_WORDS];

    function new(logic [31:0] reset_pc);
      pc = reset_pc;
      foreach (x[i]) x[i] = 0;
      foreach (mem[i]) mem[i] = 0;
    endfunction

    function logic [31:0] rd32(logic [31:0] a);
      return mem[(a >> 2) % MEM_WORDS];
    endfunction

    function void wr(logic [31:0] a, logic [31:0] d, logic [3:0] be);
      int idx = (a >> 2) % MEM_WORDS;
      for (int i = 0; i < 4; i++) if (be[i]) mem[idx][8*i +: 8] = d[8*i +: 8];
    endfunction

    function void step(output logic wen, output logic [4:0] rd, output logic [31:0] val);
      logic [31:0] insn, rs1v, rs2v, immi, imms, immb, immu, immj, npc, a, w;
      logic [2:0] f3;
      logic signed [31:0] s1, s2;
      insn = rd32(pc);
      rd = insn[11:7]; f3 = insn[14:12];
      rs1v = x[insn[19:15]]; rs2v = x[insn[24:20]];
      s1 = rs1v; s2 = rs2v;
      immi = {{20{insn[31]}}, insn[31:20]};
      imms = {{20{insn[31]}}, insn[31:25], insn[11:7]};
      immb = {{19{insn[31]}}, insn[31], insn[7], insn[30:25], insn[11:8], 1'b0};
      immu = {insn[31:12], 12'b0};
      immj = {{11{insn[31]}}, insn[31], insn[19:12], insn[20], insn[30:21], 1'b0};
      npc = pc + 4; wen = 0; val = 0;
      case (insn[6:0])
        7'h37: begin wen = 1; val = immu; end
        7'h17: begin wen = 1; val = pc + immu; end
        7'h6f: begin wen = 1; val = pc + 4; npc = pc + immj; end
        7'h67: begin wen = 1; val = pc + 4; npc = (rs1v + immi) & ~32'd1; end
        7'h63: begin
          logic t;
          case (f3)
            3'd0: t = rs1v == rs2v;
            3'd1: t = rs1v != rs2v;
            3'd4: t = s1 < s2;
            3'd5: t = s1 >= s2;
            3'd6: t = rs1v < rs2v;
            default: t = rs1v >= rs2v;
          endcase
          if (t) npc = pc + immb;
        end
        7'h03: begin
          a = rs1v + immi; w = rd32(a) >> (8 * a[1:0]); wen = 1;
          case (f3)
            3'd0: val = {{24{w[7]}}, w[7:0]};
            3'd1: val = {{16{w[15]}}, w[15:0]};
            3'd4: val = {24'd0, w[7:0]};
            3'd5: val = {16'd0, w[15:0]};
            default: val = w;
          endcase
        end
        7'h23: begin
          a = rs1v + imms;
          case (f3)
            3'd0: wr(a, {4{rs2v[7:0]}}, 4'b0001 << a[1:0]);
            3'd1: wr(a, {2{rs2v[15:0]}}, 4'b0011 << a[1:0]);
            default: wr(a, rs2v, 4'b1111);
          endcase
        end
        7'h13, 7'h33: begin
          logic [31:0] b = (insn[6:0] == 7'h33) ? rs2v : immi;
          logic alt = insn[30];
          wen = 1;
          case (f3)
            3'd0: val = (insn[6:0] == 7'h33 && alt) ? rs1v - b : rs1v + b;
            3'd1: val = rs1v << b[4:0];
            3'd2: val = {31'd0, s1 < $signed(b)};
            3'd3: val = {31'd0, rs1v < b};
            3'd4: val = rs1v ^ b;
            3'd5: val = alt ? $unsigned(s1 >>> b[4:0]) : rs1v >> b[4:0];
            3'd6: val = rs1v | b;
            default: val = rs1v & b;
          endcase
        end
        default: ;
      endcase
      if (rd == 0) wen = 0;
      if (wen) x[rd] = val;
      pc = npc;
    endfunction
  endclass
endpackage
