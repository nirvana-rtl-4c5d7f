// tb_insn_filter: self-checking test of the two instruction-type filters.
// A directed list of RV32I and compressed encodings with known classes is
// applied to both instances, followed by random words classified by an
// independent reference decoder written from the RISC-V opcode map.
module tb_insn_filter;
  import nirvana_pkg::*;

  logic   frame_valid;
  frame_t frame;
  logic   m_v, j_v;
  logic [XLEN-1:0]  m_pc, j_pc;
  logic [CNT_W-1:0] m_cnt, j_cnt;
  int checks = 0, failures = 0;

  insn_filter #(.CLASS(CLASS_MEMIO)) u_m (.frame_valid, .frame,
    .sel_valid(m_v), .sel_pc(m_pc), .sel_cnt(m_cnt));
  insn_filter #(.CLASS(CLASS_JUMP))  u_j (.frame_valid, .frame,
    .sel_valid(j_v), .sel_pc(j_pc), .sel_cnt(j_cnt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: returns 1 for memory, 2 for jump, 0 otherwise.
  function automatic int ref_class(logic [31:0] w);
    logic [6:0] op;
    logic [2:0] f3;
    op = w[6:0];
    f3 = w[15:13];
    case (w[1:0])
      2'b00: return (f3 inside {3'b001, 3'b010, 3'b011, 3'b101, 3'b110, 3'b111}) ? 1 : 0;
      2'b01: return (f3 inside {3'b001, 3'b101}) ? 2 : 0;
      2'b10: begin
        if (f3 inside {3'b001, 3'b010, 3'b011, 3'b101, 3'b110, 3'b111}) return 1;
        if (f3 == 3'b100 && w[12] == 1'b0 && w[6:2] == 0 && w[11:7] != 0) return 2; // c.jr
        if (f3 == 3'b100 && w[12] == 1'b1 && w[6:2] == 0 && w[11:7] != 0) return 2; // c.jalr
        return 0;
      end
      default: begin
        if (op inside {7'h03, 7'h07, 7'h23, 7'h27, 7'h2f}) return 1;
        if (op inside {7'h6f, 7'h67}) return 2;
        return 0;
      end
    endcase
  endfunction

  task automatic apply(logic [31:0] w, logic v, int exp);
    frame_valid = v;
    frame.instr = w;
    frame.pc    = $urandom;
    frame.cnt   = {$urandom, $urandom};
    #1;
    checks++;
    if (m_v != (v && exp == 1) || j_v != (v && exp == 2) ||
        m_pc != frame.pc || j_cnt != frame.cnt) begin
      failures++;
      if (failures < 10) $display("instr %h valid %0d: mem %0d jump %0d, expected class %0d", w, v, m_v, j_v, exp);
    end
  endtask

  initial begin
    // directed
    apply(32'h0004_a503, 1, 1);  // lw a0,0(s1)
    apply(32'h00a4_a023, 1, 1);  // sw a0,0(s1)
    apply(32'h0000_006f, 1, 2);  // jal x0,0
    apply(32'h0000_80e7, 1, 2);  // jalr ra,0(ra)
    apply(32'h00b5_0533, 1, 0);  // add
    apply(32'h00b5_0463, 1, 0);  // beq (conditional, not selected)
    apply(32'h0000_4108, 1, 1);  // c.lw a0,0(a0)
    apply(32'h0000_c108, 1, 1);  // c.sw
    apply(32'h0000_a001, 1, 2);  // c.j
    apply(32'h0000_8082, 1, 2);  // c.jr ra (ret)
    apply(32'h0000_9082, 1, 2);  // c.jalr ra
    apply(32'h0000_8002, 1, 0);  // c.jr x0 is reserved, not a jump
    apply(32'h0000_0001, 1, 0);  // c.nop
    apply(32'h0004_a503, 0, 1);  // invalid frame: nothing selected
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] w;
      w = $urandom;
      if ($urandom_range(0, 1) == 1) w[1:0] = 2'b11;
      apply(w, $urandom_range(0, 3) != 0, ref_class(w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
