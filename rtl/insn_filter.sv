// insn_filter: instruction-type filter of the feature extractor.
//
// Passes on only the debug frames whose instruction belongs to one class,
// chosen by the CLASS parameter:
//   CLASS_MEMIO  loads and stores: LOAD, LOAD-FP, STORE, STORE-FP and AMO
//                major opcodes, and the compressed C.LW/C.LD/C.FLD,
//                C.SW/C.SD/C.FSD and their stack-pointer forms;
//   CLASS_JUMP   unconditional jumps: JAL, JALR, C.J, C.JAL, C.JR, C.JALR.
// The detector uses two instances, one per class. Selecting exactly these
// two instruction types follows the published method; the opcode lists are
// this design's reading of "memory IO" and "unconditional jump" for RV32IMAC
// code (conditional branches are not selected).
//
// Purely combinational: sel_valid is frame_valid qualified by the decode, in
// the same cycle. sel_pc and sel_cnt are the frame's PC and clock count.
module insn_filter
  import nirvana_pkg::*;
#(
  parameter insn_class_e CLASS = CLASS_MEMIO
) (
  input  logic             frame_valid,
  input  frame_t           frame,
  output logic             sel_valid,
  output logic [XLEN-1:0]  sel_pc,
  output logic [CNT_W-1:0] sel_cnt
);

  logic        is_rvc;
  logic [1:0]  c_op;
  logic [2:0]  c_f3;
  logic [6:0]  opc;
  logic        is_mem, is_jump;

  always_comb begin
    is_rvc = (frame.instr[1:0] != 2'b11);
    c_op   = frame.instr[1:0];
    c_f3   = frame.instr[15:13];
    opc    = frame.instr[6:0];

    if (is_rvc) begin
      // Quadrant 0: funct3 001/010/011 loads, 101/110/111 stores.
      // Quadrant 2: funct3 001/010/011 SP loads, 101/110/111 SP stores.
      is_mem  = ((c_op == 2'b00) || (c_op == 2'b10)) &&
                (c_f3 != 3'b000) && (c_f3 != 3'b100);
      // C.J (01/101), C.JAL (01/001, RV32), C.JR/C.JALR (10/100, rs2=0, rs1!=0).
      is_jump = ((c_op == 2'b01) && ((c_f3 == 3'b101) || (c_f3 == 3'b001))) ||
                ((c_op == 2'b10) && (c_f3 == 3'b100) &&
                 (frame.instr[6:2] == 5'd0) && (frame.instr[11:7] != 5'd0));
    end else begin
      is_mem  = (opc == OPC_LOAD)  || (opc == OPC_LOAD_FP) ||
                (opc == OPC_STORE) || (opc == OPC_STORE_FP) ||
                (opc == OPC_AMO);
      is_jump = (opc == OPC_JAL) || (opc == OPC_JALR);
    end

    sel_valid = frame_valid && ((CLASS == CLASS_MEMIO) ? is_mem : is_jump);
    sel_pc    = frame.pc;
    sel_cnt   = frame.cnt;
  end

endmodule
