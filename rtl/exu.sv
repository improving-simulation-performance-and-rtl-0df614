// exu: execution unit of a ParaNut core, a multi-cycle RV32I(M) sequencer.
//
// The EXU owns the program counter and the 32-entry register file and steps
// through the states of the ParaNut EXU state machine:
//
//   ExuExecuteInsn  waits until the IFU buffer holds the instruction at PC,
//                   takes a pending interrupt (CePU only), and executes ALU,
//                   LUI/AUIPC and NOP-like instructions in one cycle; other
//                   instructions continue in one of the states below.
//   ExuJump         JAL/JALR: link and jump, or raise "instruction address
//                   misaligned" if the target is not word aligned.
//   ExuBranch       conditional branches, with the same alignment check.
//   ExuCSR          CSR read-modify-write; illegal CSR -> exception.
//   ExuMem          load/store through the LSU, misaligned or bus error ->
//                   exception;
//   ExuMemWB        writes the loaded value back.
//   ExuDiv          waits for the M-extension unit;
//   ExuMulDivWB     writes its result back.
//   ExuLSUFlush     FENCE: waits until the LSU is idle.
//   ExuExOrIrq      entry of an exception or interrupt; a CePU saves the
//                   cause in its CSRs, a CoPU (no exception hardware) halts.
//   ExuExJumpTvec   CePU: continues at mtvec.
//   ExuXRETFinish   MRET: restores MIE and continues at mepc.
//   ExuHalt         a CoPU waits here while its enable bit (in the CePU's
//                   pnce register) is clear; when enabled it starts at the
//                   reset address.  A CoPU halted by an exception stays
//                   halted until its enable bit is cleared and set again.
//
// Each instruction ends by committing the next PC, which also tells the IFU
// to fetch it (`ifu_fetch`).  ECALL and EBREAK raise their exceptions, WFI
// executes as a NOP.  The state names and their grouping come from the
// ParaNut EXU state diagram; the states for debugging, cache-control
// instructions, atomic memory operations and waiting for CoPUs are not part
// of this design, and the exact transitions are this design's own.
module exu
  import pn_pkg::*;
#(
  parameter int unsigned CAP_LEVEL = 3,
  parameter bit          M_EXT     = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,       // CoPU enable (tie high for the CePU)
  output exu_state_t  state,
  output logic [31:0] pc,
  output logic        halted,
  output logic        ex_halted,    // CoPU stopped by an exception
  // IFU
  output logic        ifu_fetch,
  output logic [31:0] ifu_pc,
  input  logic        ifu_valid,
  input  logic [31:0] ifu_insn,
  input  logic [31:0] ifu_insn_pc,
  input  logic        ifu_insn_err,  // the buffered word could not be read
  // LSU
  output logic        lsu_req,
  output logic        lsu_we,
  output logic [2:0]  lsu_funct3,
  output logic [31:0] lsu_adr,
  output logic [31:0] lsu_wdata,
  input  logic        lsu_done,
  input  logic [31:0] lsu_rdata,
  input  logic        lsu_misaligned,
  input  logic        lsu_err,       // with lsu_done: bus error
  // CSR
  output logic        csr_access,
  output logic        csr_write,
  output logic [11:0] csr_addr,
  output logic [1:0]  csr_op,
  output logic [31:0] csr_wdata,
  input  logic [31:0] csr_rdata,
  input  logic        csr_illegal,
  output logic        trap,
  output logic [31:0] trap_cause,
  output logic [31:0] trap_epc,
  output logic [31:0] trap_tval,
  output logic        mret,
  output logic        instret,
  input  logic [31:0] mtvec,
  input  logic [31:0] mepc,
  input  logic        irq_pending,
  input  logic [31:0] irq_cause,
  // M extension
  output logic        md_start,
  output logic [2:0]  md_funct3,
  output logic [31:0] md_a,
  output logic [31:0] md_b,
  input  logic        md_valid,
  input  logic [31:0] md_result
);

  localparam bit IS_CEPU = (CAP_LEVEL >= 3);

  logic [31:0] regs [32];
  logic [31:0] ir;            // instruction being executed
  logic [31:0] target;        // jump / branch target
  logic        br_taken;
  logic [31:0] ex_cause, ex_tval;

  // ------------------------------------------------------------- decode
  logic [31:0] insn;
  logic [6:0]  opcode;
  logic [4:0]  rd, rs1, rs2;
  logic [2:0]  funct3;
  logic [6:0]  funct7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j, a, b;

  // in ExuExecuteInsn decode the IFU word, later the saved one
  assign insn   = (state == ExuExecuteInsn) ? ifu_insn : ir;
  assign opcode = insn[6:0];
  assign rd     = insn[11:7];
  assign funct3 = insn[14:12];
  assign rs1    = insn[19:15];
  assign rs2    = insn[24:20];
  assign funct7 = insn[31:25];
  assign imm_i  = {{20{insn[31]}}, insn[31:20]};
  assign imm_s  = {{20{insn[31]}}, insn[31:25], insn[11:7]};
  assign imm_b  = {{19{insn[31]}}, insn[31], insn[7], insn[30:25], insn[11:8], 1'b0};
  assign imm_u  = {insn[31:12], 12'd0};
  assign imm_j  = {{11{insn[31]}}, insn[31], insn[19:12], insn[20], insn[30:21], 1'b0};
  assign a      = regs[rs1];
  assign b      = regs[rs2];

  // ---------------------------------------------------------------- ALU
  function automatic logic [31:0] alu(logic [2:0] f3, logic alt, logic [31:0] x,
                                      logic [31:0] y);
    unique case (f3)
      3'd0: return alt ? x - y : x + y;
      3'd1: return x << y[4:0];
      3'd2: return {31'd0, $signed(x) < $signed(y)};
      3'd3: return {31'd0, x < y};
      3'd4: return x ^ y;
      3'd5: return alt ? 32'($signed(x) >>> y[4:0]) : x >> y[4:0];
      3'd6: return x | y;
      default: return x & y;
    endcase
  endfunction

  function automatic logic branch_cond(logic [2:0] f3, logic [31:0] x, logic [31:0] y);
    unique case (f3)
      3'd0: return x == y;
      3'd1: return x != y;
      3'd4: return $signed(x) < $signed(y);
      3'd5: return $signed(x) >= $signed(y);
      3'd6: return x < y;
      3'd7: return x >= y;
      default: return 1'b0;
    endcase
  endfunction

  logic insn_ready;
  assign insn_ready = ifu_valid && (ifu_insn_pc == pc);

  // outputs that are pure functions of the state
  assign halted     = (state == ExuHalt);
  assign lsu_adr    = a + ((opcode == OP_STORE) ? imm_s : imm_i);
  assign lsu_we     = (opcode == OP_STORE);
  assign lsu_funct3 = funct3;
  assign lsu_wdata  = b;
  assign csr_addr   = insn[31:20];
  assign csr_op     = funct3[1:0];
  assign csr_wdata  = funct3[2] ? {27'd0, rs1} : a;
  assign csr_write  = (funct3[1:0] == 2'd1) || (rs1 != 5'd0);
  assign csr_access = (state == ExuCSR);
  assign md_funct3  = funct3;
  assign md_a       = a;
  assign md_b       = b;
  assign trap_epc   = pc;
  assign trap_cause = ex_cause;
  assign trap_tval  = ex_tval;
  assign trap       = IS_CEPU && (state == ExuExOrIrq);
  assign mret       = (state == ExuXRETFinish);

  // --------------------------------------------------------------- FSM
  // helpers of the state machine: they only set the local request variables
  // of the clocked process below, which applies them at its end
`define EXU_COMMIT(npc)     begin c_en = 1'b1; c_pc = (npc); end
`define EXU_RAISE(cs, tv)   begin x_en = 1'b1; x_cause = (cs); x_tval = (tv); end
`define EXU_WRITE(r, v)     begin w_en = 1'b1; w_r = (r); w_v = (v); end

  always_ff @(posedge clk) begin
    logic        c_en, x_en, w_en;
    logic [31:0] c_pc, x_cause, x_tval, w_v;
    logic [4:0]  w_r;
    c_en = 1'b0; x_en = 1'b0; w_en = 1'b0;
    c_pc = '0; x_cause = '0; x_tval = '0; w_v = '0; w_r = '0;
    if (rst) begin
      state     <= IS_CEPU ? ExuExecuteInsn : ExuHalt;
      pc        <= RESET_ADDR;
      ifu_fetch <= IS_CEPU;
      ifu_pc    <= RESET_ADDR;
      ir        <= '0;
      target    <= '0;
      br_taken  <= 1'b0;
      ex_cause  <= '0;
      ex_tval   <= '0;
      ex_halted <= 1'b0;
      lsu_req   <= 1'b0;
      md_start  <= 1'b0;
      instret   <= 1'b0;
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else begin
      ifu_fetch <= 1'b0;
      lsu_req   <= 1'b0;
      md_start  <= 1'b0;
      instret   <= 1'b0;
      unique case (state)
        ExuHalt: begin
          if (!enable) ex_halted <= 1'b0;
          else if (!ex_halted) begin
            pc        <= RESET_ADDR;
            ifu_fetch <= 1'b1;
            ifu_pc    <= RESET_ADDR;
            state     <= ExuExecuteInsn;
          end
        end

        ExuExecuteInsn: begin
          if (!IS_CEPU && !enable) state <= ExuHalt;
          else if (irq_pending) begin
            ex_cause <= irq_cause;
            ex_tval  <= '0;
            state    <= ExuExOrIrq;
          end else if (insn_ready && ifu_insn_err) begin
            `EXU_RAISE(CAUSE_INSN_ACCESS, pc)
          end else if (insn_ready) begin
            ir <= ifu_insn;
            unique case (opcode)
              OP_LUI:   begin `EXU_WRITE(rd, imm_u)      `EXU_COMMIT(pc + 4) end
              OP_AUIPC: begin `EXU_WRITE(rd, pc + imm_u) `EXU_COMMIT(pc + 4) end
              OP_IMM: begin
                if (funct3 == 3'd1 && funct7 != 7'd0 ||
                    funct3 == 3'd5 && (funct7 & 7'b1011111) != 7'd0)
                  `EXU_RAISE(CAUSE_ILLEGAL_INSN, ifu_insn)
                else begin
                  `EXU_WRITE(rd, alu(funct3, funct3 == 3'd5 && funct7[5], a, imm_i))
                  `EXU_COMMIT(pc + 4)
                end
              end
              OP_REG: begin
                if (funct7 == 7'd1 && M_EXT) begin
                  md_start <= 1'b1;
                  state    <= ExuDiv;
                end else if (funct7 == 7'd0 ||
                             funct7 == 7'b0100000 && (funct3 == 3'd0 || funct3 == 3'd5)) begin
                  `EXU_WRITE(rd, alu(funct3, funct7[5], a, b))
                  `EXU_COMMIT(pc + 4)
                end else `EXU_RAISE(CAUSE_ILLEGAL_INSN, ifu_insn)
              end
              OP_JAL: begin
                target <= pc + imm_j;
                state  <= ExuJump;
              end
              OP_JALR: begin
                target <= (a + imm_i) & ~32'd1;
                state  <= ExuJump;
              end
              OP_BRANCH: begin
                if (funct3 == 3'd2 || funct3 == 3'd3) `EXU_RAISE(CAUSE_ILLEGAL_INSN, ifu_insn)
                else begin
                  target   <= pc + imm_b;
                  br_taken <= branch_cond(funct3, a, b);
                  state    <= ExuBranch;
                end
              end
              OP_LOAD, OP_STORE: begin
                if (lsu_misaligned)
                  `EXU_RAISE(opcode == OP_STORE ? CAUSE_STORE_MISALIGNED : CAUSE_LOAD_MISALIGNED,
                             lsu_adr)
                else begin
                  lsu_req <= 1'b1;
                  state   <= ExuMem;
                end
              end
              OP_FENCE: state <= ExuLSUFlush;
              OP_SYSTEM: begin
                if (funct3 != 3'd0) state <= ExuCSR;
                else unique case (insn[31:20])
                  12'h000: `EXU_RAISE(CAUSE_ECALL_M, '0)
                  12'h001: `EXU_RAISE(CAUSE_BREAKPOINT, pc)
                  12'h302: state <= IS_CEPU ? ExuXRETFinish : ExuExOrIrq;
                  12'h105: `EXU_COMMIT(pc + 4)                     // WFI
                  default: `EXU_RAISE(CAUSE_ILLEGAL_INSN, ifu_insn)
                endcase
                if (funct3 == 3'd0 && insn[31:20] == 12'h302 && !IS_CEPU) begin
                  ex_cause <= CAUSE_ILLEGAL_INSN;
                  ex_tval  <= ifu_insn;
                end
              end
              default: `EXU_RAISE(CAUSE_ILLEGAL_INSN, ifu_insn)
            endcase
          end
        end

        ExuJump:
          if (target[1]) `EXU_RAISE(CAUSE_INSN_MISALIGNED, target)
          else begin
            `EXU_WRITE(rd, pc + 4)
            `EXU_COMMIT(target)
          end

        ExuBranch:
          if (!br_taken) `EXU_COMMIT(pc + 4)
          else if (target[1]) `EXU_RAISE(CAUSE_INSN_MISALIGNED, target)
          else `EXU_COMMIT(target)

        ExuCSR:
          if (csr_illegal) `EXU_RAISE(CAUSE_ILLEGAL_INSN, ir)
          else begin
            `EXU_WRITE(rd, csr_rdata)
            `EXU_COMMIT(pc + 4)
          end

        ExuMem:
          if (lsu_done) begin
            if (lsu_err)
              `EXU_RAISE(opcode == OP_LOAD ? CAUSE_LOAD_ACCESS : CAUSE_STORE_ACCESS, lsu_adr)
            else if (opcode == OP_LOAD) state <= ExuMemWB;
            else `EXU_COMMIT(pc + 4)
          end

        ExuMemWB: begin
          `EXU_WRITE(rd, lsu_rdata)
          `EXU_COMMIT(pc + 4)
        end

        ExuDiv:      if (md_valid) state <= ExuMulDivWB;

        ExuMulDivWB: begin
          `EXU_WRITE(rd, md_result)
          `EXU_COMMIT(pc + 4)
        end

        ExuLSUFlush: `EXU_COMMIT(pc + 4)   // the LSU is idle outside ExuMem

        ExuExOrIrq:
          if (IS_CEPU) state <= ExuExJumpTvec;
          else begin
            ex_halted <= 1'b1;
            state     <= ExuHalt;
          end

        ExuExJumpTvec: begin
          pc        <= mtvec;
          ifu_fetch <= 1'b1;
          ifu_pc    <= mtvec;
          state     <= ExuExecuteInsn;
        end

        ExuXRETFinish: begin
          pc        <= mepc;
          ifu_fetch <= 1'b1;
          ifu_pc    <= mepc;
          instret   <= 1'b1;
          state     <= ExuExecuteInsn;
        end

        default: state <= ExuHalt;
      endcase
      if (w_en && w_r != 5'd0) regs[w_r] <= w_v;
      if (c_en) begin
        pc        <= c_pc;
        ifu_fetch <= 1'b1;
        ifu_pc    <= c_pc;
        instret   <= 1'b1;
        state     <= ExuExecuteInsn;
      end
      if (x_en) begin
        ex_cause <= x_cause;
        ex_tval  <= x_tval;
        state    <= ExuExOrIrq;
      end
    end
  end

`undef EXU_COMMIT
`undef EXU_RAISE
`undef EXU_WRITE

endmodule
