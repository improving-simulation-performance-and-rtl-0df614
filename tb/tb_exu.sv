// tb_exu: random instruction test of the execution unit.  The testbench
// generates a straight-line program of random RV32I ALU instructions
// (register and immediate forms, LUI, AUIPC), M-extension instructions and
// word loads/stores to a small data area, executes it on a reference model
// inside the testbench, and runs it on the EXU.  The EXU is connected to the
// real CSR file and multiply/divide unit but to simple behavioural models of
// the IFU (one-cycle instruction buffer) and LSU (one-cycle data memory).
// When the EXU reaches the closing self-loop, all 31 registers and the data
// area are compared with the reference.  Also checks that a single-cycle ALU
// instruction retires every 2 cycles with the one-cycle IFU model.
module tb_exu;
  import pn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  int checks = 0, failures = 0;

  exu_state_t state;
  logic [31:0] pc, ifu_pc, ifu_insn, ifu_insn_pc, lsu_adr, lsu_wdata, lsu_rdata;
  logic halted, ex_halted, ifu_fetch, ifu_valid, lsu_req, lsu_we, lsu_done, lsu_misaligned;
  logic [2:0] lsu_funct3, md_funct3;
  logic csr_access, csr_write, csr_illegal, trap, mret, instret, irq_pending, md_start, md_valid, md_busy;
  logic [11:0] csr_addr;
  logic [1:0] csr_op;
  logic [31:0] csr_wdata, csr_rdata, trap_cause, trap_epc, trap_tval, mtvec, mepc, irq_cause;
  logic [31:0] md_a, md_b, md_result;
  logic [3:0] pnce;

  exu #(.CAP_LEVEL(3)) dut (.clk, .rst, .enable(1'b1), .state, .pc, .halted, .ex_halted,
    .ifu_fetch, .ifu_pc, .ifu_valid, .ifu_insn, .ifu_insn_pc, .ifu_insn_err(1'b0),
    .lsu_req, .lsu_we, .lsu_funct3, .lsu_adr, .lsu_wdata, .lsu_done, .lsu_rdata, .lsu_misaligned, .lsu_err(1'b0),
    .csr_access, .csr_write, .csr_addr, .csr_op, .csr_wdata, .csr_rdata, .csr_illegal,
    .trap, .trap_cause, .trap_epc, .trap_tval, .mret, .instret, .mtvec, .mepc,
    .irq_pending, .irq_cause, .md_start, .md_funct3, .md_a, .md_b, .md_valid, .md_result);
  csr #(.CAP_LEVEL(3)) u_csr (.clk, .rst, .access(csr_access), .write(csr_write), .addr(csr_addr),
    .op(csr_op), .wdata(csr_wdata), .rdata(csr_rdata), .illegal(csr_illegal), .trap, .trap_cause,
    .trap_epc, .trap_tval, .mret, .instret, .mtip(1'b0), .meip(1'b0), .mtvec, .mepc,
    .irq_pending, .irq_cause, .pnce);
  mextension u_md (.clk, .rst, .start(md_start), .funct3(md_funct3), .a(md_a), .b(md_b),
    .busy(md_busy), .valid(md_valid), .result(md_result));

  // ---------------------------------------------------------------- models
  logic [31:0] prog [2048];
  logic [31:0] dmem [16];          // data area at DATA
  localparam logic [31:0] DATA = 32'h2000_0000;

  always_ff @(posedge clk) begin
    if (rst) ifu_valid <= 1'b0;
    else if (ifu_fetch) begin
      ifu_valid   <= 1'b1;
      ifu_insn    <= prog[11'((ifu_pc - RESET_ADDR) >> 2)];
      ifu_insn_pc <= ifu_pc;
    end
  end
  assign lsu_misaligned = lsu_funct3[1] ? lsu_adr[1:0] != 0 : lsu_funct3[0] ? lsu_adr[0] : 1'b0;
  always_ff @(posedge clk) begin
    lsu_done <= 1'b0;
    if (lsu_req) begin
      lsu_done <= 1'b1;
      if (lsu_we) dmem[lsu_adr[5:2]] <= lsu_wdata;
      else lsu_rdata <= dmem[lsu_adr[5:2]];
    end
  end

  // ------------------------------------------------------- program + model
  logic [31:0] r [32];
  logic [31:0] rm [16];
  int n_insn;

  function automatic logic [31:0] alu(int f3, bit alt, logic [31:0] x, logic [31:0] y);
    unique case (f3)
      0: return alt ? x - y : x + y;
      1: return x << y[4:0];
      2: return 32'($signed(x) < $signed(y));
      3: return 32'(x < y);
      4: return x ^ y;
      5: return alt ? 32'($signed(x) >>> y[4:0]) : x >> y[4:0];
      6: return x | y;
      default: return x & y;
    endcase
  endfunction
  function automatic logic [31:0] muldiv(int f, logic [31:0] x, logic [31:0] y);
    logic signed [63:0] ss;
    logic [63:0] uu;
    unique case (f)
      0: return x * y;
      1: begin ss = $signed({{32{x[31]}}, x}) * $signed({{32{y[31]}}, y}); return ss[63:32]; end
      2: begin ss = $signed({{32{x[31]}}, x}) * $signed({32'd0, y}); return ss[63:32]; end
      3: begin uu = {32'd0, x} * {32'd0, y}; return uu[63:32]; end
      4: return y == 0 ? '1 : (x == 32'h8000_0000 && y == '1) ? x : 32'($signed(x) / $signed(y));
      5: return y == 0 ? '1 : x / y;
      6: return y == 0 ? x : (x == 32'h8000_0000 && y == '1) ? 0 : 32'($signed(x) % $signed(y));
      default: return y == 0 ? x : x % y;
    endcase
  endfunction

  task automatic gen(int count);
    int rd, rs1, rs2, f3, imm, kind;
    logic [31:0] v, p;
    for (int i = 0; i < 32; i++) r[i] = 0;
    for (int i = 0; i < 16; i++) rm[i] = 0;
    // x31 points to the data area
    prog[0] = {DATA[31:12], 5'd31, OP_LUI}; r[31] = DATA;
    n_insn = 1;
    for (int k = 0; k < count; k++) begin
      rd = $urandom_range(1, 30); rs1 = $urandom_range(0, 30); rs2 = $urandom_range(0, 30);
      f3 = $urandom_range(0, 7); imm = $urandom_range(0, 4095);
      p = RESET_ADDR + 4 * n_insn;
      kind = $urandom_range(0, 9);
      unique case (kind)
        0, 1, 2: begin
          bit alt = (f3 == 0 || f3 == 5) && $urandom_range(0, 1);
          prog[n_insn] = {alt ? 7'h20 : 7'h00, 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), OP_REG};
          v = alu(f3, alt, r[rs1], r[rs2]);
        end
        3, 4, 5: begin
          bit alt = f3 == 5 && $urandom_range(0, 1);
          logic [11:0] im = 12'(imm);
          if (f3 == 1 || f3 == 5) im = {alt ? 7'h20 : 7'h00, im[4:0]};
          prog[n_insn] = {im, 5'(rs1), 3'(f3), 5'(rd), OP_IMM};
          v = alu(f3, alt, r[rs1], (f3 == 1 || f3 == 5) ? 32'(im[4:0]) : {{20{im[11]}}, im});
        end
        6: begin
          logic [19:0] u = 20'($urandom);
          if ($urandom_range(0, 1)) begin prog[n_insn] = {u, 5'(rd), OP_LUI}; v = {u, 12'd0}; end
          else begin prog[n_insn] = {u, 5'(rd), OP_AUIPC}; v = p + {u, 12'd0}; end
        end
        7, 8: begin
          prog[n_insn] = {7'h01, 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), OP_REG};
          v = muldiv(f3, r[rs1], r[rs2]);
        end
        default: begin
          int w = $urandom_range(0, 15);
          if ($urandom_range(0, 1)) begin
            logic [11:0] o = 12'(4 * w);
            prog[n_insn] = {o[11:5], 5'(rs2), 5'd31, 3'd2, o[4:0], OP_STORE};
            rm[w] = r[rs2];
            rd = 0;
          end else begin
            prog[n_insn] = {12'(4 * w), 5'd31, 3'd2, 5'(rd), OP_LOAD};
            v = rm[w];
          end
        end
      endcase
      if (rd != 0) r[rd] = v;
      n_insn++;
    end
    prog[n_insn] = {20'd0, 5'd0, OP_JAL};   // jal x0, 0 (self-loop)
  endtask

  initial begin
    rst = 1;
    for (int i = 0; i < 2048; i++) prog[i] = 32'h0000_0013;
    for (int i = 0; i < 16; i++) dmem[i] = 0;
    gen(1500);
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    while (!(pc == RESET_ADDR + 4 * n_insn && state == ExuExecuteInsn)) @(negedge clk);
    repeat (4) @(negedge clk);
    for (int i = 1; i < 31; i++) begin
      checks++;
      if (dut.regs[i] !== r[i]) begin failures++; $display("x%0d = %h, expected %h", i, dut.regs[i], r[i]); end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (dmem[i] !== rm[i]) begin failures++; $display("mem[%0d] = %h, expected %h", i, dmem[i], rm[i]); end
    end
    // ALU rate: a run of independent ALU instructions retires one per 2 cycles
    rst = 1;
    for (int i = 0; i < 64; i++) prog[i] = {12'(i), 5'd0, 3'd0, 5'd1, OP_IMM};   // addi x1, x0, i
    prog[64] = {20'd0, 5'd0, OP_JAL};
    @(negedge clk); rst = 0;
    begin
      int c0, c1;
      while (pc != RESET_ADDR + 4) @(negedge clk);
      c0 = 0;
      while (pc != RESET_ADDR + 4 * 61) begin @(negedge clk); c0++; end
      checks++;
      if (c0 != 2 * 60) begin failures++; $display("60 ALU instructions took %0d cycles", c0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
