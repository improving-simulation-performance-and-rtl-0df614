// tb_cpu: runs directed programs on complete cores (EXU, IFU, LSU, CSR file
// and multiply/divide unit) connected to a behavioural port memory.
//  * A capability-level-3 core (CePU) executes all branch kinds, JAL/JALR
//    linking, byte/halfword loads and stores, ECALL, an illegal instruction,
//    a misaligned load and EBREAK (each logged by a trap handler that returns
//    past the faulting instruction), and a machine timer interrupt that ends
//    a wait loop.  Results are stored to a signature area and compared.
//  * A capability-level-2 core (CoPU) must stay halted without fetching while
//    its enable input is low, run when enabled, halt on an exception (it has
//    no exception hardware), and restart from the reset address when its
//    enable is cleared and set again.
module tb_cpu;
  import pn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, mtip, en2;
  int checks = 0, failures = 0;
  localparam logic [31:0] SIG = 32'h1000_2000;

  // ------------------------------------------------------------- CePU
  logic i_rd, i_ack, d_rd, d_ack, w_wr, w_ack, halted, ex_halted;
  logic [31:0] i_adr, i_data, d_adr, d_data, w_adr, w_data, pc;
  logic [3:0] w_bsel, pnce;
  exu_state_t state;
  cpu #(.HART_ID(0), .CAP_LEVEL(3), .CORES(4)) u_cpu (.clk, .rst, .enable(1'b1), .mtip, .meip(1'b0),
    .pnce, .state, .pc, .halted, .ex_halted,
    .ifu_rd(i_rd), .ifu_rd_adr(i_adr), .ifu_rd_ack(i_ack), .ifu_rd_err(1'b0), .ifu_rd_data(i_data),
    .lsu_rd(d_rd), .lsu_rd_adr(d_adr), .lsu_rd_ack(d_ack), .lsu_rd_err(1'b0), .lsu_rd_data(d_data),
    .lsu_wr(w_wr), .lsu_wr_adr(w_adr), .lsu_wr_data(w_data), .lsu_wr_bsel(w_bsel), .lsu_wr_ack(w_ack), .lsu_wr_err(1'b0));
  port_mem_model #(.LAT(3)) u_mem (.clk, .rst, .i_rd, .i_adr, .i_ack, .i_data, .d_rd, .d_adr, .d_ack,
    .d_data, .w_wr, .w_adr, .w_data, .w_bsel, .w_ack);

  // ------------------------------------------------------------- CoPU
  logic i_rd2, i_ack2, d_rd2, d_ack2, w_wr2, w_ack2, halted2, ex_halted2;
  logic [31:0] i_adr2, i_data2, d_adr2, d_data2, w_adr2, w_data2, pc2;
  logic [3:0] w_bsel2, pnce2;
  exu_state_t state2;
  cpu #(.HART_ID(1), .CAP_LEVEL(2), .CORES(4)) u_cpu2 (.clk, .rst, .enable(en2), .mtip, .meip(1'b0),
    .pnce(pnce2), .state(state2), .pc(pc2), .halted(halted2), .ex_halted(ex_halted2),
    .ifu_rd(i_rd2), .ifu_rd_adr(i_adr2), .ifu_rd_ack(i_ack2), .ifu_rd_err(1'b0), .ifu_rd_data(i_data2),
    .lsu_rd(d_rd2), .lsu_rd_adr(d_adr2), .lsu_rd_ack(d_ack2), .lsu_rd_err(1'b0), .lsu_rd_data(d_data2),
    .lsu_wr(w_wr2), .lsu_wr_adr(w_adr2), .lsu_wr_data(w_data2), .lsu_wr_bsel(w_bsel2), .lsu_wr_ack(w_ack2), .lsu_wr_err(1'b0));
  port_mem_model #(.LAT(3)) u_mem2 (.clk, .rst, .i_rd(i_rd2), .i_adr(i_adr2), .i_ack(i_ack2),
    .i_data(i_data2), .d_rd(d_rd2), .d_adr(d_adr2), .d_ack(d_ack2), .d_data(d_data2), .w_wr(w_wr2),
    .w_adr(w_adr2), .w_data(w_data2), .w_bsel(w_bsel2), .w_ack(w_ack2));

  // ---------------------------------------------------------- encoder
  function automatic logic [31:0] r_t(int f7, int rs2, int rs1, int f3, int rd, logic [6:0] op);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_t(int imm, int rs1, int f3, int rd, logic [6:0] op);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_t(int imm, int rs2, int rs1, int f3);
    logic [11:0] im = 12'(imm);
    return {im[11:5], 5'(rs2), 5'(rs1), 3'(f3), im[4:0], OP_STORE};
  endfunction
  function automatic logic [31:0] b_t(int ofs, int rs1, int rs2, int f3);
    logic [12:0] o = 13'(ofs);
    return {o[12], o[10:5], 5'(rs2), 5'(rs1), 3'(f3), o[4:1], o[11], OP_BRANCH};
  endfunction
  function automatic logic [31:0] j_t(int ofs, int rd);
    logic [20:0] o = 21'(ofs);
    return {o[20], o[10:1], o[11], o[19:12], 5'(rd), OP_JAL};
  endfunction

  int ip;
  logic [31:0] prog [512];
  function automatic logic [31:0] here(); return RESET_ADDR + 32'(ip * 4); endfunction
  task automatic emit(logic [31:0] w); prog[ip] = w; ip++; endtask
  task automatic li(int rd, logic [31:0] v);
    logic [31:0] hi = v + 32'h800;
    emit({hi[31:12], 5'(rd), OP_LUI});
    emit(i_t(int'(v[11:0]), rd, 0, rd, OP_IMM));
  endtask
  task automatic addi(int rd, int rs1, int imm); emit(i_t(imm, rs1, 0, rd, OP_IMM)); endtask
  task automatic csr(int f3, int rd, int c, int rs1); emit(i_t(c, rs1, f3, rd, OP_SYSTEM)); endtask
  task automatic br(int f3, int rs1, int rs2, int ofs); emit(b_t(ofs, rs1, rs2, f3)); endtask
  task automatic st(int f3, int rs2, int ofs, int rs1); emit(s_t(ofs, rs2, rs1, f3)); endtask
  task automatic ld(int f3, int rd, int ofs, int rs1); emit(i_t(ofs, rs1, f3, rd, OP_LOAD)); endtask

  localparam int H = 200;   // word index of the trap handler
  logic [31:0] exp_link1, exp_link2, loop_pc;

  task automatic assemble_cepu();
    for (int i = 0; i < 512; i++) prog[i] = 32'h0000_0013;
    ip = 0;
    li(31, SIG); li(30, SIG + 32'h40);
    li(6, RESET_ADDR + 4 * H); csr(1, 0, 'h305, 6);
    addi(1, 0, 5); addi(2, 0, -3); addi(3, 0, 0);
    br(4, 2, 1, 8); addi(3, 3, 1);     // blt  taken
    br(6, 2, 1, 8); addi(3, 3, 2);     // bltu not taken
    br(5, 1, 2, 8); addi(3, 3, 4);     // bge  taken
    br(7, 1, 2, 8); addi(3, 3, 8);     // bgeu not taken
    br(0, 1, 1, 8); addi(3, 3, 16);    // beq  taken
    br(1, 1, 1, 8); addi(3, 3, 32);    // bne  not taken
    st(2, 3, 0, 31);                   // -> 42
    exp_link1 = here() + 4;
    emit(j_t(8, 4)); addi(3, 0, 99);   // jal x4, +8
    st(2, 4, 4, 31);
    exp_link2 = here() + 8;
    emit({20'd0, 5'd6, OP_AUIPC});     // auipc x6, 0
    emit(i_t(12, 6, 0, 7, OP_JALR));   // jalr x7, 12(x6)
    addi(3, 0, 77);
    st(2, 7, 24, 31);
    st(2, 3, 28, 31);                  // still 42
    li(8, 32'h8899_AABB); st(2, 8, 8, 31);
    ld(0, 9, 9, 31);  st(2, 9, 12, 31);   // lb  -> ffffffaa
    ld(5, 9, 10, 31); st(2, 9, 16, 31);   // lhu -> 8899
    st(0, 1, 11, 31);                     // sb 5 -> byte 11
    st(1, 2, 8, 31);                      // sh -3 -> bytes 8,9
    ld(1, 9, 8, 31);  st(2, 9, 20, 31);   // lh -> fffffffd
    emit(32'h0000_0073);                  // ecall
    emit(32'hFFFF_FFFF);                  // illegal
    ld(2, 9, 1, 31);                      // misaligned lw
    emit(32'h0010_0073);                  // ebreak
    li(24, 32'h80); csr(2, 0, 'h304, 24); // mie.MTIE
    addi(25, 0, 8); csr(2, 0, 'h300, 25); // mstatus.MIE
    loop_pc = here();
    br(0, 23, 0, 0);                      // wait until the handler sets x23
    st(2, 23, 32, 31);
    li(26, 32'h600D); st(2, 26, 36, 31);
    emit(j_t(0, 0));
    // trap handler
    ip = H;
    csr(2, 20, 'h342, 0);                 // mcause
    st(2, 20, 0, 30); addi(30, 30, 4);
    br(4, 20, 0, 20);                     // interrupt -> +20
    csr(2, 21, 'h341, 0); addi(21, 21, 4); csr(1, 0, 'h341, 21);
    emit(32'h3020_0073);                  // mret
    li(24, 32'h80); csr(3, 0, 'h304, 24); // clear mie.MTIE
    addi(23, 0, 1);
    emit(32'h3020_0073);
  endtask

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h, expected %h", what, got, exp); end
  endtask
  function automatic logic [31:0] sig(int ofs);
    return u_mem.mem[(SIG - RESET_ADDR + ofs) >> 2];
  endfunction

  initial begin
    int n;
    rst = 1; mtip = 0; en2 = 0;
    assemble_cepu();
    for (int i = 0; i < 4096; i++) begin u_mem.mem[i] = 0; u_mem2.mem[i] = 0; end
    for (int i = 0; i < 512; i++) u_mem.mem[i] = prog[i];
    // CoPU program: store 7, ecall, store 9 (must not happen)
    ip = 0;
    for (int i = 0; i < 512; i++) prog[i] = 32'h0000_0013;
    li(31, SIG); addi(1, 0, 7); st(2, 1, 0, 31); emit(32'h0000_0073); addi(1, 0, 9); st(2, 1, 4, 31);
    emit(j_t(0, 0));
    for (int i = 0; i < 512; i++) u_mem2.mem[i] = prog[i];
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;

    // CoPU stays halted and silent while disabled
    n = 0;
    repeat (50) begin @(negedge clk); if (i_rd2 || d_rd2 || w_wr2) n++; end
    check(32'(n), 0, "CoPU memory accesses while disabled");
    check(32'(halted2), 1, "CoPU halted while disabled");
    en2 = 1;

    // CePU: raise the timer interrupt once it waits in its loop
    n = 0;
    while (!(pc == loop_pc) && n < 20000) begin @(negedge clk); n++; end
    repeat (20) @(negedge clk);
    mtip = 1;
    n = 0;
    while (sig(36) != 32'h600D && n < 20000) begin @(negedge clk); n++; end
    mtip = 0;
    check(sig(0), 42, "branches");
    check(sig(4), exp_link1, "jal link");
    check(sig(24), exp_link2, "jalr link");
    check(sig(28), 42, "skipped instructions");
    check(sig(8), 32'h0599_FFFD, "sb/sh");
    check(sig(12), 32'hFFFF_FFAA, "lb");
    check(sig(16), 32'h0000_8899, "lhu");
    check(sig(20), 32'hFFFF_FFFD, "lh");
    check(sig(32'h40), CAUSE_ECALL_M, "ecall cause");
    check(sig(32'h44), CAUSE_ILLEGAL_INSN, "illegal cause");
    check(sig(32'h48), CAUSE_LOAD_MISALIGNED, "misaligned cause");
    check(sig(32'h4C), CAUSE_BREAKPOINT, "ebreak cause");
    check(sig(32'h50), CAUSE_IRQ_MTIMER, "timer interrupt cause");
    check(sig(32), 1, "wait loop left by interrupt");
    check(sig(36), 32'h600D, "program end");

    // CoPU: halted by its ecall, 9 never stored
    n = 0;
    while (!ex_halted2 && n < 2000) begin @(negedge clk); n++; end
    check(32'(ex_halted2), 1, "CoPU halted by exception");
    check(u_mem2.mem[(SIG - RESET_ADDR) >> 2], 7, "CoPU store");
    check(u_mem2.mem[(SIG - RESET_ADDR + 4) >> 2], 0, "CoPU stopped at exception");
    repeat (20) @(negedge clk);
    check(32'(ex_halted2), 1, "CoPU stays halted");
    // re-enable: runs again from the reset address
    u_mem2.mem[(SIG - RESET_ADDR) >> 2] = 0;
    en2 = 0; repeat (3) @(negedge clk); en2 = 1;
    n = 0;
    while (u_mem2.mem[(SIG - RESET_ADDR) >> 2] != 7 && n < 2000) begin @(negedge clk); n++; end
    check(u_mem2.mem[(SIG - RESET_ADDR) >> 2], 7, "CoPU restarted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
