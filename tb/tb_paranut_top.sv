// tb_paranut_top: end-to-end test of a four-core ParaNut system at its
// default size (4 cores, 4 banks x 512 sets x 4 ways cache).
//
// The testbench assembles a small RV32IM program (the encoder functions below
// build the instruction words; labels are resolved in a second pass) into the
// behavioural main memory and lets the system run it twice: first with the
// cache enabled, then, after a reset, in direct (uncached) mode.  The program
// reports results by writing them to the GPIO output register; the testbench
// snoops those bus writes and compares them with values it computes itself:
//   multiply, unsigned and signed divide/remainder (M extension),
//   a 200-iteration loop (runs from the cache, so the cached run is faster),
//   a sum over six lines of one cache set (forces dirty evictions),
//   byte/halfword store and sign/zero-extending loads,
//   the sum of values written by the three CoPUs after the CePU enabled them
//   through pnce, the cause of an ECALL exception (from the trap handler),
//   the cause of a load from an unmapped address (bus error, access fault),
//   the cause of a machine timer interrupt, and an end marker.
// It also decodes the byte the program sends on the UART line.
// Counted mechanisms (each must happen at least once): cache hit, cache miss,
// dirty write-back, direct bus access, cycles with several ports requesting
// the memory unit at once, CoPU execution, exception, interrupt, M-extension
// operation, UART byte, switch to direct mode.
module tb_paranut_top;
  import pn_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic cache_en = 1'b1;
  always #5 clk = ~clk;

  logic        mem_cyc, mem_stb, mem_we, mem_ack;
  logic [31:0] mem_adr, mem_dat_o, mem_dat_i;
  logic [3:0]  mem_sel;
  logic [7:0]  gpio_out;
  logic        uart_tx;
  logic [3:0]  halted, ex_halted;
  logic [31:0] cepu_pc;
  logic        bus_err;

  paranut_top dut (
    .clk, .rst, .cache_en,
    .mem_cyc, .mem_stb, .mem_we, .mem_adr, .mem_dat_o, .mem_sel, .mem_ack, .mem_dat_i,
    .gpio_in(8'h00), .gpio_out, .uart_tx, .uart_rx(1'b1), .ext_irq(1'b0),
    .halted, .cepu_pc, .ex_halted, .bus_err);

  wb_mem_model #(.WORDS(65536), .LAT(10)) u_mem (
    .clk, .rst, .cyc(mem_cyc), .stb(mem_stb), .we(mem_we), .adr(mem_adr),
    .dat_i(mem_dat_o), .sel(mem_sel), .ack(mem_ack), .dat_o(mem_dat_i));

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ encoder
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

  int ip;                  // word index being assembled
  logic [31:0] prog [1024];
  int L_sum, L_copu, L_handler, L_irq, L_loop1, L_loop2, L_wait, L_spin, L_end, L_cend;

  function automatic int here(); return ip * 4; endfunction
  task automatic emit(logic [31:0] w); prog[ip] = w; ip++; endtask
  task automatic li(int rd, logic [31:0] v);
    logic [31:0] hi = v + 32'h800;
    emit({hi[31:12], 5'(rd), OP_LUI});
    emit(i_t(int'(v[11:0]), rd, 0, rd, OP_IMM));
  endtask
  task automatic addi(int rd, int rs1, int imm); emit(i_t(imm, rs1, 0, rd, OP_IMM)); endtask
  task automatic add(int rd, int rs1, int rs2);  emit(r_t(0, rs2, rs1, 0, rd, OP_REG)); endtask
  task automatic sw(int rs2, int ofs, int rs1);  emit(s_t(ofs, rs2, rs1, 2)); endtask
  task automatic lw(int rd, int ofs, int rs1);   emit(i_t(ofs, rs1, 2, rd, OP_LOAD)); endtask
  task automatic bne(int rs1, int rs2, int tgt); emit(b_t(tgt - here(), rs1, rs2, 1)); endtask
  task automatic beq(int rs1, int rs2, int tgt); emit(b_t(tgt - here(), rs1, rs2, 0)); endtask
  task automatic csrrw(int rd, int c, int rs1);  emit(i_t(c, rs1, 1, rd, OP_SYSTEM)); endtask
  task automatic csrrs(int rd, int c, int rs1);  emit(i_t(c, rs1, 2, rd, OP_SYSTEM)); endtask
  task automatic mext(int f3, int rd, int rs1, int rs2); emit(r_t(1, rs2, rs1, f3, rd, OP_REG)); endtask
  task automatic jmp(int tgt); emit(j_t(tgt - here(), 0)); endtask

  localparam logic [31:0] REPORT = GPIO_BASE + 32'h4;

  task automatic assemble();
    ip = 0;
    csrrs(5, 'hF14, 0);                 // x5 = mhartid
    bne(5, 0, L_copu);
    li(6, MEM_BASE + L_handler);  csrrw(0, 'h305, 6);   // mtvec
    li(10, REPORT);
    // M extension
    li(1, 1234); li(2, 5678); mext(0, 3, 1, 2); sw(3, 0, 10);
    li(4, 13); mext(5, 7, 3, 4); sw(7, 0, 10); mext(7, 8, 3, 4); sw(8, 0, 10);
    li(9, -100); mext(4, 11, 9, 4); sw(11, 0, 10); mext(6, 11, 9, 4); sw(11, 0, 10);
    // a loop that runs from the cache: sum of 1..200
    addi(14, 0, 200); addi(16, 0, 0);
    L_sum = here();
    add(16, 16, 14); addi(14, 14, -1); bne(14, 0, L_sum); sw(16, 0, 10);
    // six lines of the same set: dirty evictions
    li(12, 32'h1001_0000); li(13, 32'h2000); addi(14, 0, 1); addi(15, 0, 7);
    L_loop1 = here();
    sw(14, 0, 12); add(12, 12, 13); addi(14, 14, 1); bne(14, 15, L_loop1);
    li(12, 32'h1001_0000); addi(14, 0, 6); addi(16, 0, 0);
    L_loop2 = here();
    lw(17, 0, 12); add(16, 16, 17); add(12, 12, 13); addi(14, 14, -1); bne(14, 0, L_loop2);
    sw(16, 0, 10);
    // byte and halfword accesses
    li(18, 32'h1002_0000); li(19, 32'h8081);
    emit(s_t(2, 19, 18, 1));                      // sh x19, 2(x18)
    emit(i_t(3, 18, 0, 20, OP_LOAD)); sw(20, 0, 10);   // lb
    emit(i_t(2, 18, 5, 21, OP_LOAD)); sw(21, 0, 10);   // lhu
    // CoPUs
    li(22, 32'h1000_8000); sw(0, 4, 22); sw(0, 8, 22); sw(0, 12, 22);
    addi(23, 0, 15); csrrw(0, 'h7C0, 23);
    L_wait = here();
    lw(24, 4, 22); beq(24, 0, L_wait); lw(25, 8, 22); beq(25, 0, L_wait);
    lw(26, 12, 22); beq(26, 0, L_wait);
    add(27, 24, 25); add(27, 27, 26); sw(27, 0, 10);
    addi(23, 0, 1); csrrw(0, 'h7C0, 23);
    // exception
    emit(32'h0000_0073);                          // ecall
    // load from an unmapped address: bus error, load access fault
    li(28, 32'h7000_0000); lw(29, 0, 28);
    // timer interrupt
    addi(31, 0, 0);
    li(28, MTIMER_BASE); lw(29, 0, 28); addi(29, 29, 200); sw(29, 8, 28); sw(0, 12, 28);
    addi(30, 0, 'h80); csrrw(0, 'h304, 30);
    emit(i_t('h300, 8, 6, 0, OP_SYSTEM));         // csrrsi x0, mstatus, 8
    L_spin = here();
    beq(31, 0, L_spin);
    // UART
    li(28, UART_BASE); addi(29, 0, 4); sw(29, 12, 28); addi(29, 0, 'h41); sw(29, 0, 28);
    li(29, 'hD0E); sw(29, 0, 10);
    L_end = here();
    jmp(L_end);
    // trap handler
    L_handler = here();
    csrrs(2, 'h342, 0); sw(2, 0, 10);
    emit(b_t(L_irq - here(), 2, 0, 4));           // blt x2, x0, irq
    csrrs(3, 'h341, 0); addi(3, 3, 4); csrrw(0, 'h341, 3);
    emit(32'h3020_0073);                          // mret
    L_irq = here();
    li(3, MTIMER_BASE); addi(4, 0, -1); sw(4, 12, 3); addi(31, 0, 1);
    emit(32'h3020_0073);
    // CoPU code: slot[hartid] = hartid * 100 + 7
    L_copu = here();
    addi(6, 0, 100); mext(0, 7, 5, 6); addi(7, 7, 7);
    li(8, 32'h1000_8000); emit(i_t(2, 5, 1, 9, OP_IMM)); add(8, 8, 9); sw(7, 0, 8);
    L_cend = here();
    jmp(L_cend);
  endtask

  // ----------------------------------------------------- expected results
  logic [31:0] expect_q [$];
  task automatic make_expect();
    longint p;
    p = 1234 * 5678;
    expect_q = {};
    expect_q.push_back(32'(p));
    expect_q.push_back(32'(p / 13));
    expect_q.push_back(32'(p % 13));
    expect_q.push_back(32'(-100 / 13));
    expect_q.push_back(32'(-100 % 13));
    expect_q.push_back(32'(200 * 201 / 2));
    expect_q.push_back(32'(1 + 2 + 3 + 4 + 5 + 6));
    expect_q.push_back(32'hFFFF_FF80);
    expect_q.push_back(32'h0000_8081);
    expect_q.push_back(32'(107 + 207 + 307));
    expect_q.push_back(CAUSE_ECALL_M);
    expect_q.push_back(CAUSE_LOAD_ACCESS);
    expect_q.push_back(CAUSE_IRQ_MTIMER);
    expect_q.push_back(32'hD0E);
  endtask

  // --------------------------------------------------- report snooping
  int n_reports;
  always @(posedge clk) begin
    if (!rst && dut.s_stb[3] && dut.s_we && dut.s_ack[3] && dut.s_adr[3][2]) begin
      checks++;
      if (expect_q.size() == 0) begin
        failures++;
        $display("unexpected report %h", dut.s_dat_o);
      end else begin
        if (dut.s_dat_o !== expect_q[0]) begin
          failures++;
          $display("report %0d: got %h, expected %h", n_reports, dut.s_dat_o, expect_q[0]);
        end
        void'(expect_q.pop_front());
      end
      n_reports++;
    end
  end

  // ------------------------------------------------------ UART receiver
  logic [7:0] uart_byte;
  int n_uart;
  initial begin
    n_uart = 0;
    forever begin
      @(negedge uart_tx);
      if (!rst) begin
        repeat (6) @(posedge clk);           // middle of data bit 0 (4 cycles/bit)
        for (int i = 0; i < 8; i++) begin
          uart_byte[i] = uart_tx;
          repeat (4) @(posedge clk);
        end
        checks++;
        if (uart_byte !== 8'h41 || uart_tx !== 1'b1) begin
          failures++;
          $display("UART: got %h", uart_byte);
        end
        n_uart++;
      end
    end
  end

  // ------------------------------------------------- mechanism counters
  int n_contention, n_copu_run, n_exc, n_irq, n_mext;
  always @(posedge clk) if (!rst) begin
    int req;
    req = 0;
    for (int c = 0; c < 4; c++)
      req += int'(dut.u_memu.rq_lsu[c]) + int'(dut.u_memu.rq_ifu[c]) + int'(dut.u_memu.rq_wr[c]);
    if (req > 1) n_contention++;
    if (!halted[1] || !halted[2] || !halted[3]) n_copu_run++;
    if (dut.g_core[0].u_cpu.trap) begin
      if (dut.g_core[0].u_cpu.trap_cause[31]) n_irq++;
      else n_exc++;
    end
    if (dut.g_core[0].u_cpu.md_start || dut.g_core[1].u_cpu.md_start) n_mext++;
  end

  task automatic need(string what, longint n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  task automatic run_once(logic cached, output int cycles);
    rst = 1'b1;
    cache_en = cached;
    for (int i = 0; i < 65536; i++) u_mem.mem[i] = '0;
    for (int i = 0; i < ip; i++) u_mem.mem[i] = prog[i];
    make_expect();
    n_reports = 0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    cycles = 0;
    while (expect_q.size() != 0 && cycles < 200000) begin
      @(posedge clk);
      cycles++;
    end
    repeat (200) @(posedge clk);     // let the UART byte finish
    checks++;
    if (expect_q.size() != 0) begin
      failures++;
      $display("program did not finish (%0d reports missing)", expect_q.size());
    end
    checks++;
    if (bus_err) failures++;
  endtask

  initial begin
    int cyc_cached, cyc_direct;
    longint hits, misses, wbs, directs;
    assemble();
    assemble();                     // second pass: labels known
    run_once(1'b1, cyc_cached);
    hits = dut.u_memu.n_hit; misses = dut.u_memu.n_miss;
    wbs = dut.u_memu.n_writeback; directs = dut.u_memu.n_direct;
    $display("cached run: %0d cycles", cyc_cached);
    run_once(1'b0, cyc_direct);
    $display("direct run: %0d cycles", cyc_direct);
    need("cache hit", hits);
    need("cache miss", misses);
    need("dirty write-back", wbs);
    need("direct bus access", directs + dut.u_memu.n_direct);
    need("port contention cycles", n_contention);
    need("CoPU running cycles", n_copu_run);
    need("exceptions", n_exc);
    need("interrupts", n_irq);
    need("M-extension operations", n_mext);
    need("UART bytes", n_uart);
    need("mode switch to direct", (dut.u_memu.n_hit == 0 && dut.u_memu.n_direct > 0) ? 1 : 0);
    // the cache must make the program faster than direct access
    checks++;
    if (!(cyc_cached < cyc_direct)) begin
      failures++;
      $display("cached run not faster");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
