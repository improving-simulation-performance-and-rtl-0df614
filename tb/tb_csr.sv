// tb_csr: checks the machine-mode CSR file of a capability-level-3 core:
// write/set/clear operations, read-only and unknown registers, the pnce
// register (bit 0 always set), trap entry and mret (mepc, mcause, MIE/MPIE),
// the interrupt pending logic, mcycle counting, and that a level-2 copy
// rejects pnce and never signals interrupts.
module tb_csr;
  import pn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, access, write, illegal, trap, mret, instret, mtip, meip, irq_pending;
  logic irq_pending2, illegal2;
  logic [11:0] addr;
  logic [1:0] op;
  logic [31:0] wdata, rdata, trap_cause, trap_epc, trap_tval, mtvec, mepc, irq_cause;
  logic [31:0] rdata2, mtvec2, mepc2, irq_cause2;
  logic [3:0] pnce;
  logic [3:0] pnce2;
  int checks = 0, failures = 0;

  csr #(.HART_ID(0), .CAP_LEVEL(3), .CORES(4)) dut (.clk, .rst, .access, .write, .addr, .op,
    .wdata, .rdata, .illegal, .trap, .trap_cause, .trap_epc, .trap_tval, .mret, .instret,
    .mtip, .meip, .mtvec, .mepc, .irq_pending, .irq_cause, .pnce);
  csr #(.HART_ID(2), .CAP_LEVEL(2), .CORES(4)) dut2 (.clk, .rst, .access, .write, .addr, .op,
    .wdata, .rdata(rdata2), .illegal(illegal2), .trap(1'b0), .trap_cause, .trap_epc, .trap_tval,
    .mret(1'b0), .instret, .mtip, .meip, .mtvec(mtvec2), .mepc(mepc2),
    .irq_pending(irq_pending2), .irq_cause(irq_cause2), .pnce(pnce2));

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic csrop(logic [11:0] a, logic [1:0] o, logic [31:0] d, logic w = 1);
    @(negedge clk); access = 1; write = w; addr = a; op = o; wdata = d;
    @(negedge clk); access = 0; write = 0;
  endtask

  initial begin
    logic [31:0] c0, c1;
    rst = 1; access = 0; write = 0; addr = 0; op = 0; wdata = 0; trap = 0; mret = 0;
    instret = 0; mtip = 0; meip = 0; trap_cause = 0; trap_epc = 0; trap_tval = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    addr = CSR_MTVEC; #1 check(mtvec == RESET_ADDR && rdata == RESET_ADDR, "mtvec reset");
    addr = CSR_MHARTID; #1 check(rdata == 0 && rdata2 == 2, "mhartid");
    addr = CSR_MISA; #1 check(rdata[12] && rdata[8] && rdata[31:30] == 1, "misa");
    csrop(CSR_MSCRATCH, 1, 32'h1234_5678);
    addr = CSR_MSCRATCH; #1 check(rdata == 32'h1234_5678, "write");
    csrop(CSR_MSCRATCH, 2, 32'h0000_0007);
    addr = CSR_MSCRATCH; #1 check(rdata == 32'h1234_567F, "set");
    csrop(CSR_MSCRATCH, 3, 32'h0000_00F0);
    addr = CSR_MSCRATCH; #1 check(rdata == 32'h1234_560F, "clear");
    csrop(CSR_MTVEC, 1, 32'h1000_0103);
    check(mtvec == 32'h1000_0100, "mtvec aligned");
    addr = 12'h7FF; write = 0; #1 check(illegal, "unknown csr illegal");
    addr = CSR_MHARTID; write = 1; #1 check(illegal, "write to read-only illegal");
    write = 0; #1 check(!illegal, "read of read-only legal");
    // pnce
    addr = CSR_PNCE; #1 check(!illegal && rdata == 1, "pnce reset");
    check(illegal2, "pnce illegal at level 2");
    csrop(CSR_PNCE, 1, 32'h0000_000C);
    check(pnce == 4'b1101, "pnce bit 0 stays set");
    csrop(CSR_PNCE, 3, 32'h0000_0005);
    check(pnce == 4'b1001, "pnce clear");
    check(pnce2 == 4'b0001, "level-2 pnce unchanged");
    // mcycle
    addr = CSR_MCYCLE; #1 c0 = rdata;
    repeat (5) @(negedge clk);
    addr = CSR_MCYCLE; #1 c1 = rdata;
    check(c1 - c0 == 5, "mcycle counts cycles");
    instret = 1; repeat (3) @(negedge clk); instret = 0;
    addr = CSR_MINSTRET; #1 check(rdata == 3, "minstret");
    // interrupts
    mtip = 1;
    #1 check(!irq_pending, "no irq without MIE");
    csrop(CSR_MIE, 1, 32'h0000_0880);
    csrop(CSR_MSTATUS, 2, 32'h0000_0008);
    #1 check(irq_pending && irq_cause == CAUSE_IRQ_MTIMER, "timer irq pending");
    check(!irq_pending2, "level 2 never takes interrupts");
    mtip = 0; meip = 1;
    #1 check(irq_pending && irq_cause == CAUSE_IRQ_MEXT, "external irq pending");
    // trap entry
    @(negedge clk); trap = 1; trap_cause = CAUSE_IRQ_MEXT; trap_epc = 32'h1000_0040; trap_tval = 32'h55;
    @(negedge clk); trap = 0;
    #1 check(!irq_pending, "MIE cleared on trap");
    check(mepc == 32'h1000_0040, "mepc");
    addr = CSR_MCAUSE; #1 check(rdata == CAUSE_IRQ_MEXT, "mcause");
    addr = CSR_MTVAL; #1 check(rdata == 32'h55, "mtval");
    addr = CSR_MSTATUS; #1 check(rdata[7] && !rdata[3], "MPIE set, MIE clear");
    @(negedge clk); mret = 1;
    @(negedge clk); mret = 0;
    addr = CSR_MSTATUS; #1 check(rdata[7] && rdata[3], "mret restores MIE");
    #1 check(irq_pending, "pending again after mret");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
