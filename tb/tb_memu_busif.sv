// tb_memu_busif: checks the memory unit's Wishbone master against the
// behavioural memory: writes with byte selects and reads return the right
// data, `done` comes exactly one cycle after ACK, and CYC/STB are up for
// exactly LAT+2 cycles per transfer (the model answers ACK
// LAT+1 cycles after STB).  Finally a slave error (ERR instead of ACK)
// must end the transfer with `err` set and zero read data.
module tb_memu_busif;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, req, we, done, cyc, stb, wbwe, ack, err, berr, inj;
  logic [31:0] adr, wdata, rdata, wadr, wdo, wdi;
  logic [3:0] sel, wsel;
  int checks = 0, failures = 0;
  localparam int LAT = 3;

  memu_busif dut (.clk, .rst, .req, .we, .adr, .wdata, .sel, .done, .rdata, .err,
                  .wb_cyc(cyc), .wb_stb(stb), .wb_we(wbwe), .wb_adr(wadr),
                  .wb_dat_o(wdo), .wb_sel(wsel), .wb_ack(ack), .wb_err(berr), .wb_dat_i(wdi));
  // error injection: while `inj` is set the memory is cut off and the
  // testbench answers STB with ERR
  assign berr = inj && stb;
  wb_mem_model #(.WORDS(256), .LAT(LAT)) u_mem (.clk, .rst, .cyc, .stb(stb && !inj), .we(wbwe),
    .adr(wadr), .dat_i(wdo), .sel(wsel), .ack, .dat_o(wdi));

  logic [31:0] ref_mem [256];
  int stb_cycles;
  always @(posedge clk) if (stb) stb_cycles++;

  task automatic xfer(logic w, logic [7:0] idx, logic [31:0] d, logic [3:0] s);
    int cyc_cnt;
    @(negedge clk); req = 1; we = w; adr = {22'd0, idx, 2'b00}; wdata = d; sel = s;
    stb_cycles = 0; cyc_cnt = 0;
    do begin @(posedge clk); #1; cyc_cnt++; end while (!done);
    @(negedge clk); req = 0;
    checks += 2;
    if (stb_cycles != LAT + 2) begin failures++; $display("stb %0d cycles", stb_cycles); end
    if (cyc_cnt != LAT + 3) begin failures++; $display("latency %0d", cyc_cnt); end
    if (w) begin
      for (int k = 0; k < 4; k++) if (s[k]) ref_mem[idx][8*k +: 8] = d[8*k +: 8];
    end else begin
      checks++;
      if (rdata !== ref_mem[idx]) begin failures++; $display("read %0d", idx); end
    end
    checks++;
    if (err) begin failures++; $display("err on good transfer"); end
  endtask

  initial begin
    inj = 0;
    rst = 1; req = 0; we = 0; adr = 0; wdata = 0; sel = 0;
    for (int i = 0; i < 256; i++) begin u_mem.mem[i] = 0; ref_mem[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 200; n++)
      xfer(1'($urandom), 8'($urandom % 32), $urandom, 4'($urandom));
    for (int n = 0; n < 2; n++) begin
      int c;
      @(negedge clk); inj = 1; req = 1; we = 1'(n); adr = 32'h40; sel = 4'hF; c = 0;
      do begin @(posedge clk); #1; c++; end while (!done && c < 20);
      @(negedge clk); req = 0;
      checks += 3;
      if (!done || !err) begin failures++; $display("no err"); end
      if (rdata !== 0) begin failures++; $display("data on err"); end
      if (c != 2) begin failures++; $display("err took %0d", c); end
      @(negedge clk); inj = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
