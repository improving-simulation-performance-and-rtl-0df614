// tb_lsu: performs random byte, halfword and word loads and stores through
// the load/store unit into a small word memory model behind read and write
// port models with random latency, and compares every load with a byte-level
// reference memory.  Also checks the misalignment flag for all sizes and
// offsets and the load latency, and that a bus error on a load or store
// (addresses above the modelled memory) is reported with `done`.
module tb_lsu;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, req, we, done, misaligned, err, rp_err, wp_err, last_err, rp_rd, rp_ack, wp_wr, wp_ack;
  logic [2:0] funct3;
  logic [31:0] adr, wdata, rdata, rp_adr, rp_data, wp_adr, wp_data;
  logic [3:0] wp_bsel;
  int checks = 0, failures = 0;
  int lat = 2;

  lsu dut (.clk, .rst, .req, .we, .funct3, .adr, .wdata, .done, .rdata, .misaligned, .err,
           .rp_rd, .rp_adr, .rp_ack, .rp_data, .rp_err, .wp_wr, .wp_adr, .wp_data, .wp_bsel,
           .wp_ack, .wp_err);

  logic [31:0] mem [64];
  logic [7:0] ref_mem [256];
  int rc = 0, wc = 0;
  always_ff @(posedge clk) begin
    rp_ack <= 1'b0;
    wp_ack <= 1'b0;
    rp_err <= 1'b0;
    wp_err <= 1'b0;
    if (rp_rd && !rp_ack) begin
      if (rc >= lat) begin rp_ack <= 1'b1; rp_err <= rp_adr[8]; rp_data <= mem[rp_adr[7:2]]; rc <= 0; end
      else rc <= rc + 1;
    end
    if (wp_wr && !wp_ack) begin
      if (wc >= lat) begin
        wp_ack <= 1'b1; wp_err <= wp_adr[8]; wc <= 0;
        if (!wp_adr[8]) for (int b = 0; b < 4; b++)
          if (wp_bsel[b]) mem[wp_adr[7:2]][8*b +: 8] <= wp_data[8*b +: 8];
      end else wc <= wc + 1;
    end
  end

  task automatic access(logic w, logic [2:0] f, logic [31:0] a, logic [31:0] d, output logic [31:0] q, output int n);
    @(negedge clk); req = 1; we = w; funct3 = f; adr = a; wdata = d;
    @(negedge clk); req = 0; n = 1;
    while (!done) begin @(negedge clk); n++; end
    q = rdata;
    last_err = err;
  endtask

  initial begin
    rst = 1; req = 0; we = 0; funct3 = 0; adr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) mem[i] = 0;
    for (int i = 0; i < 256; i++) ref_mem[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    // misalignment flag
    for (int f = 0; f < 3; f++)
      for (int o = 0; o < 4; o++) begin
        funct3 = 3'(f); adr = 32'h1000_0000 + o;
        #1;
        checks++;
        if (misaligned !== (f == 1 ? o[0] : f == 2 ? (o != 0) : 1'b0)) failures++;
      end
    for (int n = 0; n < 2000; n++) begin
      logic [2:0] f;
      logic [31:0] a, d, q, e;
      int cyc;
      lat = $urandom_range(0, 4);
      f = 3'($urandom_range(0, 2));
      if (!$urandom_range(0, 1) && f != 2) f[2] = 1'b1;
      a = 32'h1000_0000 + $urandom_range(0, 255);
      a = f[1:0] == 2 ? {a[31:2], 2'b00} : f[1:0] == 1 ? {a[31:1], 1'b0} : a;
      d = $urandom;
      if ($urandom_range(0, 1)) begin
        f[2] = 1'b0;
        access(1, f, a, d, q, cyc);
        for (int b = 0; b < (1 << f[1:0]); b++) ref_mem[a[7:0] + b] = d[8*b +: 8];
      end else begin
        access(0, f, a, 0, q, cyc);
        e = 0;
        for (int b = 0; b < (1 << f[1:0]); b++) e[8*b +: 8] = ref_mem[a[7:0] + b];
        if (!f[2] && f[1:0] == 0) e = {{24{e[7]}}, e[7:0]};
        if (!f[2] && f[1:0] == 1) e = {{16{e[15]}}, e[15:0]};
        checks += 2;
        checks++;
        if (last_err) begin failures++; $display("err on good load"); end
        if (q !== e) begin failures++; $display("load f3=%0d a=%h got %h exp %h", f, a, q, e); end
        // request registered, memory answers after lat+1, done one cycle later
        if (cyc != lat + 3) begin failures++; $display("load took %0d (lat %0d)", cyc, lat); end
      end
    end
    // bus errors
    for (int w = 0; w < 2; w++) begin
      logic [31:0] q;
      int cyc;
      lat = 1;
      access(1'(w), 3'd2, 32'h1000_0100, 32'hDEAD_BEEF, q, cyc);
      checks++;
      if (!last_err) begin failures++; $display("no err (we=%0d)", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
