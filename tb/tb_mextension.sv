// tb_mextension: runs random and corner-case operands through all eight
// multiply/divide operations and compares each result with a reference
// computed in the testbench.  Also checks that every operation takes exactly
// 33 cycles from `start` to `valid` and that `busy` covers that time.
module tb_mextension;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, start, busy, valid;
  logic [2:0] funct3;
  logic [31:0] a, b, result;
  int checks = 0, failures = 0;

  mextension dut (.clk, .rst, .start, .funct3, .a, .b, .busy, .valid, .result);

  function automatic logic [31:0] model(logic [2:0] f, logic [31:0] x, logic [31:0] y);
    logic signed [63:0] ss;
    logic [63:0] uu;
    logic signed [63:0] su;
    unique case (f)
      3'd0: begin uu = x * y; return uu[31:0]; end
      3'd1: begin ss = $signed({{32{x[31]}}, x}) * $signed({{32{y[31]}}, y}); return ss[63:32]; end
      3'd2: begin su = $signed({{32{x[31]}}, x}) * $signed({32'd0, y}); return su[63:32]; end
      3'd3: begin uu = {32'd0, x} * {32'd0, y}; return uu[63:32]; end
      3'd4: if (y == 0) return '1; else if (x == 32'h8000_0000 && y == '1) return x;
            else return 32'($signed(x) / $signed(y));
      3'd5: if (y == 0) return '1; else return x / y;
      3'd6: if (y == 0) return x; else if (x == 32'h8000_0000 && y == '1) return 0;
            else return 32'($signed(x) % $signed(y));
      default: if (y == 0) return x; else return x % y;
    endcase
  endfunction

  function automatic logic [31:0] pick();
    unique case ($urandom_range(0, 5))
      0: return 0;
      1: return '1;
      2: return 32'h8000_0000;
      3: return 32'($urandom_range(0, 20));
      4: return -32'($urandom_range(0, 20));
      default: return $urandom;
    endcase
  endfunction

  initial begin
    rst = 1; start = 0; funct3 = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 800; n++) begin
      logic [31:0] exp;
      int lat;
      @(negedge clk);
      funct3 = 3'(n % 8); a = pick(); b = pick(); start = 1;
      exp = model(funct3, a, b);
      @(negedge clk); start = 0;
      lat = 1;
      checks++;
      if (!busy) begin failures++; $display("busy not set"); end
      while (!valid && lat < 100) begin @(negedge clk); lat++; end
      checks += 2;
      // lat counts falling edges from the one after the sampling edge of
      // `start`, so 33 clock cycles from start to valid show as lat == 34
      if (lat - 1 != 33) begin failures++; $display("latency %0d", lat - 1); end
      if (result !== exp) begin
        failures++;
        $display("f3=%0d a=%h b=%h got %h exp %h", funct3, a, b, result, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
