// tb_rns_proc: one channel processor with M = 23 (default M = 7 also instantiated).
// Random sequences of NOP/CLR/ADD/MUL/MAC are compared with an integer model, and a
// 32-term MAC is timed: its result must be in the accumulator 32 clocks after the
// first term is applied.
module tb_rns_proc;
  import rns_pkg::*;
  int checks = 0, failures = 0;
  int cycle = 0;

  logic        clk = 0, rst_n = 0;
  op_e         op;
  logic [22:0] x, y, z;
  logic [6:0]  x7, y7, z7;

  rns_proc #(.M(23)) dut  (.clk(clk), .rst_n(rst_n), .op(op), .x(x),  .y(y),  .z(z));
  rns_proc           dut7 (.clk(clk), .rst_n(rst_n), .op(op), .x(x7), .y(y7), .z(z7));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int acc, acc7;

  task automatic drive(op_e o, int a, int b);
    op = o;
    x  = 23'(1) << a;       y  = 23'(1) << b;
    x7 = 7'(1) << (a % 7);  y7 = 7'(1) << (b % 7);
    @(posedge clk); #1;
    unique case (o)
      OP_CLR: begin acc = 0; acc7 = 0; end
      OP_ADD: begin acc = (a + b) % 23; acc7 = ((a % 7) + (b % 7)) % 7; end
      OP_MUL: begin acc = (a * b) % 23; acc7 = ((a % 7) * (b % 7)) % 7; end
      OP_MAC: begin acc = (acc + a * b) % 23; acc7 = (acc7 + (a % 7) * (b % 7)) % 7; end
      default: ;
    endcase
    checks += 2;
    if (z !== 23'(1) << acc) begin failures++; $display("FAIL op=%s a=%0d b=%0d exp %0d got %b", o.name(), a, b, acc, z); end
    if (z7 !== 7'(1) << acc7) begin failures++; $display("FAIL M=7 op=%s got %b exp %0d", o.name(), z7, acc7); end
  endtask

  initial begin
    op = OP_NOP; x = 23'(1); y = 23'(1); x7 = 7'(1); y7 = 7'(1);
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    acc = 0; acc7 = 0;
    checks++;
    if (z !== 23'(1)) begin failures++; $display("FAIL reset value %b", z); end
    for (int n = 0; n < 2000; n++) begin
      op_e o;
      o = op_e'($urandom_range(0, 4));
      drive(o, int'($urandom_range(0, 22)), int'($urandom_range(0, 22)));
    end
    // timed 32-term MAC
    begin
      int t0, exp, a, b;
      exp = 0;
      t0 = cycle;
      for (int k = 0; k < 32; k++) begin
        a = int'($urandom_range(0, 22)); b = int'($urandom_range(0, 22));
        exp = (exp + a * b) % 23;
        drive(k == 0 ? OP_MUL : OP_MAC, a, b);
      end
      checks += 2;
      if (z !== 23'(1) << exp) begin failures++; $display("FAIL 32-term MAC"); end
      if (cycle - t0 != 32) begin failures++; $display("FAIL 32-term MAC took %0d cycles", cycle - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
