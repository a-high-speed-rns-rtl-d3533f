// tb_ohr_add: exhaustive check of the one-hot modulo adder for N = 7 and N = 23.
// Every pair of code words must give the code word of (x + y) mod N; a non-code
// input (all lines low, or two lines high) must give a non-code output.
module tb_ohr_add;
  int checks = 0, failures = 0;

  logic [6:0]  x7, y7, z7;
  logic [22:0] x23, y23, z23;

  ohr_add #(.N(7))  u7  (.x(x7),  .y(y7),  .z(z7));
  ohr_add #(.N(23)) u23 (.x(x23), .y(y23), .z(z23));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 7; a++)
      for (int b = 0; b < 7; b++) begin
        x7 = 7'(1) << a; y7 = 7'(1) << b; #1;
        checks++;
        if (z7 !== 7'(1) << ((a + b) % 7)) begin
          failures++; $display("FAIL N=7 %0d+%0d got %b", a, b, z7);
        end
      end
    for (int a = 0; a < 23; a++)
      for (int b = 0; b < 23; b++) begin
        x23 = 23'(1) << a; y23 = 23'(1) << b; #1;
        checks++;
        if (z23 !== 23'(1) << ((a + b) % 23)) begin
          failures++; $display("FAIL N=23 %0d+%0d got %b", a, b, z23);
        end
      end
    // non-code inputs
    x23 = '0; y23 = 23'(1) << 5; #1;
    checks++; if (z23 !== '0) begin failures++; $display("FAIL zero-hot input"); end
    x23 = 23'b101; y23 = 23'(1) << 3; #1;
    checks++; if ($countones(z23) != 2) begin failures++; $display("FAIL two-hot input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
