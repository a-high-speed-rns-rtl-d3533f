// tb_ohr_mul: exhaustive check of the index-calculus multiplier for M = 7, 13, 23,
// including the zero operand, plus one non-code input.
module tb_ohr_mul;
  int checks = 0, failures = 0;

  logic [6:0]  x7, y7, z7;
  logic [12:0] x13, y13, z13;
  logic [22:0] x23, y23, z23;

  ohr_mul #(.M(7))  u7  (.x(x7),  .y(y7),  .z(z7));
  ohr_mul #(.M(13)) u13 (.x(x13), .y(y13), .z(z13));
  ohr_mul #(.M(23)) u23 (.x(x23), .y(y23), .z(z23));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 23; a++)
      for (int b = 0; b < 23; b++) begin
        x23 = 23'(1) << a; y23 = 23'(1) << b;
        x13 = 13'(1) << (a % 13); y13 = 13'(1) << (b % 13);
        x7  = 7'(1)  << (a % 7);  y7  = 7'(1)  << (b % 7);
        #1;
        checks += 3;
        if (z23 !== 23'(1) << ((a * b) % 23)) begin failures++; $display("FAIL M=23 %0d*%0d got %b", a, b, z23); end
        if (z13 !== 13'(1) << (((a % 13) * (b % 13)) % 13)) begin failures++; $display("FAIL M=13 %0d*%0d got %b", a % 13, b % 13, z13); end
        if (z7  !== 7'(1)  << (((a % 7) * (b % 7)) % 7)) begin failures++; $display("FAIL M=7 %0d*%0d got %b", a % 7, b % 7, z7); end
      end
    x23 = '0; y23 = 23'(1) << 4; #1;
    checks++; if ($onehot(z23)) begin failures++; $display("FAIL zero-hot input gave code word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
