// tb_ohr2mofn: for N = 23 (K = 4) and N = 5 (K = 2).  Every one-hot input must give
// a word of weight exactly K, all different; no line high must give weight 0; two
// lines high must give weight above K.
module tb_ohr2mofn;
  int checks = 0, failures = 0;

  logic [22:0] x23;
  logic [7:0]  w23;
  logic [4:0]  x5;
  logic [3:0]  w5;
  logic [7:0]  seen [23];

  ohr2mofn          u23 (.x(x23), .w(w23));
  ohr2mofn #(.N(5)) u5  (.x(x5),  .w(w5));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 23; v++) begin
      x23 = 23'(1) << v; x5 = 5'(1) << (v % 5); #1;
      seen[v] = w23;
      checks += 2;
      if ($countones(w23) != 4) begin failures++; $display("FAIL N=23 v=%0d w=%b", v, w23); end
      if ($countones(w5) != 2)  begin failures++; $display("FAIL N=5 v=%0d w=%b", v % 5, w5); end
      for (int u = 0; u < v; u++) begin
        checks++;
        if (seen[u] == w23) begin failures++; $display("FAIL lines %0d and %0d share a word", u, v); end
      end
    end
    x23 = '0; x5 = '0; #1;
    checks += 2;
    if (w23 != 0) begin failures++; $display("FAIL zero-hot N=23"); end
    if (w5 != 0)  begin failures++; $display("FAIL zero-hot N=5"); end
    for (int n = 0; n < 200; n++) begin
      int a, b;
      a = int'($urandom_range(0, 22));
      b = (a + 1 + int'($urandom_range(0, 21))) % 23;
      x23 = (23'(1) << a) | (23'(1) << b); #1;
      checks++;
      if ($countones(w23) <= 4) begin failures++; $display("FAIL two-hot %0d,%0d w=%b", a, b, w23); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
