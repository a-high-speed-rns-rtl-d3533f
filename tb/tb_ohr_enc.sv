// tb_ohr_enc: every one-hot input of 23 and of 5 lines must encode to its index.
module tb_ohr_enc;
  int checks = 0, failures = 0;

  logic [22:0] x23;
  logic [4:0]  b23;
  logic [4:0]  x5;
  logic [2:0]  b5;

  ohr_enc                    u23 (.x(x23), .b(b23));
  ohr_enc #(.N(5), .BW(3))   u5  (.x(x5),  .b(b5));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 23; v++) begin
      x23 = 23'(1) << v; x5 = 5'(1) << (v % 5); #1;
      checks += 2;
      if (b23 !== 5'(v)) begin failures++; $display("FAIL N=23 v=%0d got %0d", v, b23); end
      if (b5 !== 3'(v % 5)) begin failures++; $display("FAIL N=5 v=%0d got %0d", v % 5, b5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
