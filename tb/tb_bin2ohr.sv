// tb_bin2ohr: binary-to-one-hot-residue conversion.  Exhaustive for 8-bit inputs
// with M = 23 and M = 5 (three fields, the top one two bits wide); random 16-bit
// inputs with M = 7 (six fields, a deeper adder tree).
module tb_bin2ohr;
  int checks = 0, failures = 0;

  logic [7:0]  b8;
  logic [15:0] b16;
  logic [22:0] z23;
  logic [4:0]  z5;
  logic [6:0]  z7;

  bin2ohr #(.M(23), .W(8))  u23 (.b(b8),  .z(z23));
  bin2ohr #(.M(5),  .W(8))  u5  (.b(b8),  .z(z5));
  bin2ohr #(.M(7),  .W(16)) u7  (.b(b16), .z(z7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      b8 = 8'(v); #1;
      checks += 2;
      if (z23 !== 23'(1) << (v % 23)) begin failures++; $display("FAIL M=23 b=%0d got %b", v, z23); end
      if (z5  !== 5'(1)  << (v % 5))  begin failures++; $display("FAIL M=5 b=%0d got %b", v, z5); end
    end
    for (int n = 0; n < 500; n++) begin
      int v;
      v = int'($urandom_range(0, 65535));
      b16 = 16'(v); #1;
      checks++;
      if (z7 !== 7'(1) << (v % 7)) begin failures++; $display("FAIL M=7 b=%0d got %b", v, z7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
