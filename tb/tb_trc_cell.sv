// tb_trc_cell: all 16 input combinations.  Valid (complementary) pairs must merge
// into a valid pair whose value is the XOR of the inputs' first rails; any invalid
// input must give an invalid output.
module tb_trc_cell;
  int checks = 0, failures = 0;

  logic [1:0] a, b, z;

  trc_cell dut (.a(a), .b(b), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic va, vb;
      {a, b} = 4'(v); #1;
      va = a[1] ^ a[0];
      vb = b[1] ^ b[0];
      checks++;
      if ((z[1] ^ z[0]) != (va & vb)) begin failures++; $display("FAIL a=%b b=%b z=%b", a, b, z); end
      if (va & vb) begin
        checks++;
        if (z[1] != (a[1] ^ b[1])) begin failures++; $display("FAIL value a=%b b=%b z=%b", a, b, z); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
