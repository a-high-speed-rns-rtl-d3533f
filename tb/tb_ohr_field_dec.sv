// tb_ohr_field_dec: exhaustive check of the field decoder for two weights.
// A field value f at bit position SHIFT must give the one-hot residue of f*2^SHIFT mod M.
module tb_ohr_field_dec;
  int checks = 0, failures = 0;

  logic [3:0]  f13;
  logic [12:0] z13;
  logic [4:0]  f23;
  logic [22:0] z23;

  ohr_field_dec #(.M(13), .L(4), .SHIFT(8)) u13 (.f(f13), .z(z13));
  ohr_field_dec #(.M(23), .L(5), .SHIFT(5)) u23 (.f(f23), .z(z23));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      f13 = 4'(v); #1;
      checks++;
      if (z13 !== 13'(1) << ((v * 256) % 13)) begin
        failures++; $display("FAIL M=13 f=%0d got %b", v, z13);
      end
    end
    for (int v = 0; v < 32; v++) begin
      f23 = 5'(v); #1;
      checks++;
      if (z23 !== 23'(1) << ((v * 32) % 23)) begin
        failures++; $display("FAIL M=23 f=%0d got %b", v, z23);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
