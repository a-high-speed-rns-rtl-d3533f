// tb_mofn_chk: all 64 words for K = 3, all 256 for K = 4 and all 16 for K = 2: the
// output pair must be 01 or 10 exactly when the word has weight K.
module tb_mofn_chk;
  int checks = 0, failures = 0;

  logic [5:0] w3;
  logic [7:0] w4;
  logic [3:0] w2;
  logic [1:0] p3, p4, p2;

  mofn_chk          u3 (.w(w3), .fg(p3));
  mofn_chk #(.K(4)) u4 (.w(w4), .fg(p4));
  mofn_chk #(.K(2)) u2 (.w(w2), .fg(p2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      w3 = 6'(v); w4 = 8'(v); w2 = 4'(v); #1;
      checks++;
      if ((p4[1] ^ p4[0]) != ($countones(w4) == 4)) begin failures++; $display("FAIL K=4 w=%b p=%b", w4, p4); end
      if (v < 64) begin
        checks++;
        if ((p3[1] ^ p3[0]) != ($countones(w3) == 3)) begin failures++; $display("FAIL K=3 w=%b p=%b", w3, p3); end
      end
      if (v < 16) begin
        checks++;
        if ((p2[1] ^ p2[0]) != ($countones(w2) == 2)) begin failures++; $display("FAIL K=2 w=%b p=%b", w2, p2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
