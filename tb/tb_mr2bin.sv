// tb_mr2bin: random mixed-radix digits (each below its modulus) and the largest
// digit vector; the output must be the weighted sum with weights 1, 5, 35, 385, ...
module tb_mr2bin;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  localparam int MODS [7] = '{5, 7, 11, 13, 17, 19, 23};

  digit_vec_t  dig;
  logic [25:0] xb;

  mr2bin dut (.dig(dig), .x_bin(xb));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1001; n++) begin
      longint exp, wgt;
      exp = 0; wgt = 1;
      for (int i = 0; i < 7; i++) begin
        int a;
        a = (n == 1000) ? MODS[i] - 1 : int'($urandom_range(0, MODS[i] - 1));
        dig[i] = 5'(a);
        exp += a * wgt;
        wgt *= MODS[i];
      end
      #1;
      checks++;
      if (longint'(xb) != exp) begin failures++; $display("FAIL exp %0d got %0d", exp, xb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
