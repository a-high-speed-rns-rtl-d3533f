// tb_tsc_checker: random valid digit vectors must give err = 0; the same vectors
// with one channel made zero-hot or two-hot must give err = 1.  Both values of the
// final pair (01 and 10) must occur for valid inputs, and so must both values of
// every channel's own pair (each checker output is exercised by code words).
module tb_tsc_checker;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  localparam int MODS [7] = '{5, 7, 11, 13, 17, 19, 23};

  ohr_vec_t   dig;
  logic [1:0] chk;
  logic       err;
  int         seen01 = 0, seen10 = 0;
  int         ch_f [7], ch_g [7];          // per channel: times f resp. g was the high rail

  tsc_checker dut (.dig(dig), .chk(chk), .err(err));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ch_f[i]) begin ch_f[i] = 0; ch_g[i] = 0; end
    for (int n = 0; n < 1000; n++) begin
      int ch, a, b;
      for (int i = 0; i < 7; i++) dig[i] = 23'(1) << $urandom_range(0, MODS[i] - 1);
      #1;
      checks++;
      if (err !== 1'b0 || (chk != 2'b01 && chk != 2'b10)) begin failures++; $display("FAIL valid input chk=%b", chk); end
      if (chk == 2'b01) seen01++;
      if (chk == 2'b10) seen10++;
      for (int i = 0; i < 7; i++) begin
        if (dut.pair[i] == 2'b10) ch_f[i]++;
        if (dut.pair[i] == 2'b01) ch_g[i]++;
      end
      ch = int'($urandom_range(0, 6));
      if (n % 2 == 0) dig[ch] = '0;
      else begin
        a = int'($urandom_range(0, MODS[ch] - 1));
        b = (a + 1 + int'($urandom_range(0, MODS[ch] - 2))) % MODS[ch];
        dig[ch] = (23'(1) << a) | (23'(1) << b);
      end
      #1;
      checks++;
      if (err !== 1'b1) begin failures++; $display("FAIL fault in channel %0d not detected, chk=%b", ch, chk); end
    end
    // self-testing: each channel checker must drive both of its output values
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (ch_f[i] == 0 || ch_g[i] == 0) begin failures++; $display("FAIL channel %0d checker output stuck", i); end
    end
    checks++;
    if (seen01 == 0 || seen10 == 0) begin failures++; $display("FAIL only one valid output value seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
