// tb_coef_dec: every address of the default table, and of a second table passed as
// a parameter, must give the one-hot residues of that coefficient on all channels.
module tb_coef_dec;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  localparam int MODS [7] = '{5, 7, 11, 13, 17, 19, 23};

  function automatic coef_tab_t alt_tab();
    coef_tab_t t;
    for (int k = 0; k < 32; k++) t[k] = (k * 37 + 11) % 256;
    return t;
  endfunction

  logic [4:0] addr;
  ohr_vec_t   y, y2;

  coef_dec                     dut  (.addr(addr), .y(y));
  coef_dec #(.COEF(alt_tab())) dut2 (.addr(addr), .y(y2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      int c, c2, d;
      d  = (k < 16) ? k : 31 - k;      // distance to the nearer end of the window
      c  = 8 * d + 7;
      c2 = (k * 37 + 11) % 256;
      addr = 5'(k); #1;
      for (int i = 0; i < 7; i++) begin
        checks += 2;
        if (y[i]  !== 23'(1) << (c  % MODS[i])) begin failures++; $display("FAIL k=%0d ch%0d %b", k, i, y[i]); end
        if (y2[i] !== 23'(1) << (c2 % MODS[i])) begin failures++; $display("FAIL alt k=%0d ch%0d %b", k, i, y2[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
