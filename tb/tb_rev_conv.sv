// tb_rev_conv: random X in [0, M) as one-hot residues must come back as binary X,
// with binary digits and one-hot digits that agree.
module tb_rev_conv;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  localparam int MODS [7] = '{5, 7, 11, 13, 17, 19, 23};
  localparam longint MTOT = 37182145;

  ohr_vec_t    res, dig_oh;
  digit_vec_t  dig;
  logic [25:0] xb;

  rev_conv dut (.res(res), .dig_oh(dig_oh), .dig(dig), .x_bin(xb));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint xv);
    longint q;
    for (int i = 0; i < 7; i++) res[i] = 23'(1) << (xv % MODS[i]);
    #1;
    checks++;
    if (longint'(xb) != xv) begin failures++; $display("FAIL X=%0d got %0d", xv, xb); end
    q = xv;
    for (int i = 0; i < 7; i++) begin
      checks += 2;
      if (longint'(dig[i]) != q % MODS[i]) begin failures++; $display("FAIL X=%0d digit %0d = %0d", xv, i, dig[i]); end
      if (dig_oh[i] !== 23'(1) << (q % MODS[i])) begin failures++; $display("FAIL X=%0d one-hot digit %0d", xv, i); end
      q = q / MODS[i];
    end
  endtask

  initial begin
    check(0); check(MTOT - 1); check(2080800);
    for (int n = 0; n < 1000; n++) check(longint'($urandom) % MTOT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
