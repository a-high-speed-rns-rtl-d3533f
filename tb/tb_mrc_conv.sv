// tb_mrc_conv: random X in [0, M) (plus the ends of the range) are given as one-hot
// residues; the converter's digits must equal A_i = floor(X / (m_1...m_(i-1))) mod m_i.
module tb_mrc_conv;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  localparam int MODS [7] = '{5, 7, 11, 13, 17, 19, 23};
  localparam longint MTOT = 37182145;

  ohr_vec_t res, dig;

  mrc_conv dut (.res(res), .dig(dig));

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
    q = xv;
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (dig[i] !== 23'(1) << (q % MODS[i])) begin
        failures++; $display("FAIL X=%0d digit %0d got %b", xv, i, dig[i]);
      end
      q = q / MODS[i];
    end
  endtask

  initial begin
    check(0); check(1); check(MTOT - 1); check(5 * 7 * 11);
    for (int n = 0; n < 1000; n++) check(longint'($urandom) % MTOT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
