// tb_fwd_conv: both operands on all seven channels, for every X value and random Y.
module tb_fwd_conv;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  localparam int MODS [7] = '{5, 7, 11, 13, 17, 19, 23};

  logic [7:0] xb, yb;
  ohr_vec_t   xo, yo;

  fwd_conv #(.W(8)) dut (.x_bin(xb), .y_bin(yb), .x_oh(xo), .y_oh(yo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int w;
      w  = int'($urandom_range(0, 255));
      xb = 8'(v); yb = 8'(w); #1;
      for (int i = 0; i < 7; i++) begin
        checks += 2;
        if (xo[i] !== 23'(1) << (v % MODS[i])) begin failures++; $display("FAIL x=%0d ch%0d %b", v, i, xo[i]); end
        if (yo[i] !== 23'(1) << (w % MODS[i])) begin failures++; $display("FAIL y=%0d ch%0d %b", w, i, yo[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
