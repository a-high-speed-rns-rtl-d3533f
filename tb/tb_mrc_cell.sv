// tb_mrc_cell: exhaustive check of z = |(x - y) K|_M for (M, MY, K) = (13, 11, 6)
// (6 * 11 = 66 = 1 mod 13) and the default (7, 5, 3) (3 * 5 = 15 = 1 mod 7).
module tb_mrc_cell;
  int checks = 0, failures = 0;

  logic [12:0] x13, z13;
  logic [10:0] y11;
  logic [6:0]  x7, z7;
  logic [4:0]  y5;

  mrc_cell #(.M(13), .MY(11), .K(6)) u13 (.x(x13), .y(y11), .z(z13));
  mrc_cell                           u7  (.x(x7),  .y(y5),  .z(z7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 13; a++)
      for (int b = 0; b < 11; b++) begin
        x13 = 13'(1) << a; y11 = 11'(1) << b;
        x7  = 7'(1) << (a % 7); y5 = 5'(1) << (b % 5);
        #1;
        checks += 2;
        if (z13 !== 13'(1) << ((((a - b) % 13 + 13) % 13 * 6) % 13)) begin
          failures++; $display("FAIL (%0d-%0d)*6 mod 13 got %b", a, b, z13);
        end
        if (z7 !== 7'(1) << ((((a % 7 - b % 5) % 7 + 7) % 7 * 3) % 7)) begin
          failures++; $display("FAIL (%0d-%0d)*3 mod 7 got %b", a % 7, b % 5, z7);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
