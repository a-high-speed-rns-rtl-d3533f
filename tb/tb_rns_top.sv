// tb_rns_top: end-to-end test of the processor at its default size.
//
// An integer model keeps the expected accumulator modulo M = 37,182,145.  The test
// runs random operation sequences (NOP, CLR, ADD, MUL, MAC) with operands from the
// binary inputs and from the coefficient decoder, a timed 32-coefficient MAC against
// a 32-sample input (result due 32 clocks after the first term), a long MAC run
// that wraps past M, and fault injection: a processor register is forced to a
// zero-hot and to a two-hot word, which the checker must flag.
// After every clock it compares the binary result, the mixed-radix digits and the
// checker outputs.  Each mechanism is counted, and one that never happened is a
// failure.
module tb_rns_top;
  import rns_pkg::*;
  int checks = 0, failures = 0;
  int cycle = 0;

  localparam int MODS [7] = '{5, 7, 11, 13, 17, 19, 23};
  localparam longint MTOT = 37182145;

  logic        clk = 0, rst_n = 0;
  op_e         op;
  logic [7:0]  x_bin, y_bin;
  logic        coef_sel;
  logic [4:0]  coef_addr;
  logic [25:0] z_bin;
  digit_vec_t  mr_dig;
  logic [1:0]  chk;
  logic        err;

  rns_top dut (
    .clk(clk), .rst_n(rst_n), .op(op), .x_bin(x_bin), .y_bin(y_bin),
    .coef_sel(coef_sel), .coef_addr(coef_addr),
    .z_bin(z_bin), .mr_dig(mr_dig), .chk(chk), .err(err)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_nop = 0, n_clr = 0, n_add = 0, n_mul = 0, n_mac = 0, n_coef = 0;
  int n_wrap = 0, n_mac32 = 0, n_err_zero = 0, n_err_multi = 0;

  longint acc = 0;

  function automatic longint coef_of(int k);
    int d;
    d = (k < 16) ? k : 31 - k;
    return longint'(8 * d + 7);
  endfunction

  task automatic check_outputs(string what);
    longint q;
    checks++;
    if (longint'(z_bin) != acc) begin failures++; $display("FAIL %s: z_bin %0d, expected %0d", what, z_bin, acc); end
    q = acc;
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (longint'(mr_dig[i]) != q % MODS[i]) begin failures++; $display("FAIL %s: digit %0d", what, i); end
      q = q / MODS[i];
    end
    checks++;
    if (err !== 1'b0) begin failures++; $display("FAIL %s: false error, chk=%b", what, chk); end
  endtask

  // Apply one operation for one clock and update the model.
  task automatic step(op_e o, int xv, int yv, bit use_coef, int addr);
    longint yy, acc_old;
    op = o; x_bin = 8'(xv); y_bin = 8'(yv); coef_sel = use_coef; coef_addr = 5'(addr);
    yy = use_coef ? coef_of(addr) : longint'(yv);
    @(posedge clk); #1;
    acc_old = acc;
    unique case (o)
      OP_NOP: n_nop++;
      OP_CLR: begin acc = 0; n_clr++; end
      OP_ADD: begin acc = (xv + yy) % MTOT; n_add++; end
      OP_MUL: begin acc = (xv * yy) % MTOT; n_mul++; end
      OP_MAC: begin
        if (acc_old + xv * yy >= MTOT) n_wrap++;
        acc = (acc_old + xv * yy) % MTOT; n_mac++;
      end
      default: ;
    endcase
    if (use_coef && o inside {OP_ADD, OP_MUL, OP_MAC}) n_coef++;
    check_outputs(o.name());
  endtask

  initial begin
    op = OP_NOP; x_bin = 0; y_bin = 0; coef_sel = 0; coef_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check_outputs("reset");

    // random operation mix
    for (int n = 0; n < 400; n++)
      step(op_e'($urandom_range(0, 4)), int'($urandom_range(0, 255)), int'($urandom_range(0, 255)),
           1'($urandom_range(0, 1)), int'($urandom_range(0, 31)));

    // 32-coefficient MAC: sum over k of h[k] * x[k], timed
    begin
      int t0;
      longint expv;
      int xs [32];
      expv = 0;
      for (int k = 0; k < 32; k++) begin
        xs[k] = int'($urandom_range(0, 255));
        expv += coef_of(k) * xs[k];
      end
      t0 = cycle;
      for (int k = 0; k < 32; k++) step(k == 0 ? OP_MUL : OP_MAC, xs[k], 0, 1'b1, k);
      checks += 2;
      if (longint'(z_bin) != expv) begin failures++; $display("FAIL 32-tap MAC: %0d, expected %0d", z_bin, expv); end
      if (cycle - t0 != 32) begin failures++; $display("FAIL 32-tap MAC took %0d clocks", cycle - t0); end
      else n_mac32++;
    end

    // long MAC run with largest operands: the accumulator wraps past M
    step(OP_CLR, 0, 0, 1'b0, 0);
    for (int n = 0; n < 600; n++) step(OP_MAC, 255, 255, 1'b0, 0);

    // fault injection on the accumulator of channel 3 (modulus 13)
    step(OP_NOP, 0, 0, 1'b0, 0);
    force dut.g_ch[3].zi = 13'b0;
    #1;
    checks++;
    if (err !== 1'b1) begin failures++; $display("FAIL zero-hot fault not flagged, chk=%b", chk); end
    else n_err_zero++;
    force dut.g_ch[3].zi = 13'b0000000100100;
    #1;
    checks++;
    if (err !== 1'b1) begin failures++; $display("FAIL two-hot fault not flagged, chk=%b", chk); end
    else n_err_multi++;
    release dut.g_ch[3].zi;
    // the next register write restores a code word
    step(OP_CLR, 0, 0, 1'b0, 0);
    step(OP_ADD, 200, 100, 1'b0, 0);

    $display("mechanisms: NOP=%0d CLR=%0d ADD=%0d MUL=%0d MAC=%0d coef=%0d wrap=%0d mac32=%0d err_zero=%0d err_multi=%0d",
             n_nop, n_clr, n_add, n_mul, n_mac, n_coef, n_wrap, n_mac32, n_err_zero, n_err_multi);
    if (n_nop == 0 || n_clr == 0 || n_add == 0 || n_mul == 0 || n_mac == 0 || n_coef == 0 ||
        n_wrap == 0 || n_mac32 == 0 || n_err_zero == 0 || n_err_multi == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
