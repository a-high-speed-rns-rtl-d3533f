// tb_fir_filter: the processor used as a 32-tap FIR filter, y[n] = sum_k h[k] x[n-k],
// with the coefficients h taken from the coefficient decoder.
//
// For each output sample the testbench issues OP_MUL for tap 0 and OP_MAC for taps
// 1..31, with x_bin = x[n-k] and coef_addr = k.  Every output must equal the
// filter sum computed here, and must be ready 32 clocks after its first tap.
// 24 output samples are produced from a random 8-bit input stream (zero before n = 0).
module tb_fir_filter;
  import rns_pkg::*;
  int checks = 0, failures = 0;
  int cycle = 0;

  localparam int TAPS = 32;
  localparam int NOUT = 24;

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
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(int k);
    return 8 * ((k < TAPS / 2) ? k : TAPS - 1 - k) + 7;
  endfunction

  int xs [NOUT];

  initial begin
    op = OP_NOP; x_bin = 0; y_bin = 0; coef_sel = 1'b1; coef_addr = 0;
    for (int n = 0; n < NOUT; n++) xs[n] = int'($urandom_range(0, 255));
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int n = 0; n < NOUT; n++) begin
      longint expv;
      int t0;
      expv = 0;
      t0 = cycle;
      for (int k = 0; k < TAPS; k++) begin
        int xv;
        xv = (n - k >= 0) ? xs[n - k] : 0;
        expv += longint'(h(k)) * xv;
        op = (k == 0) ? OP_MUL : OP_MAC;
        x_bin = 8'(xv);
        coef_addr = 5'(k);
        @(posedge clk); #1;
      end
      op = OP_NOP;
      checks += 3;
      if (longint'(z_bin) != expv) begin failures++; $display("FAIL y[%0d] = %0d, expected %0d", n, z_bin, expv); end
      if (cycle - t0 != TAPS) begin failures++; $display("FAIL y[%0d] took %0d clocks", n, cycle - t0); end
      if (err !== 1'b0) begin failures++; $display("FAIL y[%0d] false error", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
