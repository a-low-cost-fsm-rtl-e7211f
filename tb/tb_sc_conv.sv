// tb_sc_conv -- self-checking testbench for sc_conv.
//
// Kernels 3 x 3 (default), 5 x 5, 7 x 7, 9 x 9 and 11 x 11, 8-bit data. For random
// activations and weights the accumulated result must equal the count of ones
// of the ANDed reference streams (pattern 1 for activations, pattern 2 for
// weights) over 256 cycles; busy must last exactly 2^N cycles and done pulse
// once. The error against the exact sum of products is printed for
// information and must stay below one unit of 2^-N per product term.
module tb_sc_conv;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  logic              st3 = 1'b0;
  logic [8:0][7:0]   a3, w3;
  logic              busy3, done3;
  logic [11:0]       r3;
  sc_conv u3 (.clk, .rst_n, .start(st3), .act(a3), .wgt(w3), .busy(busy3), .done(done3), .result(r3));

  // The same kernel with a MUX per input instead of one-hot encoders + PCCs.
  logic              busy3m, done3m;
  logic [11:0]       r3m;
  sc_conv #(.USE_PCC(1'b0)) u3m (.clk, .rst_n, .start(st3), .act(a3), .wgt(w3), .busy(busy3m),
                                 .done(done3m), .result(r3m));

  // Larger kernels of the evaluation: 5x5, 7x7, 9x9, 11x11.
  localparam int KS [4] = '{5, 7, 9, 11};
  logic       go_big = 1'b0;
  logic [3:0] big_done = '0;

  for (genvar g = 0; g < 4; g++) begin : g_big
    localparam int KK = KS[g];
    localparam int PP = KK * KK;
    localparam int AW = 8 + $clog2(PP + 1);
    logic               st = 1'b0;
    logic [PP-1:0][7:0] a, w;
    logic               busy, done;
    logic [AW-1:0]      r;
    sc_conv #(.K(KK)) u (.clk, .rst_n, .start(st), .act(a), .wgt(w), .busy, .done, .result(r));

    initial begin
      wait (go_big);
      for (int run = 0; run < 2; run++) begin
        int expv, cyc;
        expv = 0;
        for (int j = 0; j < PP; j++) begin
          a[j] = 8'($urandom); w[j] = 8'($urandom);
          for (int k = 0; k < 256; k++)
            expv += ref_bit(a[j], 1, 8, 8, k) & ref_bit(w[j], 2, 8, 8, k);
        end
        @(posedge clk); #1;
        st = 1'b1;
        @(posedge clk); #1;
        st = 1'b0;
        cyc = 0;
        while (busy) begin cyc++; @(posedge clk); #1; end
        check(cyc == 256 && done, $sformatf("%0dx%0d timing", KK, KK));
        check(int'(r) == expv, $sformatf("%0dx%0d result %0d exp %0d", KK, KK, r, expv));
      end
      big_done[g] = 1'b1;
    end
  end

  real max_err = 0.0;

  task automatic run3();
    int expv, cyc, dones;
    real exact;
    expv = 0; exact = 0.0;
    for (int j = 0; j < 9; j++) begin
      a3[j] = 8'($urandom); w3[j] = 8'($urandom);
      exact += real'(a3[j]) * real'(w3[j]) / 256.0;
      for (int k = 0; k < 256; k++)
        expv += ref_bit(a3[j], 1, 8, 8, k) & ref_bit(w3[j], 2, 8, 8, k);
    end
    st3 = 1'b1;
    @(posedge clk); #1;
    st3 = 1'b0;
    cyc = 0; dones = 0;
    while (busy3) begin cyc++; @(posedge clk); #1; dones += done3; end
    check(cyc == 256, $sformatf("3x3 busy %0d cycles", cyc));
    check(done3 && dones == 1, "3x3 done pulse");
    check(int'(r3) == expv, $sformatf("3x3 result %0d exp %0d", r3, expv));
    check(int'(r3m) == expv, $sformatf("3x3 MUX form result %0d exp %0d", r3m, expv));
    check((real'(r3) - exact) < 9.0 && (exact - real'(r3)) < 9.0, "3x3 error bound");
    if ((real'(r3) - exact) > max_err) max_err = real'(r3) - exact;
    if ((exact - real'(r3)) > max_err) max_err = exact - real'(r3);
    @(posedge clk); #1;
    check(!done3 && int'(r3) == expv, "3x3 result holds");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int t = 0; t < 10; t++) run3();
    go_big = 1'b1;
    wait (big_done == '1);
    $display("3x3 largest |result - exact| = %0.2f units of 2^-8", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * 270 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
