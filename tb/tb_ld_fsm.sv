// tb_ld_fsm -- self-checking testbench for ld_fsm.
//
// Instances: N = 4 with Sobol dimensions 1 and 2, compared against the two
// literal 16-state select sequences of the method's worked example; N = 8 with
// every dimension 1..10 and N = 4, L = 8, compared state by state with the
// reference model of tb_ref_pkg, and checked to select input bit i exactly
// 2^(L-N+i) times per period. The control inputs are exercised: free running
// over several periods, random stalls (en = 0 must hold the state) and clear.
module tb_ld_fsm;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   cycle = 0;
  int unsigned exp_k = 0;   // expected position since the last clear

  always #5 clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  // Literal select sequences of the 4-bit example (4 = constant 0).
  localparam int FIG_SEQ1 [16] = '{3,2,3,1,3,2,3,0,3,2,3,1,3,2,3,4};
  localparam int FIG_SEQ2 [16] = '{3,2,1,3,2,3,3,0,4,3,3,2,3,1,2,3};

  logic [3:0] st_a, st_b;
  logic [2:0] sel_a, sel_b;
  ld_fsm #(.N(4), .DIM(1)) u_a (.clk, .rst_n, .clear, .en, .state(st_a), .sel(sel_a));
  ld_fsm #(.N(4), .DIM(2)) u_b (.clk, .rst_n, .clear, .en, .state(st_b), .sel(sel_b));

  always @(negedge clk) if (rst_n) begin
    check(st_a == 4'(exp_k) && st_b == 4'(exp_k), "N=4 state");
    check(int'(sel_a) == FIG_SEQ1[exp_k % 16], $sformatf("seq1 k=%0d sel=%0d", exp_k % 16, sel_a));
    check(int'(sel_b) == FIG_SEQ2[exp_k % 16], $sformatf("seq2 k=%0d sel=%0d", exp_k % 16, sel_b));
  end

  // Generic instances against the reference model.
  for (genvar g = 0; g < 11; g++) begin : g_dut
    localparam int unsigned NN  = (g < 10) ? 8 : 4;
    localparam int unsigned LL  = 8;
    localparam int unsigned DD  = (g < 10) ? g + 1 : 2;
    localparam int unsigned SW  = $clog2(NN + 1);
    logic [LL-1:0] st;
    logic [SW-1:0] sel;
    int hist [NN+1];
    ld_fsm #(.N(NN), .DIM(DD), .L(LL)) u (.clk, .rst_n, .clear, .en, .state(st), .sel);

    initial foreach (hist[i]) hist[i] = 0;

    always @(negedge clk) if (rst_n) begin
      int unsigned k;
      k = exp_k % (1 << LL);
      check(st == LL'(k), $sformatf("g%0d state %0d != %0d", g, st, k));
      check(int'(sel) == ref_sel(ref_sobol(DD, LL, k), NN, LL),
            $sformatf("g%0d dim %0d k=%0d sel=%0d", g, DD, k, sel));
      if (exp_k < (1 << LL) && sel <= SW'(NN)) hist[sel]++;
      if (exp_k == (1 << LL) - 1 && en) begin
        for (int i = 0; i < int'(NN); i++)
          check(hist[i] == (1 << (LL - NN + i)),
                $sformatf("g%0d bit %0d picked %0d times", g, i, hist[i]));
        check(hist[NN] == (1 << (LL - NN)), $sformatf("g%0d zero picked %0d", g, hist[NN]));
        foreach (hist[i]) hist[i] = 0;
      end
    end
  end

  // Expected-position model.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (clear)   exp_k <= 0;
      else if (en) exp_k <= exp_k + 1;
    end
  end

  int stalls = 0;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;
    repeat (600) @(posedge clk);       // more than two periods
    #1;
    for (int i = 0; i < 400; i++) begin
      en = ($urandom_range(0, 3) != 0);
      if (!en) stalls++;
      @(posedge clk); #1;
    end
    clear = 1'b1; en = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    repeat (300) @(posedge clk);
    #1;
    check(stalls > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
