// tb_ld_fsm_par -- self-checking testbench for ld_fsm_par.
//
// Configurations (N, M, pattern): the 3-bit examples with 2x and 4x
// parallelism, and 8-bit with 2x, 4x and 8x on several Sobol patterns. In
// every state s, sel[j] must equal the interval-rule code of serial position
// s*M + j; the state must wrap after 2^N/M cycles; en = 0 must hold it.
module tb_ld_fsm_par;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int unsigned exp_s = 0;

  always #5 clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  localparam int CN [6] = '{3, 3, 8, 8, 8, 8};
  localparam int CM [6] = '{2, 4, 2, 4, 8, 8};
  localparam int CD [6] = '{1, 2, 2, 3, 1, 5};

  for (genvar g = 0; g < 6; g++) begin : g_dut
    localparam int unsigned NN = CN[g];
    localparam int unsigned MM = CM[g];
    localparam int unsigned DD = CD[g];
    localparam int unsigned SW = NN - $clog2(MM);
    localparam int unsigned SEL_W = $clog2(NN + 1);
    logic [SW-1:0] st;
    logic [MM-1:0][SEL_W-1:0] sel;
    ld_fsm_par #(.N(NN), .M(MM), .DIM(DD)) u (.clk, .rst_n, .clear, .en, .state(st), .sel);

    always @(negedge clk) if (rst_n) begin
      int unsigned s;
      s = exp_s % (1 << SW);
      check(st == SW'(s), $sformatf("g%0d state %0d exp %0d", g, st, s));
      for (int j = 0; j < int'(MM); j++)
        check(int'(sel[j]) == ref_sel(ref_sobol(DD, NN, s * MM + j), NN, NN),
              $sformatf("g%0d s=%0d j=%0d sel=%0d", g, s, j, sel[j]));
    end
  end

  always @(posedge clk)
    if (rst_n) begin
      if (clear)   exp_s <= 0;
      else if (en) exp_s <= exp_s + 1;
    end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;
    repeat (300) @(posedge clk);
    #1;
    for (int i = 0; i < 200; i++) begin
      en = $urandom_range(0, 1) == 1;
      @(posedge clk); #1;
    end
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0; en = 1'b1;
    repeat (100) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
