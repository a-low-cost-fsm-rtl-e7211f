// tb_ld_sc_top -- end-to-end testbench of ld_sc_top at its default sizes
// (8-bit data, 3 x 3 convolution, 2-input multiplier, 8x parallel generator,
// 5-copy redundant generator).
//
// The four units run concurrently:
//   * convolution: three runs, result compared with the reference stream model;
//   * multiplier: one full 2^16-cycle product stream, the ones must equal the
//     exact product, and the rotation stalls are counted (256 expected);
//   * parallel generator: 20 streams of 32 cycles, 8 bits each, compared with
//     the reference stream;
//   * redundant generator: 8 streams with soft errors injected into at most two
//     copies at a time, the voted stream must stay exact.
// Each mechanism (rotation stall, constant-0 selection, parallel group,
// masked fault, convolution accumulate/done) is counted; one that never
// happened is a failure.
module tb_ld_sc_top;
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

  logic            conv_start = 1'b0;
  logic [8:0][7:0] conv_act, conv_wgt;
  logic            conv_busy, conv_done;
  logic [11:0]     conv_result;
  logic            mul_start = 1'b0;
  logic [1:0][7:0] mul_x;
  logic            mul_valid, mul_last, mul_bit;
  logic [1:0]      mul_stall;
  logic            par_clear = 1'b0, par_en = 1'b0;
  logic [7:0]      par_x;
  logic [4:0]      par_idx;
  logic [7:0]      par_bits;
  logic            nmr_clear = 1'b0, nmr_en = 1'b0;
  logic [7:0]      nmr_x;
  logic [4:0][7:0] nmr_flip_state = '0;
  logic [4:0]      nmr_flip_out = '0;
  logic [7:0]      nmr_idx;
  logic            nmr_bit;

  ld_sc_top dut (.*);

  int n_stall = 0, n_zero = 0, n_group = 0, n_masked = 0, n_conv = 0, n_mul = 0;

  task automatic do_conv();
    for (int r = 0; r < 3; r++) begin
      int expv, cyc;
      expv = 0;
      for (int j = 0; j < 9; j++) begin
        conv_act[j] = 8'($urandom); conv_wgt[j] = 8'($urandom);
        for (int k = 0; k < 256; k++)
          expv += ref_bit(conv_act[j], 1, 8, 8, k) & ref_bit(conv_wgt[j], 2, 8, 8, k);
      end
      conv_start = 1'b1;
      @(posedge clk); #1;
      conv_start = 1'b0;
      cyc = 0;
      while (conv_busy) begin cyc++; @(posedge clk); #1; end
      check(cyc == 256 && conv_done, "conv timing");
      check(int'(conv_result) == expv, $sformatf("conv result %0d exp %0d", conv_result, expv));
      n_conv++;
    end
  endtask

  task automatic do_mul();
    longint unsigned ones, t;
    mul_x = {8'($urandom_range(1, 255)), 8'($urandom_range(1, 255))};
    mul_start = 1'b1;
    @(posedge clk); #1;
    mul_start = 1'b0;
    ones = 0; t = 0;
    while (mul_valid) begin
      ones += mul_bit;
      n_stall += mul_stall[1];
      t++;
      @(posedge clk); #1;
    end
    check(t == 65536, $sformatf("mul length %0d", t));
    check(ones == longint'(mul_x[0]) * longint'(mul_x[1]),
          $sformatf("mul %0d*%0d got %0d", mul_x[0], mul_x[1], ones));
    check(n_stall == 256, $sformatf("mul stalls %0d", n_stall));
    n_mul++;
  endtask

  task automatic do_par();
    for (int r = 0; r < 20; r++) begin
      int ones;
      par_x = (r == 0) ? 8'hff : 8'($urandom);
      par_clear = 1'b1; par_en = 1'b1;
      @(posedge clk); #1;
      par_clear = 1'b0;
      ones = 0;
      for (int s = 0; s < 32; s++) begin
        check(par_idx == 5'(s), "par idx");
        for (int j = 0; j < 8; j++)
          check(par_bits[j] == ref_bit(par_x, 1, 8, 8, s * 8 + j), "par bit");
        ones += $countones(par_bits);
        n_group++;
        @(posedge clk); #1;
      end
      check(ones == int'(par_x), "par ones");
    end
    par_en = 1'b0;
  endtask

  task automatic do_nmr();
    for (int r = 0; r < 8; r++) begin
      int ones;
      logic [4:0] prev, cur;
      nmr_x = 8'($urandom);
      nmr_clear = 1'b1; nmr_en = 1'b1;
      @(posedge clk); #1;
      nmr_clear = 1'b0;
      ones = 0; prev = '0;
      for (int k = 0; k < 256; k++) begin
        int c;
        cur = '0; c = 0;
        for (int i = 0; i < 5; i++)
          if (c < 2 && $urandom_range(0, 3) == 0) begin cur[i] = 1'b1; c++; end
        for (int i = 0; i < 5; i++) nmr_flip_state[i] = cur[i] ? 8'($urandom_range(1, 255)) : 8'd0;
        nmr_flip_out = prev;
        #1;
        check(nmr_idx == 8'(k), "nmr voted state");
        check(nmr_bit == ref_bit(nmr_x, 1, 8, 8, k), $sformatf("nmr bit k=%0d", k));
        if (prev != 0) n_masked++;
        if (ref_sel(ref_sobol(1, 8, k), 8, 8) == 8) n_zero++;
        ones += nmr_bit;
        prev = cur;
        @(posedge clk); #1;
      end
      nmr_flip_state = '0; nmr_flip_out = '0;
      check(ones == int'(nmr_x), "nmr ones");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    fork
      do_conv();
      do_mul();
      do_par();
      do_nmr();
    join
    check(n_stall > 0, "rotation stall happened");
    check(n_zero > 0, "constant-0 state happened");
    check(n_group > 0, "parallel groups produced");
    check(n_masked > 0, "faults masked");
    check(n_conv > 0 && n_mul > 0, "convolution and multiplication completed");
    $display("stalls=%0d zero-states=%0d groups=%0d masked=%0d conv=%0d mul=%0d",
             n_stall, n_zero, n_group, n_masked, n_conv, n_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
