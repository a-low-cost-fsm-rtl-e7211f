// tb_wl_mult_accuracy -- accuracy of 8-bit x 8-bit stochastic multiplication
// with the FSM-based LD generators, against the stream length.
//
// Random operand pairs (plus the corner pairs) are multiplied two ways: by the
// default sc_mult_rot (two 256-state FSMs, Sobol patterns 1 and 2, rotation)
// and by two ld_bsg with 2^16 states each (patterns 1 and 2) ANDed. After
// 2^5, 2^6, ..., 2^16 cycles the product estimate ones / cycles is compared
// with the exact a*b/2^16 and the mean absolute error (in percent) is printed.
// Checks: for both, the error is exactly zero after 2^16 cycles for every pair, and the
// mean error at 2^8 cycles and beyond stays below 0.5 %.
module tb_wl_mult_accuracy;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  localparam int PAIRS = 200;

  always #5 clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  logic            start = 1'b0;
  logic [1:0][7:0] x;
  logic            valid, last, pbit;
  logic [1:0]      stall;
  sc_mult_rot u (.clk, .rst_n, .start, .x, .valid, .last, .prod_bit(pbit), .stall);

  // The same multiplication with two 2^16-state FSMs (no rotation).
  logic [15:0] ia, ib;
  logic        fa, fb;
  ld_bsg #(.N(8), .DIM(1), .L(16)) u_fa (.clk, .rst_n, .clear(start), .en(1'b1), .x(x[0]),
                                         .idx(ia), .bit_o(fa));
  ld_bsg #(.N(8), .DIM(2), .L(16)) u_fb (.clk, .rst_n, .clear(start), .en(1'b1), .x(x[1]),
                                         .idx(ib), .bit_o(fb));

  real err_sum [17];
  real err_full [17];

  initial begin
    foreach (err_sum[i]) err_sum[i] = 0.0;
    foreach (err_full[i]) err_full[i] = 0.0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < PAIRS; p++) begin
      longint unsigned ones, ones_f, t;
      real exact;
      x[0] = (p == 0) ? 8'd255 : (p == 1) ? 8'd1 : 8'($urandom);
      x[1] = (p == 0) ? 8'd255 : (p == 1) ? 8'd128 : 8'($urandom);
      exact = real'(x[0]) * real'(x[1]) / 65536.0;
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      ones = 0; ones_f = 0; t = 0;
      while (valid) begin
        ones += pbit;
        ones_f += (fa & fb);
        t++;
        for (int e = 5; e <= 16; e++)
          if (t == (64'd1 << e)) begin
            real est, d;
            est = real'(ones) / real'(t);
            d = (est > exact) ? est - exact : exact - est;
            err_sum[e] += d;
            est = real'(ones_f) / real'(t);
            err_full[e] += (est > exact) ? est - exact : exact - est;
            if (e == 16) begin
              check(ones == longint'(x[0]) * longint'(x[1]),
                    $sformatf("rotation: exact product %0d*%0d got %0d", x[0], x[1], ones));
              check(ones_f == longint'(x[0]) * longint'(x[1]),
                    $sformatf("2^16 states: exact product %0d*%0d got %0d", x[0], x[1], ones_f));
            end
          end
        @(posedge clk); #1;
      end
    end
    for (int e = 5; e <= 16; e++) begin
      real mae, mae_f;
      mae = 100.0 * err_sum[e] / PAIRS;
      mae_f = 100.0 * err_full[e] / PAIRS;
      $display("cycles 2^%0d: MAE rotation %0.4f %%, 2^16-state FSMs %0.4f %%", e, mae, mae_f);
      if (e >= 8) check(mae < 0.5 && mae_f < 0.5, $sformatf("MAE at 2^%0d = %0.4f / %0.4f", e, mae, mae_f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PAIRS * 65540 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
