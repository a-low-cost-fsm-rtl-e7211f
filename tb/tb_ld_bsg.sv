// tb_ld_bsg -- self-checking testbench for ld_bsg.
//
// Two 8-bit generators (Sobol patterns 1 and 2) produce streams for random
// inputs plus 0 and 255; every bit is compared with the reference model, each
// 256-bit period must contain exactly x ones, and a new stream must start one
// cycle after clear (one bit per cycle, period 2^N). A pair of 4-bit
// generators with L = 8 (256-bit streams, patterns 1 and 2) is ANDed: the
// number of ones over 2^8 cycles must equal the exact product a*b, the
// full-precision multiplication property of independent LD streams.
// Finally two 12-bit generators (patterns 3 and 10, 4096-bit streams) are
// checked bit by bit against the reference for four inputs each.
module tb_ld_bsg;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
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

  logic [7:0] xa, xb, ia, ib;
  logic       ba, bb;
  ld_bsg #(.N(8), .DIM(1)) u_a (.clk, .rst_n, .clear, .en, .x(xa), .idx(ia), .bit_o(ba));
  ld_bsg #(.N(8), .DIM(2)) u_b (.clk, .rst_n, .clear, .en, .x(xb), .idx(ib), .bit_o(bb));

  logic [3:0] fa, fb;
  logic [7:0] fia, fib;
  logic       fba, fbb;
  ld_bsg #(.N(4), .DIM(1), .L(8)) u_fa (.clk, .rst_n, .clear, .en, .x(fa), .idx(fia), .bit_o(fba));
  ld_bsg #(.N(4), .DIM(2), .L(8)) u_fb (.clk, .rst_n, .clear, .en, .x(fb), .idx(fib), .bit_o(fbb));

  logic [11:0] wa, wb, wia, wib;
  logic        wba, wbb;
  ld_bsg #(.N(12), .DIM(3))  u_wa (.clk, .rst_n, .clear, .en, .x(wa), .idx(wia), .bit_o(wba));
  ld_bsg #(.N(12), .DIM(10)) u_wb (.clk, .rst_n, .clear, .en, .x(wb), .idx(wib), .bit_o(wbb));

  initial begin
    wa = '0; wb = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      int ones_a, ones_b, ones_p;
      xa = (t == 0) ? 8'd0 : (t == 1) ? 8'd255 : 8'($urandom);
      xb = (t == 0) ? 8'd255 : (t == 1) ? 8'd0 : 8'($urandom);
      fa = 4'($urandom);
      fb = 4'($urandom);
      clear = 1'b1; en = 1'b1;
      @(posedge clk); #1;
      clear = 1'b0;
      ones_a = 0; ones_b = 0; ones_p = 0;
      for (int k = 0; k < 256; k++) begin
        check(ia == 8'(k) && ib == 8'(k), "index follows cycle count");
        check(ba == ref_bit(xa, 1, 8, 8, k), $sformatf("dim1 x=%0d k=%0d", xa, k));
        check(bb == ref_bit(xb, 2, 8, 8, k), $sformatf("dim2 x=%0d k=%0d", xb, k));
        check(fba == ref_bit(fa, 1, 4, 8, k) && fbb == ref_bit(fb, 2, 4, 8, k),
              $sformatf("L=8 k=%0d", k));
        ones_a += ba; ones_b += bb; ones_p += (fba & fbb);
        @(posedge clk); #1;
      end
      check(ones_a == int'(xa), $sformatf("dim1 ones %0d x %0d", ones_a, xa));
      check(ones_b == int'(xb), $sformatf("dim2 ones %0d x %0d", ones_b, xb));
      check(ones_p == int'(fa) * int'(fb), $sformatf("product %0d*%0d got %0d", fa, fb, ones_p));
      // Wrapped back to the first bit after exactly 2^N cycles.
      check(ia == 8'd0, "period is 2^N");
      // Stall: the index must hold while en is low.
      en = 1'b0;
      repeat (3) @(posedge clk);
      #1 check(ia == 8'd0 && ba == ref_bit(xa, 1, 8, 8, 0), "stall holds");
      en = 1'b1;
    end
    for (int t = 0; t < 4; t++) begin
      int ones_wa, ones_wb;
      wa = (t == 0) ? 12'd4095 : 12'($urandom);
      wb = (t == 0) ? 12'd1 : 12'($urandom);
      clear = 1'b1;
      @(posedge clk); #1;
      clear = 1'b0;
      ones_wa = 0; ones_wb = 0;
      for (int k = 0; k < 4096; k++) begin
        check(wia == 12'(k) && wib == 12'(k), "12-bit index");
        check(wba == ref_bit(wa, 3, 12, 12, k), $sformatf("dim3 n=12 x=%0d k=%0d", wa, k));
        check(wbb == ref_bit(wb, 10, 12, 12, k), $sformatf("dim10 n=12 x=%0d k=%0d", wb, k));
        ones_wa += wba; ones_wb += wbb;
        @(posedge clk); #1;
      end
      check(ones_wa == int'(wa) && ones_wb == int'(wb), "12-bit ones count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * 300 + 4 * 4100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
