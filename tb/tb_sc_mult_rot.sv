// tb_sc_mult_rot -- self-checking testbench for sc_mult_rot.
//
// Three rotating configurations: the default two-input 8-bit multiplier
// (2^16-cycle product stream), a three-input 4-bit one (2^12 cycles) and a
// four-input 4-bit one (2^16 cycles). For random
// inputs and the extreme values, every product bit is compared with a
// reference built from the reference LD streams and the rotation rule
// (generator k, counted from 0, is at position t - floor(t / 2^(kN)) mod 2^N in
// cycle t), the number of ones must equal the exact product, valid must last
// exactly 2^(I*N) cycles with last on the final one, and generator k must
// stall exactly 2^(I*N) / 2^(kN) times. A third, limited-precision instance
// (no rotation) must give 256 product bits equal to the AND of the reference
// streams, with no stalls.
module tb_sc_mult_rot;
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

  // Reference product bit for cycle t.
  function automatic bit ref_prod(int unsigned n, int unsigned ni, int unsigned xs [4],
                                  longint unsigned t);
    bit b;
    longint unsigned len;
    len = 64'd1 << n;
    b = 1'b1;
    for (int unsigned k = 0; k < ni; k++) begin
      longint unsigned pos;
      pos = (t - (t >> (k * n))) % len;
      if (k == 0) pos = t % len;
      b &= ref_bit(xs[k], k + 1, n, n, int'(pos));
    end
    return b;
  endfunction

  // Configuration A: N = 8, I = 2 (module defaults).
  logic             start_a = 1'b0;
  logic [1:0][7:0]  x_a;
  logic             valid_a, last_a, bit_a;
  logic [1:0]       stall_a;
  sc_mult_rot u_a (.clk, .rst_n, .start(start_a), .x(x_a),
                   .valid(valid_a), .last(last_a), .prod_bit(bit_a), .stall(stall_a));

  // Configuration B: N = 4, I = 3.
  logic             start_b = 1'b0;
  logic [2:0][3:0]  x_b;
  logic             valid_b, last_b, bit_b;
  logic [2:0]       stall_b;
  sc_mult_rot #(.N(4), .I(3)) u_b (.clk, .rst_n, .start(start_b), .x(x_b),
                   .valid(valid_b), .last(last_b), .prod_bit(bit_b), .stall(stall_b));

  // Configuration C: N = 8, I = 2, limited precision (no rotation).
  logic             start_c = 1'b0;
  logic [1:0][7:0]  x_c;
  logic             valid_c, last_c, bit_c;
  logic [1:0]       stall_c;
  sc_mult_rot #(.N(8), .I(2), .ROTATE(1'b0)) u_c (.clk, .rst_n, .start(start_c), .x(x_c),
                   .valid(valid_c), .last(last_c), .prod_bit(bit_c), .stall(stall_c));

  // Configuration D: N = 4, I = 4.
  logic             start_d = 1'b0;
  logic [3:0][3:0]  x_d;
  logic             valid_d, last_d, bit_d;
  logic [3:0]       stall_d;
  sc_mult_rot #(.N(4), .I(4)) u_d (.clk, .rst_n, .start(start_d), .x(x_d),
                   .valid(valid_d), .last(last_d), .prod_bit(bit_d), .stall(stall_d));

  task automatic run_d(int unsigned d0, int unsigned d1, int unsigned d2, int unsigned d3);
    int unsigned xs [4];
    longint unsigned t;
    longint unsigned ones;
    int nst [4];
    xs = '{d0, d1, d2, d3};
    x_d = {4'(d3), 4'(d2), 4'(d1), 4'(d0)};
    start_d = 1'b1;
    @(posedge clk); #1;
    start_d = 1'b0;
    t = 0; ones = 0; nst = '{0, 0, 0, 0};
    while (valid_d) begin
      check(bit_d == ref_prod(4, 4, xs, t), $sformatf("D bit t=%0d", t));
      check(last_d == (t == 65535), "D last");
      ones += bit_d;
      for (int k = 0; k < 4; k++) nst[k] += stall_d[k];
      t++;
      @(posedge clk); #1;
    end
    check(t == 65536, $sformatf("D length %0d", t));
    check(ones == d0 * d1 * d2 * d3, $sformatf("D %0d*%0d*%0d*%0d got %0d", d0, d1, d2, d3, ones));
    check(nst[0] == 0 && nst[1] == 4096 && nst[2] == 256 && nst[3] == 16,
          $sformatf("D stalls %0d %0d %0d %0d", nst[0], nst[1], nst[2], nst[3]));
  endtask

  task automatic run_c(int unsigned c0, int unsigned c1);
    int t, ones;
    x_c = {8'(c1), 8'(c0)};
    start_c = 1'b1;
    @(posedge clk); #1;
    start_c = 1'b0;
    t = 0; ones = 0;
    while (valid_c) begin
      check(bit_c == (ref_bit(c0, 1, 8, 8, t) & ref_bit(c1, 2, 8, 8, t)),
            $sformatf("C bit t=%0d", t));
      check(stall_c == 2'b00, "C never stalls");
      check(last_c == (t == 255), "C last");
      ones += bit_c;
      t++;
      @(posedge clk); #1;
    end
    check(t == 256, $sformatf("C length %0d", t));
    // N-bit precision: within a few units of 2^-8 of the exact product.
    check(ones * 256 - int'(c0 * c1) < 4 * 256 && int'(c0 * c1) - ones * 256 < 4 * 256,
          $sformatf("C %0d*%0d/256 got %0d", c0, c1, ones));
  endtask

  task automatic run_a(int unsigned a0, int unsigned a1);
    int unsigned xs [4];
    longint unsigned t;
    longint unsigned ones;
    int nst;
    xs = '{a0, a1, 0, 0};
    x_a = {8'(a1), 8'(a0)};
    start_a = 1'b1;
    @(posedge clk); #1;
    start_a = 1'b0;
    t = 0; ones = 0; nst = 0;
    while (valid_a) begin
      check(bit_a == ref_prod(8, 2, xs, t), $sformatf("A bit t=%0d", t));
      check(last_a == (t == 65535), "A last");
      check(stall_a[0] == 1'b0, "A gen0 never stalls");
      ones += bit_a;
      nst += stall_a[1];
      t++;
      @(posedge clk); #1;
    end
    check(t == 65536, $sformatf("A length %0d", t));
    check(ones == a0 * a1, $sformatf("A %0d*%0d got %0d", a0, a1, ones));
    check(nst == 256, $sformatf("A stalls %0d", nst));
  endtask

  task automatic run_b(int unsigned b0, int unsigned b1, int unsigned b2);
    int unsigned xs [4];
    longint unsigned t;
    longint unsigned ones;
    int nst1, nst2;
    xs = '{b0, b1, b2, 0};
    x_b = {4'(b2), 4'(b1), 4'(b0)};
    start_b = 1'b1;
    @(posedge clk); #1;
    start_b = 1'b0;
    t = 0; ones = 0; nst1 = 0; nst2 = 0;
    while (valid_b) begin
      check(bit_b == ref_prod(4, 3, xs, t), $sformatf("B bit t=%0d", t));
      ones += bit_b;
      nst1 += stall_b[1];
      nst2 += stall_b[2];
      t++;
      @(posedge clk); #1;
    end
    check(t == 4096, $sformatf("B length %0d", t));
    check(ones == b0 * b1 * b2, $sformatf("B %0d*%0d*%0d got %0d", b0, b1, b2, ones));
    check(nst1 == 256 && nst2 == 16, $sformatf("B stalls %0d %0d", nst1, nst2));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    run_a(255, 255);
    run_a(0, 200);
    for (int i = 0; i < 3; i++) run_a($urandom_range(0, 255), $urandom_range(0, 255));
    for (int i = 0; i < 20; i++) run_c($urandom_range(0, 255), $urandom_range(0, 255));
    run_b(15, 15, 15);
    for (int i = 0; i < 8; i++)
      run_b($urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 15));
    run_d(15, 15, 15, 15);
    run_d($urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 15));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * 65540 + 9 * 4100 + 20 * 260 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
