// wl_ft_run -- one precision of the soft-error workload, used by
// tb_wl_fault_tolerance.
//
// Three ld_bsg_nmr instances (NR = 1, 3, 5) at precision N convert the same
// random inputs to 2^N-bit streams. At an injection rate r (per 10000), in
// every cycle each copy's state register receives a single random bit flip
// with probability r, and each copy's output bit is flipped with probability
// r. This fault model is this bench's own choice: faults go into the FSM state
// and the generator output, the places named for the FSM-based generator. The
// mean absolute error of ones/2^N against x/2^N over STREAMS streams is printed
// in percent for r = 0, 1, 2, 5, 10, 20 and 30 %.
//
// Interface: the clock comes in, `done` rises when all rates are finished, and
// `fails` counts the failed checks of `checks`:
//   * no error without faults;
//   * at 1 % and 2 % the 5-copy and the 3-copy generators are each more
//     accurate than the plain one.
module wl_ft_run #(
  parameter int unsigned N       = 8,
  parameter int unsigned STREAMS = 300
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   fails
);
  localparam int RATES [7] = '{0, 100, 200, 500, 1000, 2000, 3000};  // per 10000
  localparam int LEN = 1 << N;

  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;

  logic [N-1:0]      x;
  logic [0:0][N-1:0] fs1;  logic [0:0] fo1;  logic [N-1:0] i1;  logic b1;
  logic [2:0][N-1:0] fs3;  logic [2:0] fo3;  logic [N-1:0] i3;  logic b3;
  logic [4:0][N-1:0] fs5;  logic [4:0] fo5;  logic [N-1:0] i5;  logic b5;
  ld_bsg_nmr #(.N(N), .NR(1)) u1 (.clk, .rst_n, .clear, .en, .x, .flip_state(fs1), .flip_out(fo1), .idx(i1), .bit_o(b1));
  ld_bsg_nmr #(.N(N), .NR(3)) u3 (.clk, .rst_n, .clear, .en, .x, .flip_state(fs3), .flip_out(fo3), .idx(i3), .bit_o(b3));
  ld_bsg_nmr #(.N(N), .NR(5)) u5 (.clk, .rst_n, .clear, .en, .x, .flip_state(fs5), .flip_out(fo5), .idx(i5), .bit_o(b5));

  function automatic logic [N-1:0] flip_mask(int rate);
    logic [N-1:0] m;
    int unsigned draw, pos;
    draw = $urandom_range(0, 9999);
    pos  = $urandom_range(0, N - 1);
    m = '0;
    if (draw < rate) m[pos] = 1'b1;
    return m;
  endfunction

  function automatic logic flip_bit(int rate);
    int unsigned draw;
    draw = $urandom_range(0, 9999);
    return draw < rate;
  endfunction

  function automatic int absdiff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      fails++;
      $display("FAIL n=%0d: %s", N, what);
    end
  endfunction

  real mae [7][3];

  initial begin
    done = 1'b0; checks = 0; fails = 0;
    x = '0;
    fs1 = '0; fs3 = '0; fs5 = '0; fo1 = '0; fo3 = '0; fo5 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int ri = 0; ri < 7; ri++) begin
      real s1, s3, s5;
      s1 = 0.0; s3 = 0.0; s5 = 0.0;
      for (int t = 0; t < STREAMS; t++) begin
        int o1, o3, o5;
        x = N'($urandom);
        clear = 1'b1; en = 1'b1;
        fs1 = '0; fs3 = '0; fs5 = '0; fo1 = '0; fo3 = '0; fo5 = '0;
        @(posedge clk); #1;
        clear = 1'b0;
        o1 = 0; o3 = 0; o5 = 0;
        for (int k = 0; k < LEN; k++) begin
          fs1[0] = flip_mask(RATES[ri]);
          fo1[0] = flip_bit(RATES[ri]);
          for (int r = 0; r < 3; r++) begin fs3[r] = flip_mask(RATES[ri]); fo3[r] = flip_bit(RATES[ri]); end
          for (int r = 0; r < 5; r++) begin fs5[r] = flip_mask(RATES[ri]); fo5[r] = flip_bit(RATES[ri]); end
          #1;
          o1 += b1; o3 += b3; o5 += b5;
          @(posedge clk); #1;
        end
        s1 += real'(absdiff(o1, int'(x))) / real'(LEN);
        s3 += real'(absdiff(o3, int'(x))) / real'(LEN);
        s5 += real'(absdiff(o5, int'(x))) / real'(LEN);
      end
      mae[ri][0] = 100.0 * s1 / STREAMS;
      mae[ri][1] = 100.0 * s3 / STREAMS;
      mae[ri][2] = 100.0 * s5 / STREAMS;
      $display("n=%0d rate %5.1f %%: MAE plain %7.3f %%  3-MR %7.3f %%  5-MR %7.3f %%",
               N, RATES[ri] / 100.0, mae[ri][0], mae[ri][1], mae[ri][2]);
    end
    check(mae[0][0] == 0.0 && mae[0][1] == 0.0 && mae[0][2] == 0.0, "no error without faults");
    check(mae[1][2] < mae[1][0] && mae[2][2] < mae[2][0], "5-MR beats plain at 1 % and 2 %");
    check(mae[1][1] < mae[1][0] && mae[2][1] < mae[2][0], "3-MR beats plain at 1 % and 2 %");
    done = 1'b1;
  end
endmodule
