// tb_wl_fault_tolerance -- soft-error tolerance of the FSM-based generator
// without redundancy and with 3- and 5-modular redundancy, for 4-, 8- and
// 12-bit data (2^4-, 2^8- and 2^12-bit streams).
//
// One wl_ft_run bench per precision runs in parallel on a common clock. Each
// prints the mean absolute error for injection rates of 0 to 30 % and checks
// that there is no error without faults and that redundancy lowers the error
// at 1 % and 2 %. The 12-bit bench uses fewer streams (200 rather than 300) to keep the run short.
// A watchdog fails the test if the benches do not finish.
module tb_wl_fault_tolerance;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic d4, d8, d12;
  int   c4, c8, c12, f4, f8, f12;
  wl_ft_run #(.N(4),  .STREAMS(1000)) r4  (.clk, .done(d4),  .checks(c4),  .fails(f4));
  wl_ft_run #(.N(8),  .STREAMS(300))  r8  (.clk, .done(d8),  .checks(c8),  .fails(f8));
  wl_ft_run #(.N(12), .STREAMS(200))  r12 (.clk, .done(d12), .checks(c12), .fails(f12));

  initial begin
    wait (d4 && d8 && d12);
    checks   = c4 + c8 + c12;
    failures = f4 + f8 + f12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * 200 * 4100 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
