// tb_ld_shared_conv -- self-checking testbench for ld_shared_conv.
//
// Nine 8-bit inputs share one FSM (pattern 2) and one one-hot encoder. For
// random inputs every one of the nine streams must equal the reference LD
// stream of its input bit for bit, and hold exactly x ones per 256 cycles. A
// second instance in the MUX-per-input form must give the same streams.
module tb_ld_shared_conv;
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

  logic [8:0][7:0] x;
  logic [7:0]      idx;
  logic [8:0]      bits;
  logic [7:0]      idx_m;
  logic [8:0]      bits_m;
  ld_shared_conv #(.N(8), .DIM(2), .NUM_IN(9)) u (.clk, .rst_n, .clear, .en, .x, .idx, .bits);
  ld_shared_conv #(.N(8), .DIM(2), .NUM_IN(9), .USE_PCC(1'b0)) u_m (.clk, .rst_n, .clear, .en, .x,
                                                                     .idx(idx_m), .bits(bits_m));

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      int ones [9];
      for (int j = 0; j < 9; j++) begin
        x[j] = (t == 0) ? 8'(j * 31) : 8'($urandom);
        ones[j] = 0;
      end
      clear = 1'b1; en = 1'b1;
      @(posedge clk); #1;
      clear = 1'b0;
      for (int k = 0; k < 256; k++) begin
        check(idx == 8'(k) && idx_m == 8'(k), "index");
        check(bits_m == bits, "MUX form equals PCC form");
        for (int j = 0; j < 9; j++) begin
          check(bits[j] == ref_bit(x[j], 2, 8, 8, k), $sformatf("in %0d k=%0d", j, k));
          ones[j] += bits[j];
        end
        @(posedge clk); #1;
      end
      for (int j = 0; j < 9; j++)
        check(ones[j] == int'(x[j]), $sformatf("in %0d ones %0d x %0d", j, ones[j], x[j]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * 260 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
