// tb_ld_bsg_nmr -- self-checking testbench for ld_bsg_nmr.
//
// A 5-copy (default) and a 3-copy 8-bit generator run side by side on the same
// input. Phase 1 runs fault-free streams. Phase 2 injects soft errors every
// cycle: a random state flip into up to floor(NR/2) copies, and output flips
// only into copies whose state was flipped at the previous edge, so no more
// than floor(NR/2) copies are ever wrong at once. The voted output and the
// voted state must stay exactly on the reference stream throughout, and
// every stream must still hold exactly x ones. The number of cycles in which
// a wrong copy was outvoted is counted and must be non-zero.
module tb_ld_bsg_nmr;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   masked5 = 0;
  int   masked3 = 0;

  always #5 clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  logic [7:0]      x;
  logic [4:0][7:0] fs5 = '0;
  logic [4:0]      fo5 = '0;
  logic [7:0]      idx5;
  logic            b5;
  logic [2:0][7:0] fs3 = '0;
  logic [2:0]      fo3 = '0;
  logic [7:0]      idx3;
  logic            b3;

  ld_bsg_nmr u5 (.clk, .rst_n, .clear, .en, .x, .flip_state(fs5), .flip_out(fo5),
                 .idx(idx5), .bit_o(b5));
  ld_bsg_nmr #(.NR(3)) u3 (.clk, .rst_n, .clear, .en, .x, .flip_state(fs3),
                           .flip_out(fo3), .idx(idx3), .bit_o(b3));

  // Pick a random set of at most `limit` copies out of `nr`.
  function automatic logic [4:0] pick(int nr, int limit);
    logic [4:0] s;
    int cnt;
    s = '0; cnt = 0;
    for (int i = 0; i < nr; i++)
      if (cnt < limit && $urandom_range(0, 2) == 0) begin s[i] = 1'b1; cnt++; end
    return s;
  endfunction

  task automatic run_stream(bit inject);
    int ones5, ones3;
    logic [4:0] prev5, prev3, cur5, cur3;
    clear = 1'b1; en = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    ones5 = 0; ones3 = 0; prev5 = '0; prev3 = '0;
    for (int k = 0; k < 256; k++) begin
      cur5 = inject ? pick(5, 2) : '0;
      cur3 = inject ? pick(3, 1) : '0;
      // Output flips only on copies already hit (their state is now wrong).
      fo5 = inject ? (prev5 & 5'($urandom)) : '0;
      fo3 = inject ? (prev3[2:0] & 3'($urandom)) : '0;
      for (int r = 0; r < 5; r++) fs5[r] = cur5[r] ? 8'($urandom_range(1, 255)) : 8'd0;
      for (int r = 0; r < 3; r++) fs3[r] = cur3[r] ? 8'($urandom_range(1, 255)) : 8'd0;
      #1;
      check(idx5 == 8'(k) && idx3 == 8'(k), $sformatf("voted state k=%0d", k));
      check(b5 == ref_bit(x, 1, 8, 8, k), $sformatf("5-MR bit k=%0d", k));
      check(b3 == ref_bit(x, 1, 8, 8, k), $sformatf("3-MR bit k=%0d", k));
      if (prev5 != 0) masked5++;
      if (prev3 != 0) masked3++;
      ones5 += b5; ones3 += b3;
      prev5 = cur5; prev3 = cur3;
      @(posedge clk); #1;
    end
    fs5 = '0; fs3 = '0; fo5 = '0; fo3 = '0;
    check(ones5 == int'(x) && ones3 == int'(x), $sformatf("ones %0d %0d x %0d", ones5, ones3, x));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      x = 8'($urandom);
      run_stream(1'b0);
    end
    for (int t = 0; t < 12; t++) begin
      x = (t == 0) ? 8'hff : 8'($urandom);
      run_stream(1'b1);
    end
    check(masked5 > 0 && masked3 > 0, "faults were injected and masked");
    $display("injected-fault cycles masked: 5-MR %0d, 3-MR %0d", masked5, masked3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16 * 260 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
