// tb_ld_bsg_par -- self-checking testbench for ld_bsg_par.
//
// Configurations (N, M, pattern): 3-bit data at 2x and 4x, 8-bit data at 2x,
// 4x and 8x. For random inputs each group of M bits must match the reference
// stream at positions idx*M .. idx*M+M-1, a stream must take exactly 2^N/M
// cycles, and it must hold exactly x ones.
module tb_ld_bsg_par;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  int   checks = 0;
  int   failures = 0;
  logic [7:0] xin;

  always #5 clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  localparam int CN [5] = '{3, 3, 8, 8, 8};
  localparam int CM [5] = '{2, 4, 2, 4, 8};
  localparam int CD [5] = '{1, 2, 1, 2, 1};

  logic [4:0] finished;

  for (genvar g = 0; g < 5; g++) begin : g_dut
    localparam int unsigned NN = CN[g];
    localparam int unsigned MM = CM[g];
    localparam int unsigned DD = CD[g];
    localparam int unsigned SW = NN - $clog2(MM);
    logic [SW-1:0] idx;
    logic [MM-1:0] bits;
    int ones, cyc;
    ld_bsg_par #(.N(NN), .M(MM), .DIM(DD)) u (.clk, .rst_n, .clear, .en,
                                               .x(xin[NN-1:0]), .idx, .bits);
    always @(negedge clk) if (rst_n && en && !clear) begin
      if (cyc < (1 << SW)) begin
        check(idx == SW'(cyc), $sformatf("g%0d idx", g));
        for (int j = 0; j < int'(MM); j++)
          check(bits[j] == ref_bit(xin[NN-1:0], DD, NN, NN, cyc * MM + j),
                $sformatf("g%0d x=%0d pos=%0d", g, xin[NN-1:0], cyc * MM + j));
        ones += $countones(bits);
        cyc++;
        if (cyc == (1 << SW)) begin
          check(ones == int'(xin[NN-1:0]), $sformatf("g%0d ones %0d", g, ones));
          finished[g] = 1'b1;
        end
      end
    end
    always @(posedge clear) begin ones = 0; cyc = 0; finished[g] = 1'b0; end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      xin = (t == 0) ? 8'hff : 8'($urandom);
      clear = 1'b1; en = 1'b1;
      @(posedge clk); #1;
      clear = 1'b0;
      repeat (128) @(posedge clk);   // 2^8/2 = longest stream here
      #1;
      check(finished == '1, "all streams completed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * 140) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
