// tb_pcc -- self-checking testbench for pcc (combinational).
// Random inputs with every one-hot line pattern of a single high line and the
// all-low pattern: the output must be the selected input bit, or 0. Random
// multi-hot patterns check the AND-OR function itself.
module tb_pcc;
  int checks = 0;
  int failures = 0;
  logic [7:0] x, oh;
  logic       b;
  pcc #(.N(8)) u (.x, .oh, .bit_o(b));
  initial begin
    for (int t = 0; t < 300; t++) begin
      x = 8'($urandom);
      for (int i = 0; i <= 8; i++) begin
        oh = (i < 8) ? (8'd1 << i) : 8'd0;
        #1;
        checks++;
        if (b !== ((i < 8) ? x[i % 8] : 1'b0)) begin
          failures++; $display("FAIL x=%b line=%0d out=%b", x, i, b);
        end
      end
      oh = 8'($urandom);
      #1;
      checks++;
      if (b !== ((x & oh) != 0)) begin failures++; $display("FAIL multi-hot"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
