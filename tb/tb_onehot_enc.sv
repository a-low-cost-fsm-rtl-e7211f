// tb_onehot_enc -- self-checking testbench for onehot_enc (combinational).
// Every select code of a 8-bit and a 4-bit encoder is applied; exactly line
// sel must be high for sel < N, and no line for sel >= N.
module tb_onehot_enc;
  int checks = 0;
  int failures = 0;
  logic [3:0] s8; logic [7:0] o8;
  logic [2:0] s4; logic [3:0] o4;
  onehot_enc #(.N(8)) u8 (.sel(s8), .oh(o8));
  onehot_enc #(.N(4)) u4 (.sel(s4), .oh(o4));
  initial begin
    for (int s = 0; s < 16; s++) begin
      logic [7:0] e8;
      logic [3:0] e4;
      s8 = 4'(s); s4 = 3'(s % 8);
      e8 = '0; e4 = '0;
      if (s < 8) e8[s % 8] = 1'b1;
      if (s % 8 < 4) e4[s % 4] = 1'b1;
      #1;
      checks += 2;
      if (o8 !== e8) begin failures++; $display("FAIL N=8 sel=%0d oh=%b", s, o8); end
      if (o4 !== e4) begin failures++; $display("FAIL N=4 sel=%0d oh=%b", s % 8, o4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
