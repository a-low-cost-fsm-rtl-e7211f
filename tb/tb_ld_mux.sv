// tb_ld_mux -- self-checking testbench for ld_mux (combinational).
// For N = 8 and N = 4, random inputs with every select code 0..N (and the
// unused codes above N) are applied; the output must be x[sel] for sel < N and
// 0 otherwise.
module tb_ld_mux;
  int checks = 0;
  int failures = 0;

  logic [7:0] x8;  logic [3:0] s8;  logic b8;
  logic [3:0] x4;  logic [2:0] s4;  logic b4;
  ld_mux #(.N(8)) u8 (.x(x8), .sel(s8), .bit_o(b8));
  ld_mux #(.N(4)) u4 (.x(x4), .sel(s4), .bit_o(b4));

  initial begin
    for (int t = 0; t < 200; t++) begin
      x8 = 8'($urandom);
      x4 = 4'($urandom);
      for (int s = 0; s < 16; s++) begin
        s8 = 4'(s);
        s4 = 3'(s % 8);
        #1;
        checks += 2;
        if (b8 !== ((s < 8) ? x8[s % 8] : 1'b0)) begin
          failures++; $display("FAIL N=8 x=%h sel=%0d out=%b", x8, s, b8);
        end
        if (b4 !== ((s % 8 < 4) ? x4[s % 4] : 1'b0)) begin
          failures++; $display("FAIL N=4 x=%h sel=%0d out=%b", x4, s % 8, b4);
        end
      end
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
