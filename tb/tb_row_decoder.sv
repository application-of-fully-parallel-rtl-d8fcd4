// tb_row_decoder: every address with the decoder enabled and disabled.
module tb_row_decoder;
  localparam int R = 64, AW = 6;
  logic en;
  logic [AW-1:0] addr;
  logic [R-1:0] sel;
  int checks = 0, failures = 0;

  row_decoder #(.R(R)) dut (.en, .addr, .sel);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < R; a++) begin
        logic [R-1:0] expd;
        en = e[0];
        addr = AW'(a);
        #1;
        expd = '0;
        if (e == 1) expd[a] = 1'b1;
        checks++;
        if (sel !== expd) begin
          failures++;
          $display("FAIL en=%0d addr=%0d sel=%h", e, a, sel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
