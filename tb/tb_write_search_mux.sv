// tb_write_search_mux: random inputs in both modes; in write mode the decoder
// must see the external address and strobe, in search mode the winner's.
module tb_write_search_mux;
  localparam int AW = 6;
  logic search, wr_en, win_valid, dec_en;
  logic [AW-1:0] wr_addr, win_addr, dec_addr;
  int checks = 0, failures = 0;

  write_search_mux #(.AW(AW)) dut (.search, .wr_en, .wr_addr, .win_valid, .win_addr,
                                   .dec_en, .dec_addr);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic e_en;
      logic [AW-1:0] e_addr;
      search    = 1'(i % 2);
      wr_en     = 1'($urandom);
      win_valid = 1'($urandom);
      wr_addr   = AW'($urandom);
      win_addr  = AW'($urandom);
      #1;
      e_en   = search ? win_valid : wr_en;
      e_addr = search ? win_addr : wr_addr;
      checks++;
      if (dec_en != e_en || dec_addr != e_addr) begin
        failures++;
        $display("FAIL search=%0d dec_en=%0d dec_addr=%0d", search, dec_en, dec_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
