// tb_output_selector: random row contents; each one-hot match vector must
// return that row's word, an empty vector must return zero.
module tb_output_selector;
  localparam int R = 64, W = 16, N = 5;
  logic [R-1:0] match;
  logic [R-1:0][W-1:0][N-1:0] rows;
  logic [W-1:0][N-1:0] data;
  int checks = 0, failures = 0;

  output_selector #(.R(R), .W(W), .N(N)) dut (.match, .rows, .data);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      for (int r = 0; r < R; r++)
        for (int u = 0; u < W; u++) rows[r][u] = N'($urandom);
      match = '0;
      #1;
      checks++;
      if (data != '0) begin failures++; $display("FAIL empty match gives %h", data); end
      for (int r = 0; r < R; r++) begin
        match = '0; match[r] = 1'b1;
        #1;
        checks++;
        if (data != rows[r]) begin
          failures++;
          $display("FAIL row %0d: %h expected %h", r, data, rows[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
