// tb_am_memory_field: full-row and unit-masked writes against a model array;
// checks the parallel cell outputs and the read port.
module tb_am_memory_field;
  localparam int R = 64, W = 16, N = 5, AW = 6;
  logic clk = 1'b0, wr_en = 1'b0;
  logic [AW-1:0] wr_row = '0, rd_row = '0;
  logic [W-1:0] wr_mask = '0;
  logic [W-1:0][N-1:0] wr_data = '0, rd_data;
  logic [R-1:0][W-1:0][N-1:0] cells, model;
  int checks = 0, failures = 0;

  am_memory_field #(.R(R), .W(W), .N(N)) dut (.clk, .wr_en, .wr_row, .wr_mask, .wr_data,
                                               .rd_row, .rd_data, .cells);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int row, input logic [W-1:0] mask, input logic [W-1:0][N-1:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_row = AW'(row); wr_mask = mask; wr_data = d;
    for (int u = 0; u < W; u++) if (mask[u]) model[row][u] = d[u];
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  function automatic logic [W-1:0][N-1:0] rnd_word();
    logic [W-1:0][N-1:0] w;
    for (int u = 0; u < W; u++) w[u] = N'($urandom);
    return w;
  endfunction

  initial begin
    for (int r = 0; r < R; r++) write(r, '1, rnd_word());
    for (int i = 0; i < 200; i++) write($urandom % R, W'($urandom), rnd_word());
    // a write strobe of zero must change nothing
    @(negedge clk);
    wr_en = 1'b0; wr_row = 3; wr_mask = '1; wr_data = rnd_word();
    @(negedge clk);
    checks++;
    if (cells != model) begin failures++; $display("FAIL cell array differs"); end
    for (int r = 0; r < R; r++) begin
      rd_row = AW'(r);
      #1;
      checks++;
      if (rd_data != model[r]) begin
        failures++;
        $display("FAIL read row %0d: %h expected %h", r, rd_data, model[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
