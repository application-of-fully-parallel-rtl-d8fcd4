// tb_winner_feedback: random clear/take/match sequences against a model of
// the per-row "lost" flags.
module tb_winner_feedback;
  localparam int R = 64;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, take = 1'b0;
  logic [R-1:0] match = '0, lost, model;
  int checks = 0, failures = 0;

  winner_feedback #(.R(R)) dut (.clk, .rst_n, .clear, .take, .match, .lost);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (lost != model) begin
        failures++;
        $display("FAIL cycle %0d lost=%h expected %h", i, lost, model);
      end
      clear = ($urandom % 20) == 0;
      take  = 1'($urandom);
      match = '0;
      match[$urandom % R] = 1'b1;
      if (clear)     model = '0;
      else if (take) model = model | match;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
