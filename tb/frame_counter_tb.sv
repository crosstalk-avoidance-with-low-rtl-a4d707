// frame_counter_tb: checks the phase sequence 0,1,2,0,... after reset and that
// last is high exactly in phase 2, i.e. once every three cycles.
module frame_counter_tb;
  logic       clk = 0, rst_n;
  logic [1:0] phase;
  logic       last;
  int checks = 0, failures = 0;

  frame_counter #(.MOD(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      checks++;
      if (int'(phase) != i % 3 || last != (i % 3 == 2)) begin
        failures++;
        $display("FAIL cycle %0d phase=%0d last=%0b", i, phase, last);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
