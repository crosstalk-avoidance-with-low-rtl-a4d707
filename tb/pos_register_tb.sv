// pos_register_tb: checks reset to 000, load when enabled and hold when not,
// against a reference value kept by the testbench.
module pos_register_tb;
  logic       clk = 0, rst_n, en;
  logic [2:0] d, q, ref_q;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  pos_register #(.W(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 1; d = 3'b101;
    @(posedge clk); #1;
    checks++;
    if (q != 3'b000) begin failures++; $display("FAIL reset q=%b", q); end
    ref_q = 3'b000;
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      en = 1'($urandom);
      d  = 3'($urandom);
      @(posedge clk);
      if (en) begin ref_q = d; loads++; end else holds++;
      #1;
      checks++;
      if (q != ref_q) begin failures++; $display("FAIL cycle %0d q=%b expected %b", i, q, ref_q); end
    end
    if (loads == 0 || holds == 0) begin failures++; $display("FAIL no load or no hold seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
