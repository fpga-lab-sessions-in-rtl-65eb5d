// tb_delay_line: self-checking test of delay_line.
//
// Feeds random samples with random idle clocks between strobes into a
// DEPTH-5 line and a DEPTH-2 line (the smallest allowed), keeps a model
// of the samples, and checks after every strobe that each output equals
// the sample taken DEPTH-1 strobes earlier (DEPTH strobes of delay seen
// from the register feeding din). It also checks that idle clocks do not
// move the data.
module tb_delay_line;

  logic       clk = 0;
  logic       rst;
  logic       en;
  logic [7:0] din;
  logic [7:0] dout5, dout2;
  int         checks = 0, failures = 0;
  byte unsigned hist [$];

  always #5 clk = ~clk;

  delay_line #(.WIDTH(8), .DEPTH(5)) dut5 (.clk, .rst, .en, .din, .dout(dout5));
  delay_line #(.WIDTH(8), .DEPTH(2)) dut2 (.clk, .rst, .en, .din, .dout(dout2));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; en = 0; din = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 300; n++) begin
      int gap;
      gap = int'($urandom_range(0, 2));
      repeat (gap) begin
        en <= 0; din <= 8'($urandom);
        @(posedge clk);
        #1;
        if (hist.size() > 4) check("DEPTH 5 holds during idle", dout5, hist[hist.size()-5]);
      end
      en <= 1; din <= 8'($urandom);
      @(posedge clk);
      hist.push_back(din);
      #1;
      if (hist.size() > 4) check("DEPTH 5", dout5, hist[hist.size()-5]);
      if (hist.size() > 1) check("DEPTH 2", dout2, hist[hist.size()-2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
