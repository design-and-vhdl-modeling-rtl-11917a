// tb_freq_divider: counts input and output edges for the default M = 4 and an
// odd M = 5: one output period per M input periods, high for ceil(M/2)
// input periods, output rising edges on input rising edges, held low in reset.
module tb_freq_divider;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 0, rst;
  logic div4, div5;
  int checks = 0, failures = 0;

  freq_divider dut4 (.clk(clk), .rst(rst), .div(div4));
  freq_divider #(.M(5)) dut5 (.clk(clk), .rst(rst), .div(div5));

  always #500 clk = !clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history of the two outputs, sampled just after each input rising edge
  int k = 0;
  logic [1023:0] h4, h5;
  always @(posedge clk) begin
    #1;
    if (!rst && k < 1024) begin
      h4[k] = div4;
      h5[k] = div5;
      k++;
    end
  end

  initial begin
    rst = 0;
    #1 rst = 1;
    repeat (5) @(posedge clk);
    #1;
    checks++; if (div4 || div5) failures++;
    @(negedge clk) rst = 0;
    wait (k == 1000);
    for (int i = 0; i < 1000; i++) begin
      checks++;
      if (h4[i] != ((i % 4) < 2)) begin failures++; $display("FAIL M=4 cycle %0d", i); end
      checks++;
      if (h5[i] != ((i % 5) < 3)) begin failures++; $display("FAIL M=5 cycle %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
