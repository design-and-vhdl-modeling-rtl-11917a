// tb_c_element: random input sequences against a reference C-element: the
// output must rise only when all inputs are high, fall only when all are low
// and hold in every other case.
module tb_c_element;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int W = 3;
  logic [W-1:0] in;
  logic         out;
  logic         model;
  int checks = 0, failures = 0;
  int rises = 0, falls = 0, holds = 0;

  c_element #(.WIDTH(W)) dut (.in(in), .out(out));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0;
    model = 1'b0;
    #10;
    checks++;
    if (out !== 1'b0) failures++;
    for (int i = 0; i < 2000; i++) begin
      logic prev;
      prev = model;
      in = W'($urandom);
      if (&in) model = 1'b1;
      else if (in == '0) model = 1'b0;
      #10;
      if (model && !prev) rises++;
      else if (!model && prev) falls++;
      else holds++;
      checks++;
      if (out !== model) begin
        failures++;
        $display("FAIL in=%b out=%b expected %b", in, out, model);
      end
    end
    checks++;
    if (rises == 0 || falls == 0 || holds == 0) begin
      failures++;
      $display("FAIL coverage rises=%0d falls=%0d holds=%0d", rises, falls, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
