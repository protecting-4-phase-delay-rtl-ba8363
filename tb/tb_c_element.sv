// Testbench for c_element: random input sequences against a reference model
// of the hysteresis rule (rise on all ones, fall on all zeros, else hold),
// for a 2-input gate reset to 0 and a 3-input gate reset to 1.
module tb_c_element;
  logic clk = 0, rst_n = 0;
  logic [1:0] a2;
  logic [2:0] a3;
  logic q2, q3, m2, m3;
  int checks = 0, failures = 0;

  c_element #(.N(2), .INIT(1'b0)) u2 (.clk(clk), .rst_n(rst_n), .in(a2), .q(q2));
  c_element #(.N(3), .INIT(1'b1)) u3 (.clk(clk), .rst_n(rst_n), .in(a3), .q(q3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a2 = '0; a3 = '0;
    m2 = 1'b0; m3 = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q2 !== 1'b0 || q3 !== 1'b1) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      a2 = 2'($urandom);
      a3 = 3'($urandom);
      if (t % 7 == 0) a3 = '1;
      if (t % 11 == 0) a3 = '0;
      @(posedge clk);
      if (a2 == 2'b11) m2 = 1'b1; else if (a2 == 2'b00) m2 = 1'b0;
      if (a3 == 3'b111) m3 = 1'b1; else if (a3 == 3'b000) m3 = 1'b0;
      #1;
      checks++;
      if (q2 !== m2 || q3 !== m3) begin
        failures++;
        $display("FAIL t=%0d a2=%b q2=%b m2=%b a3=%b q3=%b m3=%b", t, a2, q2, m2, a3, q3, m3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
