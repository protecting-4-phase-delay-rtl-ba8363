// Testbench of the rising-edge delay element.
//
// Four instances (DELAY = 0, 1 (the default), 3 and 6 cycles) see the same random input,
// whose high and low periods last 1 to 9 cycles. A reference counter per
// instance predicts the output: y goes high once a has been high for DELAY
// rising clock edges, and goes low together with a (no delay on the falling
// edge). DELAY = 0 must behave as a plain wire.
module tb_rise_delay;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic a = 0;
  logic [3:0] y;
  int checks = 0, failures = 0;
  localparam int D [4] = '{0, 1, 3, 6};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  rise_delay #(.DELAY(0)) u0 (.clk(clk), .rst_n(rst_n), .a(a), .y(y[0]));
  rise_delay           u1 (.clk(clk), .rst_n(rst_n), .a(a), .y(y[1]));
  rise_delay #(.DELAY(3)) u2 (.clk(clk), .rst_n(rst_n), .a(a), .y(y[2]));
  rise_delay #(.DELAY(6)) u3 (.clk(clk), .rst_n(rst_n), .a(a), .y(y[3]));

  // edges seen with a high
  int high_edges = 0;
  always @(posedge clk) high_edges <= (rst_n && a) ? high_edges + 1 : 0;

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      int dl;
      dl = D[i];
      check(y[i] == (a && high_edges >= dl), $sformatf("DELAY=%0d: y=%b, a=%b after %0d edges", dl, y[i], a, high_edges));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      a = ~a;
      repeat ($urandom_range(1, 9)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
