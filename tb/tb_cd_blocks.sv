// Testbench for cd_3of6 and cd_2of5. Every rail word is applied after a
// spacer; done must follow one cycle behind the reference rule: 3-of-6 fires
// at three or more ones, 2-of-5 when two of the rail groups {x0,x1}, {x4},
// {x2,x3} carry a one; both release only at the all-zero spacer and hold
// their value while the rails are partly reset.
module tb_cd_blocks;
  logic clk = 0, rst_n = 0;
  logic [5:0] x6;
  logic [4:0] x5;
  logic done6, done5;
  int checks = 0, failures = 0;

  cd_3of6 u36 (.clk(clk), .rst_n(rst_n), .x(x6), .done(done6));
  cd_2of5 u25 (.clk(clk), .rst_n(rst_n), .x(x5), .done(done5));

  always #5 clk = ~clk;

  function automatic bit fire6(logic [5:0] w);
    return $countones(w) >= 3;
  endfunction
  function automatic bit fire5(logic [4:0] w);
    return (((w[0] | w[1]) ? 1 : 0) + (w[4] ? 1 : 0) + ((w[2] | w[3]) ? 1 : 0)) >= 2;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x6 = '0; x5 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    #1;
    check(!done6 && !done5, "done low after reset");
    for (int w = 1; w < 64; w++) begin
      // apply word, wait two cycles
      x6 = 6'(w); x5 = 5'(w);
      repeat (2) @(posedge clk);
      #1;
      check(done6 == fire6(x6), $sformatf("3of6 word %b done %b", x6, done6));
      if (w < 32) check(done5 == fire5(x5), $sformatf("2of5 word %b done %b", x5, done5));
      // drop one rail: a fired detector must hold
      if (done6) begin
        x6 = x6 & (x6 - 1);
        repeat (2) @(posedge clk);
        #1;
        check(done6, $sformatf("3of6 released early at %b", x6));
      end
      if (done5 && w < 32) begin
        x5 = x5 & (x5 - 1);
        repeat (2) @(posedge clk);
        #1;
        check(done5, $sformatf("2of5 released early at %b", x5));
      end
      x6 = '0; x5 = '0;
      repeat (2) @(posedge clk);
      #1;
      check(!done6 && !done5, "spacer releases done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
