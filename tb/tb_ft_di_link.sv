// End-to-end testbench of ft_di_link at its default parameters (8-bit
// payload, two 3-of-6 data blocks, one 1-of-4 check block, 16 rails). The
// environment (tb_link_harness) delays every rail differently and injects
// one transient rail fault into most transfers; every payload must arrive
// unchanged, and resampling, check block errors, decode errors and invalid
// captures must all have occurred. The first transfers send 0x00 with a
// fault on rail 0 or 1 of the first data block, the situations of the
// document's three fault examples.
module tb_ft_di_link;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tb_link_harness #(.NWORDS(2000), .EXP_RAILS(16), .EXP_P100(175)) h (.clk(clk), .rst_n(rst_n));

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (h.finished);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
