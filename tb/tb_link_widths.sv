// Link testbench for the other bus widths of the document's comparison
// table: 8, 16, 32 and 64-bit payloads with 2-of-5 data blocks, and 16, 32
// and 64-bit payloads with 3-of-6 data blocks (the 8-bit 3-of-6 link is the
// default one, tested by tb_ft_di_link). Each width runs in its own
// tb_link_harness with per-rail delays, single transient faults and a
// stalling consumer; all payloads must arrive unchanged and every fault
// handling mechanism must have been used at each width. The number of
// rails and the measured rail transitions per data bit are checked against
// the figures of the scheme's comparison table (f = 1 columns).
module tb_link_widths;
  import ftdi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tb_link_harness #(.DATA_W(8),  .CODE(CODE_2OF5), .NWORDS(600), .EXP_RAILS(18), .EXP_P100(150)) h8_25  (.clk(clk), .rst_n(rst_n));
  tb_link_harness #(.DATA_W(16), .CODE(CODE_2OF5), .NWORDS(600), .EXP_RAILS(31), .EXP_P100(150)) h16_25 (.clk(clk), .rst_n(rst_n));
  tb_link_harness #(.DATA_W(16), .CODE(CODE_3OF6), .NWORDS(600), .EXP_RAILS(28), .EXP_P100(163)) h16_36 (.clk(clk), .rst_n(rst_n));
  tb_link_harness #(.DATA_W(32), .CODE(CODE_2OF5), .NWORDS(600), .EXP_RAILS(58), .EXP_P100(138)) h32_25 (.clk(clk), .rst_n(rst_n));
  tb_link_harness #(.DATA_W(32), .CODE(CODE_3OF6), .NWORDS(600), .EXP_RAILS(52), .EXP_P100(156)) h32_36 (.clk(clk), .rst_n(rst_n));
  tb_link_harness #(.DATA_W(64), .CODE(CODE_2OF5), .NWORDS(600), .EXP_RAILS(111), .EXP_P100(138)) h64_25 (.clk(clk), .rst_n(rst_n));
  tb_link_harness #(.DATA_W(64), .CODE(CODE_3OF6), .NWORDS(600), .EXP_RAILS(100), .EXP_P100(153)) h64_36 (.clk(clk), .rst_n(rst_n));

  int checks, failures;
  task automatic sum();
    checks   = h8_25.checks + h16_25.checks + h16_36.checks + h32_25.checks
             + h32_36.checks + h64_25.checks + h64_36.checks;
    failures = h8_25.failures + h16_25.failures + h16_36.failures + h32_25.failures
             + h32_36.failures + h64_25.failures + h64_36.failures;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    sum();
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (h8_25.finished && h16_25.finished && h16_36.finished && h32_25.finished
          && h32_36.finished && h64_25.finished && h64_36.finished);
    sum();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
