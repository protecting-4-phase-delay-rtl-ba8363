// Link testbench with the D flip-flop transmitter in place of the
// AND-masking one: 8-bit payload, 3-of-6 data blocks, base receiver.
// Three links run side by side in tb_link_harness (per-rail wire delays,
// single transient faults, stalling consumer): advanced controller with
// reset generator version B, advanced controller with version A
// (Delta_rst = 2 cycles), and the simple controller (reset pulse of 2
// cycles). Every payload must arrive unchanged, and resampling, check
// block errors, decode errors and invalid captures must all occur.
module tb_link_dff_tx;
  import ftdi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tb_link_harness #(.NWORDS(800), .EXP_RAILS(16), .EXP_P100(175), .TX_DFF(1'b1))
    h_adv_b (.clk(clk), .rst_n(rst_n));
  tb_link_harness #(.NWORDS(800), .EXP_RAILS(16), .EXP_P100(175), .TX_DFF(1'b1), .DFF_RST_B(1'b0))
    h_adv_a (.clk(clk), .rst_n(rst_n));
  tb_link_harness #(.NWORDS(800), .EXP_RAILS(16), .EXP_P100(175), .TX_DFF(1'b1), .DFF_ADV(1'b0), .DFF_RST_B(1'b0))
    h_simple (.clk(clk), .rst_n(rst_n));

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h_adv_b.checks + h_adv_a.checks + h_simple.checks,
             h_adv_b.failures + h_adv_a.failures + h_simple.failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (h_adv_b.finished && h_adv_a.finished && h_simple.finished);
    $display("TB_RESULT checks=%0d failures=%0d", h_adv_b.checks + h_adv_a.checks + h_simple.checks,
             h_adv_b.failures + h_adv_a.failures + h_simple.failures);
    $finish;
  end
endmodule
