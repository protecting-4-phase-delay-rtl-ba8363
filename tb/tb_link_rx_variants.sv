// Link testbench for the base receiver variants: 8-bit payload, 3-of-6 data
// blocks, AND-masking transmitter. Two links run side by side in
// tb_link_harness (per-rail wire delays, single transient faults, stalling
// consumer):
//  * sampler version A, where trg is a short pulse per snapshot instead of
//    staying high during the error detection wait;
//  * the advanced protocol controller, where the DI acknowledge no longer
//    waits for the consumer. This link also counts the words whose DI
//    handshake completed while the consumer still held the previous word
//    (acknowledge low while rx_req is high); that overlap must occur.
// Every payload must arrive unchanged, and resampling, check block errors,
// decode errors and invalid snapshots must all occur on both links.
module tb_link_rx_variants;
  import ftdi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tb_link_harness #(.NWORDS(1000), .EXP_RAILS(16), .EXP_P100(175), .SMP_B(1'b0))
    h_smp_a (.clk(clk), .rst_n(rst_n));
  tb_link_harness #(.NWORDS(1000), .EXP_RAILS(16), .EXP_P100(175), .CTRL_ADV(1'b1))
    h_adv (.clk(clk), .rst_n(rst_n));

  // overlap: the DI acknowledge fell while the consumer request was high
  int  n_overlap = 0;
  logic ack_p = 0;
  always @(negedge clk) begin
    if (rst_n && ack_p && !h_adv.dibus_ack && h_adv.rx_req) n_overlap++;
    ack_p = h_adv.dibus_ack;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h_smp_a.checks + h_adv.checks,
             h_smp_a.failures + h_adv.failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (h_smp_a.finished && h_adv.finished);
    $display("MECH[advanced controller]: DI handshakes finished during a consumer handshake=%0d", n_overlap);
    if (n_overlap == 0) $display("FAIL: the advanced controller never decoupled the handshakes");
    $display("TB_RESULT checks=%0d failures=%0d", h_smp_a.checks + h_adv.checks + 1,
             h_smp_a.failures + h_adv.failures + ((n_overlap == 0) ? 1 : 0));
    $finish;
  end
endmodule
