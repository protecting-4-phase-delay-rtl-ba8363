// Testbench of the dual-use completion detector receiver, run inside the
// complete link (AND-masking transmitter, per-rail wire delays, single
// transient faults, stalling consumer; see tb_link_harness). Two links:
// 8-bit payload with 3-of-6 blocks, and 16-bit payload with 2-of-5 blocks.
// Every payload must arrive unchanged and in order, and resampling, check
// block errors, decode errors (3-of-6) and invalid snapshots must all occur.
//
// On the 8-bit link the controller's event order is also checked against
// its transition graph, edge by edge, on the registered signals:
//   f_en+ only after ack_in+ (while rx_ack is high),
//   req+ only while c is high and rx_ack is low,
//   c- only while f_en is high,
//   f_en- only after c-,
//   ack_out- only after f_en-,
// and the input latches are closed (trg high, f_en low) whenever the
// consumer sees a request.
module tb_dual_use_cd_receiver;
  import ftdi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tb_link_harness #(.NWORDS(800), .EXP_RAILS(16), .EXP_P100(175), .RX_DUAL(1'b1))
    h8 (.clk(clk), .rst_n(rst_n));
  tb_link_harness #(.DATA_W(16), .CODE(CODE_2OF5), .NWORDS(600), .EXP_RAILS(31), .EXP_P100(150),
                    .RX_DUAL(1'b1))
    h16 (.clk(clk), .rst_n(rst_n));

  int checks = 0, failures = 0;
  logic c, f_en, ack_out, req, ack_in, trg;
  logic c_p = 0, f_en_p = 0, ack_out_p = 0, req_p = 0, ack_in_p = 0;
  int n_fen = 0;
  assign c       = h8.dut.g_rx_dual.u_rx.c;
  assign f_en    = h8.dut.g_rx_dual.u_rx.f_en;
  assign ack_out = h8.dut.g_rx_dual.u_rx.dibus_ack;
  assign req     = h8.dut.g_rx_dual.u_rx.rx_req;
  assign ack_in  = h8.dut.g_rx_dual.u_rx.rx_ack;
  assign trg     = h8.dut.g_rx_dual.u_rx.trg;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      if (f_en && !f_en_p) begin check(ack_in_p, "f_en rose without ack_in"); n_fen++; end
      if (req && !req_p)         check(c_p && !ack_in_p, "req rose without c or with ack_in high");
      if (!c && c_p)             check(f_en_p, "c fell before f_en rose");
      if (!f_en && f_en_p)       check(!c_p, "f_en fell while c was high");
      if (!ack_out && ack_out_p) check(!f_en_p, "ack_out fell while f_en was high");
      if (req && !ack_in)        check(trg && !f_en, "latches open during a request");
    end
    c_p = c; f_en_p = f_en; ack_out_p = ack_out; req_p = req; ack_in_p = ack_in;
  end

  function automatic int total_checks();
    return h8.checks + h16.checks + checks;
  endfunction
  function automatic int total_failures();
    return h8.failures + h16.failures + failures;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (h8.finished && h16.finished);
    check(n_fen == 800, $sformatf("%0d f_en pulses for 800 words", n_fen));
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end
endmodule
