// Testbench of the base receiver at its default parameters (8-bit payload,
// 3-of-6 data blocks, Delta_ED = 6, Delta_P = 1 cycles).
//
// The testbench plays the transmitter and the wires: each rail of the
// reference code word rises after its own random delay (0 to 6 cycles) and
// returns to zero after another random delay once the receiver has
// acknowledged. Most transfers carry one transient fault: a rail forced to
// the opposite value for 1 to 12 cycles. The first transfers repeat the
// document's three fault cases on data block 0 of payload 0x00 (code word
// 111000 with rail 4 late): a fault on rail 0 gives the valid word 101001,
// one on rail 1 the unused word 101010, and a long fault on rail 0 the
// invalid word 111001 after rail 4 arrives. Checks: every payload is
// delivered once and unchanged; the DI acknowledge never rises before the
// consumer request and never falls before all rails are back at zero;
// check block errors, decode errors and resampling all occurred.
module tb_base_receiver;
  import ftdi_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int unsigned R = total_rails(8, CODE_3OF6);
  logic [R-1:0] rails = '0, fault = '0, rin;
  logic dibus_ack, rx_req, rx_ack = 0;
  logic [7:0] rx_data;
  int checks = 0, failures = 0;
  int n_resample = 0, n_cerr = 0, n_derr = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  assign rin = rails ^ fault;

  base_receiver dut (.clk(clk), .rst_n(rst_n), .rails(rin), .dibus_ack(dibus_ack),
                     .rx_data(rx_data), .rx_req(rx_req), .rx_ack(rx_ack));

  // mechanism counters: evaluations of the error signal by the sampler
  always @(negedge clk) if (rst_n) begin
    if (dut.u_smp.state == 2'd1 && dut.u_smp.cnt >= 6) begin
      if (dut.error) n_resample++;
      if (dut.checkblock_error) n_cerr++;
      if (dut.decode_error) n_derr++;
    end
  end

  // the DI acknowledge against the rails
  logic ack_p = 0, req_p = 0;
  logic [R-1:0] rails_p = '0;
  int fault_age = 100;
  always @(negedge clk) if (rst_n) begin
    if (dibus_ack && !ack_p) check(rx_req, "DI acknowledge without a consumer request");
    // The fault-free wires must carry the spacer. Exception: a fault that
    // clears the last rail still at one during the return to zero looks
    // like the spacer; the rail reappearing later is seen by the next
    // transfer as a single fault and corrected there.
    if (!dibus_ack && ack_p) check(rails_p == '0 || fault_age < 4, "DI acknowledge fell before the spacer arrived");
    ack_p = dibus_ack; req_p = rx_req; rails_p = rails;
    fault_age = (fault != '0) ? 0 : fault_age + 1;
  end

  // consumer
  logic [7:0] exp_q [$];
  int received = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (rx_req && !rx_ack) begin
        check(exp_q.size() > 0, "unexpected word");
        if (exp_q.size() > 0) check(rx_data == exp_q.pop_front(), $sformatf("received %h", rx_data));
        received++;
        repeat ($urandom_range(0, 4)) @(negedge clk);
        rx_ack = 1;
        while (rx_req) @(negedge clk);
        repeat ($urandom_range(0, 2)) @(negedge clk);
        rx_ack = 0;
      end
    end
  end

  // one transfer: rails rise one by one, wait for the acknowledge, fall
  task automatic transfer(logic [7:0] d, int frail, int fstart, int flen, int late4);
    logic [127:0] w;
    int n, t_up [R], t_dn [R];
    w = ref_bus(64'(d), 8, 1'b1, n);
    for (int i = 0; i < R; i++) begin
      t_up[i] = $urandom_range(0, 6);
      t_dn[i] = $urandom_range(0, 6);
    end
    if (late4 > 0) t_up[4] = late4;
    exp_q.push_back(d);
    fork
      if (frail >= 0) begin
        repeat (fstart) @(negedge clk);
        fault[frail] = 1'b1;
        repeat (flen) @(negedge clk);
        fault[frail] = 1'b0;
      end
    join_none
    for (int c = 0; c <= 12; c++) begin
      for (int i = 0; i < R; i++) if (w[i] && t_up[i] == c) rails[i] = 1'b1;
      @(negedge clk);
    end
    while (!dibus_ack) @(negedge clk);
    for (int c = 0; c <= 6; c++) begin
      for (int i = 0; i < R; i++) if (t_dn[i] == c) rails[i] = 1'b0;
      @(negedge clk);
    end
    while (dibus_ack) @(negedge clk);
    wait fork;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    transfer(8'h00, 0, 0, 10, 12);   // 101001: valid word, wrong check block
    transfer(8'h00, 1, 0, 10, 12);   // 101010: unused word
    transfer(8'h00, 0, 11, 12, 10);  // 111001: invalid word
    for (int t = 0; t < 600; t++) begin
      if ($urandom_range(9) < 6)
        transfer(8'($urandom), $urandom_range(R - 1), $urandom_range(0, 12), $urandom_range(1, 12), 0);
      else
        transfer(8'($urandom), -1, 0, 0, 0);
    end
    repeat (10) @(negedge clk);
    check(received == 603 && exp_q.size() == 0, $sformatf("%0d words received", received));
    check(n_resample > 0, "no resampling");
    check(n_cerr > 0, "no check block error");
    check(n_derr > 0, "no decode error");
    $display("MECH: resamples=%0d check_err=%0d decode_err=%0d", n_resample, n_cerr, n_derr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
