// Testbench of the AND-masking transmitter's controller.
//
// A producer raises req (already delayed, as in the transmitter) and drops
// it after ack_out; the DI side raises ack_in a random number of cycles
// after en rises and drops it a random time after en falls, sometimes only
// after the producer has started the next request. Each change of en and
// ack_out is checked against the order of the controller's signal
// transition graph: en+ needs req = 1 and ack_in = 0, en- needs ack_in = 1,
// ack_out+ comes only after en-, ack_out- needs req = 0, and the four events
// repeat in the order en+, en-, ack_out+, ack_out-.
module tb_and_mask_tx_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req = 0, ack_in = 0;
  logic en, ack_out;
  int checks = 0, failures = 0;
  int late_ack = 0, handshakes = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  and_mask_tx_ctrl dut (.clk(clk), .rst_n(rst_n), .req(req), .ack_in(ack_in), .en(en), .ack_out(ack_out));

  // event order monitor: inputs seen at the previous edge enable the event
  int phase = 0;   // 0: expect en+, 1: en-, 2: ack_out+, 3: ack_out-
  logic en_p = 0, ack_p = 0, req_p = 0, ackin_p = 0;
  always @(negedge clk) if (rst_n) begin
    check(!(en && ack_out), "en and ack_out high together");
    if (en && !en_p) begin
      check(phase == 0, "en+ out of order");
      check(req_p && !ackin_p, "en+ without req = 1 and ack_in = 0");
      phase = 1;
    end
    if (!en && en_p) begin
      check(phase == 1, "en- out of order");
      check(ackin_p, "en- without ack_in = 1");
      phase = 2;
    end
    if (ack_out && !ack_p) begin
      check(phase == 2, "ack_out+ out of order");
      phase = 3;
    end
    if (!ack_out && ack_p) begin
      check(phase == 3, "ack_out- out of order");
      check(!req_p, "ack_out- without req = 0");
      phase = 0;
      handshakes++;
    end
    en_p = en; ack_p = ack_out; req_p = req; ackin_p = ack_in;
  end

  // DI side: acknowledges the code word and the spacer after random delays
  initial begin
    forever begin
      @(negedge clk);
      if (en && !ack_in) begin
        repeat ($urandom_range(0, 5)) @(negedge clk);
        ack_in = 1;
        while (en) @(negedge clk);
        if ($urandom_range(3) == 0) begin
          // keep ack_in high until the next request has arrived
          while (!req || ack_out) @(negedge clk);
          repeat ($urandom_range(1, 4)) @(negedge clk);
          check(!en, "en+ while ack_in is still high");
          late_ack++;
        end else begin
          repeat ($urandom_range(0, 5)) @(negedge clk);
        end
        ack_in = 0;
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!en && !ack_out, "idle after reset");
    for (int i = 0; i < 500; i++) begin
      repeat ($urandom_range(0, 4)) @(negedge clk);
      req = 1;
      while (!ack_out) @(negedge clk);
      repeat ($urandom_range(0, 4)) @(negedge clk);
      check(ack_out, "ack_out holds while req is high");
      req = 0;
      while (ack_out) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(handshakes == 500, $sformatf("%0d handshakes completed, expected 500", handshakes));
    check(late_ack > 0, "the late ack_in case was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
