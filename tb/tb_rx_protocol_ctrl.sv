// Testbench of the receiver's protocol controller.
//
// done, ack_in and c are driven with random values that are held for random
// times. A reference C-element in the testbench predicts s: it rises one
// clock edge after done = 1 and ack_in = 0 are both present, falls one edge
// after done = 0 and ack_in = 1, and holds otherwise. req and ack_out must
// equal c at all times. A second phase runs proper handshakes: done rises,
// s must rise, c rises, the consumer acknowledges, done falls, and s must
// fall only once both done = 0 and ack_in = 1 have been seen.
//
// A second instance runs the advanced controller. In a third phase the DI
// side (done, c) and the consumer (ack_in) run as two independent processes
// with random delays. For it the testbench checks that s rises only while
// done is high, ack_in is low and every earlier word has been acknowledged
// by the consumer; that s falls one cycle after done falls, whatever the
// consumer does; that req rises once per word, only while c is high, and
// falls one cycle after ack_in rises; and that ack_out equals c. The DI
// handshake must complete while req is still high at least once.
module tb_rx_protocol_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done = 0, ack_in = 0, c = 0;
  logic s, req, ack_out;
  logic s_ref = 0;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic s_a, req_a, ack_out_a;
  int   n_s_rise = 0, n_req_rise = 0, n_ack = 0, n_overlap = 0;
  logic s_ap = 0, req_ap = 0, ack_ip = 0, done_p = 0;
  bit   phase3 = 0;

  rx_protocol_ctrl #(.ADVANCED(1'b1)) dut_a (.clk(clk), .rst_n(rst_n), .done(done), .ack_in(ack_in),
                                             .c(c), .s(s_a), .req(req_a), .ack_out(ack_out_a));

  always @(negedge clk) if (rst_n && phase3) begin
    check(ack_out_a == c, "advanced: ack_out must equal c");
    if (s_a && !s_ap) begin
      check(done && !ack_ip && n_ack == n_s_rise, "advanced: s rose with the previous word not taken");
      n_s_rise++;
    end
    if (!s_a && s_ap) check(!done_p, "advanced: s fell while done was high");
    if (done_p == 0 && s_ap) check(!s_a, "advanced: s must fall one cycle after done");
    if (req_a && !req_ap) begin
      check(c && n_req_rise == n_s_rise - 1, "advanced: req rose without c or twice for one word");
      n_req_rise++;
    end
    if (ack_ip && req_ap) check(!req_a, "advanced: req must fall one cycle after ack_in");
    if (ack_in && !ack_ip) n_ack++;
    if (!s_a && s_ap && req_a) n_overlap++;
    s_ap = s_a; req_ap = req_a; ack_ip = ack_in; done_p = done;
  end

  rx_protocol_ctrl dut (.clk(clk), .rst_n(rst_n), .done(done), .ack_in(ack_in), .c(c),
                        .s(s), .req(req), .ack_out(ack_out));

  always @(posedge clk) if (!rst_n) s_ref <= 1'b0; else begin
    if (done && !ack_in) s_ref <= 1'b1;
    else if (!done && ack_in) s_ref <= 1'b0;
  end

  always @(negedge clk) if (rst_n) begin
    check(s == s_ref, $sformatf("s=%b expected %b", s, s_ref));
    check(req == c && ack_out == c, "req and ack_out must follow c");
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
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      if ($urandom_range(2) == 0) done = 1'($urandom);
      if ($urandom_range(2) == 0) ack_in = 1'($urandom);
      if ($urandom_range(2) == 0) c = 1'($urandom);
    end
    done = 0; ack_in = 1; c = 0;
    repeat (2) @(negedge clk);
    ack_in = 0;
    for (int h = 0; h < 100; h++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      done = 1;
      @(negedge clk);
      check(s, "s must rise one cycle after done");
      repeat ($urandom_range(1, 6)) @(negedge clk);
      c = 1;
      repeat ($urandom_range(0, 4)) @(negedge clk);
      ack_in = 1;
      repeat ($urandom_range(0, 4)) @(negedge clk);
      check(s, "s must hold while done is still high");
      done = 0;
      @(negedge clk);
      check(!s, "s must fall once done = 0 and ack_in = 1");
      c = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      ack_in = 0;
    end
    // phase 3: independent DI side and consumer, advanced controller; the
    // random phase 1 left it in an arbitrary state, so reset first
    done = 0; c = 0; ack_in = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    s_ap = s_a; req_ap = req_a; ack_ip = ack_in; done_p = done;
    n_s_rise = 0; n_req_rise = 0; n_ack = 0;
    phase3 = 1;
    fork
      begin : di_side
        for (int w = 0; w < 200; w++) begin
          repeat ($urandom_range(0, 3)) @(negedge clk);
          done = 1;
          while (!s_a) @(negedge clk);
          repeat ($urandom_range(1, 6)) @(negedge clk);
          c = 1;
          repeat ($urandom_range(1, 4)) @(negedge clk);
          done = 0;
          @(negedge clk);
          c = 0;
        end
      end
      begin : consumer
        for (int w = 0; w < 200; w++) begin
          while (!req_a) @(negedge clk);
          repeat ($urandom_range(0, 12)) @(negedge clk);
          ack_in = 1;
          repeat ($urandom_range(1, 4)) @(negedge clk);
          ack_in = 0;
        end
      end
    join
    repeat (2) @(negedge clk);
    check(n_s_rise == 200 && n_req_rise == 200 && n_ack == 200,
          $sformatf("advanced: %0d s, %0d req, %0d ack for 200 words", n_s_rise, n_req_rise, n_ack));
    check(n_overlap > 0, "advanced: DI handshake never completed during a consumer handshake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
