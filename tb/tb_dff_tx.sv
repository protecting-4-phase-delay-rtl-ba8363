// Testbench of the D flip-flop transmitter.
//
// Three transmitters run in parallel, each with its own producer and
// receiver model:
//   0: the default (8-bit 3-of-6, advanced controller, reset version B,
//      Delta_rst = 1),
//   1: 16-bit 2-of-5, advanced controller, reset version A, Delta_rst = 3,
//   2: 8-bit 3-of-6, simple controller, reset pulse of 2 cycles.
// The producers send random payloads with random gaps; the receiver models
// acknowledge each code word and each spacer after random delays.
// Checks: the rails carry only the spacer or the complete code word of the
// oldest unacknowledged payload; the word appears exactly Delta_req + 1
// cycles after req rises when the channel has been idle; a capture never
// coincides with the register reset; in the simple version ack_out falls
// only after ack_in has risen; every payload goes out exactly once.
module tb_dff_tx;
  import ftdi_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit done_flag [3];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  localparam int W    [3] = '{8, 16, 8};
  localparam int DRST [3] = '{1, 3, 2};

  for (genvar g = 0; g < 3; g++) begin : g_t
    localparam int unsigned DW = W[g];
    localparam di_code_e    CD = (g == 1) ? CODE_2OF5 : CODE_3OF6;
    localparam int unsigned R  = total_rails(DW, CD);
    logic req = 0, ack_out, ack_in = 0;
    logic [DW-1:0] data = '0;
    logic [R-1:0] rails;
    logic [R-1:0] exp_q [$];
    int sent = 0, seen = 0;

    if (g == 0) begin : g_dut
      dff_tx u (.clk(clk), .rst_n(rst_n), .req(req), .ack_out(ack_out),
                .data(data), .rails(rails), .ack_in(ack_in));
    end else if (g == 1) begin : g_dut
      dff_tx #(.DATA_W(16), .CODE(CODE_2OF5), .RST_VERSION_B(1'b0), .DELTA_RST(3)) u (
        .clk(clk), .rst_n(rst_n), .req(req), .ack_out(ack_out),
        .data(data), .rails(rails), .ack_in(ack_in));
    end else begin : g_dut
      dff_tx #(.ADVANCED(1'b0), .DELTA_RST(2)) u (
        .clk(clk), .rst_n(rst_n), .req(req), .ack_out(ack_out),
        .data(data), .rails(rails), .ack_in(ack_in));
    end

    function automatic logic [R-1:0] encode(logic [DW-1:0] d);
      int n;
      logic [127:0] v;
      v = ref_bus(64'(d), DW, CD == CODE_3OF6, n);
      return v[R-1:0];
    endfunction

    // register timing and the simple controller's interlock
    logic ack_p = 0, ackin_p = 0;
    always @(negedge clk) if (rst_n) begin
      check(!(g_dut.u.rst && g_dut.u.trg), "capture during the reset");
      if (g == 2 && ack_p && !ack_out) check(ackin_p, "simple controller: ack_out- before ack_in+");
      ack_p = ack_out; ackin_p = ack_in;
    end

    // receiver model
    initial begin
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        check(rails == '0 || (exp_q.size() > 0 && rails == exp_q[0]),
              $sformatf("rails %b are neither the spacer nor the expected word", rails));
        if (rails != '0 && !ack_in) begin
          seen++;
          repeat ($urandom_range(0, 4)) begin
            @(negedge clk);
            check(rails == exp_q[0], "code word must stay until acknowledged");
          end
          ack_in = 1;
          void'(exp_q.pop_front());
          while (rails != '0) @(negedge clk);
          repeat ($urandom_range(0, 4)) @(negedge clk);
          ack_in = 0;
        end
      end
    end

    // producer
    int exact = 0;
    initial begin
      @(posedge rst_n);
      for (int i = 0; i < 300; i++) begin
        int lat, idle;
        bit was_idle;
        idle = 0;
        repeat ($urandom_range(0, 12)) begin
          @(negedge clk);
          idle = (ack_in || rails != '0) ? 0 : idle + 1;
        end
        @(negedge clk);
        idle = (ack_in || rails != '0) ? 0 : idle + 1;
        was_idle = (idle > DRST[g] + 1) && (exp_q.size() == 0);
        data = DW'({$urandom, $urandom});
        req = 1;
        exp_q.push_back(encode(data));
        sent++;
        lat = 0;
        while (!ack_out) begin @(negedge clk); lat++; end
        if (was_idle) begin
          check(lat == 6 + 1, $sformatf("capture %0d cycles after req, expected 7", lat));
          exact++;
        end
        // the captured word is on the rails right after ack_out+ (unless
        // the receiver has already acknowledged it)
        repeat ($urandom_range(0, 3)) @(negedge clk);
        req = 0;
        while (ack_out) @(negedge clk);
      end
      while (exp_q.size() != 0) @(negedge clk);
      repeat (10) @(negedge clk);
      check(seen == sent, $sformatf("%0d code words for %0d requests", seen, sent));
      check(exact > 10, "latency from an idle channel was rarely measured");
      done_flag[g] = 1;
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    done_flag = '{0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (done_flag[0] && done_flag[1] && done_flag[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
