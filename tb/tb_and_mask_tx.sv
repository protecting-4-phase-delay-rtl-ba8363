// Testbench of the AND-masking transmitter.
//
// Two transmitters are tested: the default one (8-bit payload, 3-of-6 data
// blocks, Delta_req = 6 cycles) and a 16-bit 2-of-5 one with Delta_req = 3.
// A producer sends random payloads over the bundled-data input; a receiver
// model acknowledges each code word and each spacer after random delays.
// Checks: the rails only ever carry the spacer (all zero) or the complete
// reference code word of the payload, never a partial word; the code word
// appears exactly Delta_req + 2 cycles after req rises (delay element, the
// controller's state change, the output register); ack_out rises only once
// the spacer is back on the rails; every payload is sent exactly once.
module tb_and_mask_tx;
  import ftdi_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit done_flag [2];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  localparam int W   [2] = '{8, 16};
  localparam int DRQ [2] = '{6, 3};

  for (genvar g = 0; g < 2; g++) begin : g_t
    localparam int unsigned DW = W[g];
    localparam di_code_e    CD = (g == 0) ? CODE_3OF6 : CODE_2OF5;
    localparam int unsigned R  = total_rails(DW, CD);
    logic req = 0, ack_out, ack_in = 0;
    logic [DW-1:0] data = '0;
    logic [R-1:0] rails;
    int sent = 0, seen = 0;

    if (g == 0) begin : g_dut
      and_mask_tx u (.clk(clk), .rst_n(rst_n), .req(req), .ack_out(ack_out),
                     .data(data), .rails(rails), .ack_in(ack_in));
    end else begin : g_dut
      and_mask_tx #(.DATA_W(16), .CODE(CODE_2OF5), .DELTA_REQ(3)) u (
        .clk(clk), .rst_n(rst_n), .req(req), .ack_out(ack_out),
        .data(data), .rails(rails), .ack_in(ack_in));
    end

    function automatic logic [R-1:0] expected();
      int n;
      logic [127:0] v;
      v = ref_bus(64'(data), DW, CD == CODE_3OF6, n);
      return v[R-1:0];
    endfunction

    // receiver model and rail checks
    initial begin
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        check(rails == '0 || rails == expected(), $sformatf("rails %b are neither spacer nor the code word", rails));
        if (rails != '0 && !ack_in) begin
          seen++;
          repeat ($urandom_range(0, 4)) begin
            @(negedge clk);
            check(rails == expected(), "code word must stay until acknowledged");
          end
          ack_in = 1;
          while (rails != '0) begin
            check(!ack_out, "ack_out before the spacer");
            @(negedge clk);
          end
          repeat ($urandom_range(0, 4)) @(negedge clk);
          ack_in = 0;
        end
      end
    end

    // producer
    initial begin
      @(posedge rst_n);
      for (int i = 0; i < 300; i++) begin
        int lat;
        @(negedge clk);
        while (ack_in) @(negedge clk);
        data = DW'({$urandom, $urandom});
        req = 1;
        sent++;
        lat = 0;
        while (rails == '0) begin @(negedge clk); lat++; end
        check(lat == DRQ[g] + 2, $sformatf("code word after %0d cycles, expected %0d", lat, DRQ[g] + 2));
        while (!ack_out) @(negedge clk);
        check(rails == '0, "ack_out with the code word still on the rails");
        repeat ($urandom_range(0, 3)) @(negedge clk);
        req = 0;
        while (ack_out) @(negedge clk);
      end
      check(seen == sent, $sformatf("%0d code words for %0d requests", seen, sent));
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
    done_flag = '{0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (done_flag[0] && done_flag[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
