// Testbench of the sampler, versions B and A.
//
// Three samplers run side by side from the same s and error inputs: the
// default one (version B, Delta_ED = 6, Delta_P = 1 cycles), a version B
// with Delta_ED = 3, Delta_P = 2, and a version A with Delta_ED = 6,
// Delta_P = 2. Each handshake raises s, lets the error input stay high for a
// random number of evaluations (0 to 3) and then waits for c. A cycle
// monitor per sampler checks that trg rises one cycle after s, that trg is
// high for exactly Delta_ED cycles before each evaluation, that every error
// produces one low pulse of exactly Delta_P cycles, that c rises only after
// an error-free evaluation and that s = 0 clears trg and c at once. Some
// handshakes drop s in the middle of the Delta_ED wait. For version A a
// separate monitor checks that trg is a pulse of exactly Delta_P cycles,
// that the next pulse (after an error) or c follows exactly Delta_ED
// cycles after the rise of the previous pulse, and that trg is low while c
// is high.
module tb_sampler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s = 0, error = 0;
  logic [2:0] trg, c;
  int checks = 0, failures = 0;
  int pulses [3];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  localparam int ED [2] = '{6, 3};
  localparam int P  [2] = '{1, 2};

  sampler u0 (.clk(clk), .rst_n(rst_n), .s(s), .error(error), .trg(trg[0]), .c(c[0]));
  sampler #(.DELTA_ED(3), .DELTA_P(2)) u1 (.clk(clk), .rst_n(rst_n), .s(s), .error(error), .trg(trg[1]), .c(c[1]));
  sampler #(.DELTA_ED(6), .DELTA_P(2), .VERSION_B(1'b0)) u2 (
    .clk(clk), .rst_n(rst_n), .s(s), .error(error), .trg(trg[2]), .c(c[2])
  );

  // version A monitor: since = cycles since the last rise of trg
  int since_a = 0, hi_a = 0;
  logic trg_pa = 0, c_pa = 0, s_pa = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (!s) check(!trg[2] && !c[2], "version A: s = 0 must clear trg and c");
      if (c[2]) check(!trg[2], "version A: trg must be low while c is high");
      if (s && !s_pa) since_a = -1;
      if (trg[2] && !trg_pa) begin
        if (since_a < 0) check(since_a == -1, "version A: first pulse of a handshake");
        else begin
          check(since_a == 6, $sformatf("version A: next pulse %0d cycles after the last, expected 6", since_a));
          pulses[2]++;
        end
        since_a = 0; hi_a = 0;
      end
      if (s && !trg[2] && trg_pa) check(hi_a == 2, $sformatf("version A: pulse %0d cycles, expected 2", hi_a));
      if (c[2] && !c_pa) check(since_a == 6, $sformatf("version A: c %0d cycles after the pulse, expected 6", since_a));
      if (trg[2]) hi_a++;
      if (since_a >= 0 || trg[2]) since_a++;
      trg_pa = trg[2]; c_pa = c[2]; s_pa = s;
    end
  end

  // cycle monitor, sampled between the rising edges
  for (genvar g = 0; g < 2; g++) begin : g_mon
    int hi = 0, lo = 0;
    logic trg_p = 0, c_p = 0, s_p = 0;
    always @(negedge clk) begin
      if (rst_n) begin
        if (!s) check(!trg[g] && !c[g], "s = 0 must clear trg and c");
        if (c[g]) check(trg[g], "trg must stay high while c is high");
        if (s && !s_p) begin hi = 0; lo = 0; end
        // first rise: one cycle after s
        if (s && s_p && !trg_p && trg[g] && hi == 0) check(lo == 1, "trg must rise one cycle after s");
        // a low pulse after an evaluation
        if (s && trg_p && !trg[g]) begin
          check(hi == ED[g], $sformatf("trg high %0d cycles before an evaluation, expected %0d", hi, ED[g]));
          pulses[g]++;
        end
        if (s && !trg_p && trg[g] && hi > 0) check(lo == P[g], $sformatf("pulse %0d cycles, expected %0d", lo, P[g]));
        if (s && c[g] && !c_p) check(hi == ED[g], $sformatf("c after %0d cycles of trg, expected %0d", hi, ED[g]));
        if (trg[g] && !trg_p) hi = 0;
        if (trg[g] && !c[g]) hi++;
        if (!trg[g]) begin if (trg_p || !s_p) lo = 0; lo++; end
        trg_p = trg[g]; c_p = c[g]; s_p = s;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    pulses = '{0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(trg == 3'b000 && c == 3'b000, "idle after reset");
    for (int t = 0; t < 300; t++) begin
      int nerr;
      int p0 [3];
      nerr = $urandom_range(0, 3);
      p0 = pulses;
      @(negedge clk);
      s = 1;
      error = (nerr > 0);
      if (t % 10 == 9) begin
        // abort in the middle of the wait
        repeat ($urandom_range(1, 2)) @(negedge clk);
        s = 0; error = 0;
        @(negedge clk);
        check(trg == 3'b000 && c == 3'b000, "abort clears trg and c");
        repeat (3) @(negedge clk);
        continue;
      end
      // the error input drops once each sampler has pulsed nerr times
      fork
        begin : drive_err
          while (error) begin
            @(negedge clk);
            if (pulses[0] - p0[0] >= nerr && pulses[1] - p0[1] >= nerr && pulses[2] - p0[2] >= nerr)
              error = 0;
          end
        end
      join_none
      while (c != 3'b111) @(negedge clk);
      disable fork;
      error = 0;
      check(pulses[0] - p0[0] == nerr, $sformatf("sampler 0: %0d pulses, expected %0d", pulses[0] - p0[0], nerr));
      check(pulses[1] - p0[1] >= nerr, "sampler 1: too few pulses");
      check(pulses[2] - p0[2] == nerr, $sformatf("version A: %0d pulses, expected %0d", pulses[2] - p0[2], nerr));
      repeat ($urandom_range(0, 4)) @(negedge clk);
      check(c == 3'b111 && trg == 3'b011, "c holds until s falls");
      s = 0;
      @(negedge clk);
      check(trg == 3'b000 && c == 3'b000, "s = 0 clears trg and c");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
