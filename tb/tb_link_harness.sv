// Test environment for one ft_di_link instance (used by the link testbenches).
//
// Sender: NWORDS random payloads (the first ones 0x00) over the 4-phase
// bundled-data input. Wires: every rail and the acknowledge get their own
// delay of 2 to 4 clk cycles, sometimes one slow wire of 8 cycles (new
// delays whenever the bus is idle), so rails arrive in any order. Faults: with probability FAULT_PCT per word one rail
// is inverted for 1 to 16 cycles at a random moment of the transfer (at most
// one transient fault per word, the link's fault hypothesis). Consumer:
// acknowledges after 0 to 5 cycles, sometimes after 30 (back-pressure).
//
// Checks: every payload arrives once, unchanged and in order; each
// mechanism of the link happened at least once: resampling after a check
// block error, after a decode error (3-of-6 only), capture of an invalid
// word, a fault that left the payload intact, and consumer back-pressure.
// Also counted: the rail transitions of all transfers, which give the
// transitions per data bit (P) of the comparison table, and the bus width.
// The results are left in `checks`, `failures` and `finished`.
module tb_link_harness
  import ftdi_pkg::*;
#(
  parameter int unsigned DATA_W    = 8,
  parameter di_code_e    CODE      = CODE_3OF6,
  parameter int unsigned NWORDS    = 400,
  parameter int unsigned FAULT_PCT = 60,
  parameter int unsigned DELTA_ED  = 6,
  // expected bus size and transitions per data bit (times 100, rounded as
  // in the comparison table of the coding scheme); 0 skips the check
  parameter int unsigned EXP_RAILS = 0,
  parameter int unsigned EXP_P100  = 0,
  // transmitter: AND masking (0) or D flip-flop (1) with its controller
  parameter bit          TX_DFF    = 1'b0,
  parameter bit          RX_DUAL   = 1'b0,
  parameter bit          SMP_B     = 1'b1,
  parameter bit          CTRL_ADV  = 1'b0,
  parameter bit          DFF_ADV   = 1'b1,
  parameter bit          DFF_RST_B = 1'b1
) (
  input logic clk,
  input logic rst_n
);
  import tb_ref_pkg::*;

  localparam int unsigned RAILS = total_rails(DATA_W, CODE);
  localparam int unsigned K     = blk_k(CODE);
  localparam int unsigned N     = blk_n(CODE);
  localparam int unsigned NFULL = n_full(DATA_W, CODE);

  logic [DATA_W-1:0] tx_data, rx_data;
  logic tx_req = 0, tx_ack, rx_req, rx_ack = 0;
  logic [RAILS-1:0] dibus_tx, dibus_rx;
  logic dibus_ack, dibus_ack_tx;

  ft_di_link #(.DATA_W(DATA_W), .CODE(CODE), .DELTA_ED(DELTA_ED), .TX_DFF(TX_DFF), .RX_DUAL(RX_DUAL), .RX_SAMPLER_B(SMP_B), .RX_CTRL_ADV(CTRL_ADV),
              .DFF_ADVANCED(DFF_ADV), .DFF_RST_VER_B(DFF_RST_B), .DFF_DELTA_RST(DFF_RST_B ? 1 : 2)) dut (
    .clk(clk), .rst_n(rst_n),
    .tx_data(tx_data), .tx_req(tx_req), .tx_ack(tx_ack),
    .dibus_tx(dibus_tx), .dibus_ack_tx(dibus_ack_tx),
    .dibus_rx(dibus_rx), .dibus_ack(dibus_ack),
    .rx_data(rx_data), .rx_req(rx_req), .rx_ack(rx_ack)
  );

  int checks = 0, failures = 0;
  bit finished = 0;
  int n_resample = 0, n_check_err = 0, n_decode_err = 0, n_invalid = 0;
  int n_fault_words = 0, n_stall = 0, n_sent = 0, n_recv = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL[%0d bit]: %s", DATA_W, msg); end
  endtask

  // ---------------- wires with per-rail delay and one transient fault ------
  logic [7:0] hist [RAILS] = '{default: '0};
  int         dly  [RAILS];
  logic [3:0] ack_hist = '0;
  int         ack_dly = 2;
  logic [RAILS-1:0] fault = '0;
  bit hold_dly = 1;   // keeps the delays of the directed first transfers

  always_ff @(posedge clk) begin
    for (int i = 0; i < RAILS; i++) hist[i] <= {hist[i][6:0], dibus_tx[i]};
    ack_hist <= {ack_hist[2:0], dibus_ack};
  end
  always_comb begin
    for (int i = 0; i < RAILS; i++) dibus_rx[i] = hist[i][dly[i]-1] ^ fault[i];
    dibus_ack_tx = ack_hist[ack_dly-1];
  end

  // new delays while nothing is in flight
  always @(posedge clk) begin
    bit idle;
    idle = (dibus_tx == '0) && !dibus_ack && (ack_hist == '0);
    for (int i = 0; i < RAILS; i++) if (hist[i] != '0) idle = 0;
    if (idle && !hold_dly && $urandom_range(3) == 0) begin
      for (int i = 0; i < RAILS; i++) dly[i] = $urandom_range(2, 4);
      // now and then one slow wire, so that a word can be captured before
      // all of its rails have arrived
      if ($urandom_range(3) == 0) dly[$urandom_range(RAILS - 1)] = 8;
      ack_dly = $urandom_range(1, 3);
    end
  end

  // ---------------- sender ----------------
  logic [DATA_W-1:0] sent_q [$];
  initial begin
    for (int i = 0; i < RAILS; i++) dly[i] = 2;
    tx_data = '0;
    @(posedge rst_n);
    repeat (3) @(posedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      logic [DATA_W-1:0] v;
      v = DATA_W'({$urandom, $urandom});
      if (w < 8) begin
        // 0x00 sends 111000 on block 0; its rail 4 is made slow so that a
        // fault on rail 0 or 1 is captured as 101001 or 101010
        v = '0;
        for (int i = 0; i < RAILS; i++) dly[i] = 2;
        if (N == 6) dly[4] = 8;
      end
      hold_dly = (w < 8);
      tx_data <= v;
      tx_req  <= 1'b1;
      sent_q.push_back(v);
      n_sent++;
      if (FAULT_PCT != 0 && $urandom_range(99) < FAULT_PCT) inject_fault(w);
      while (!tx_ack) @(posedge clk);
      tx_req <= 1'b0;
      while (tx_ack) @(posedge clk);
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
  end

  // One rail inverted for a while, starting at a random point of this word.
  task automatic inject_fault(int w);
    fork
      begin
        int rail, start, len;
        // the first words repeat the three classic cases on block 0
        rail  = (w < 8) ? (w % 2) : $urandom_range(RAILS - 1);
        start = (w < 8) ? 0 : $urandom_range(0, 14);
        len   = (w < 8) ? 10 : $urandom_range(1, 16);
        n_fault_words++;
        // directed cases: the fault starts when the transmitter drives the word
        if (w < 8) while (dibus_tx == '0) @(posedge clk);
        repeat (start) @(posedge clk);
        fault[rail] <= 1'b1;
        repeat (len) @(posedge clk);
        fault[rail] <= 1'b0;
      end
    join_none
  endtask

  // ---------------- consumer ----------------
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (rx_req && !rx_ack) begin
        int wait_c;
        logic [DATA_W-1:0] exp;
        check(sent_q.size() > 0, "word received that was never sent");
        exp = (sent_q.size() > 0) ? sent_q.pop_front() : '0;
        check(rx_data == exp, $sformatf("received %h expected %h", rx_data, exp));
        n_recv++;
        wait_c = ($urandom_range(9) == 0) ? 30 : $urandom_range(0, 5);
        if (wait_c == 30) n_stall++;
        repeat (wait_c) @(posedge clk);
        rx_ack <= 1'b1;
        while (rx_req) @(posedge clk);
        rx_ack <= 1'b0;
        if (n_recv == NWORDS) begin
          repeat (20) @(posedge clk);
          report();
        end
      end
    end
  end

  // ---------------- rail transitions at the transmitter ----------------
  logic [RAILS-1:0] tx_p = '0;
  longint n_trans = 0;
  always @(negedge clk) begin
    n_trans += $countones(dibus_tx ^ tx_p);
    tx_p = dibus_tx;
  end

  // ---------------- mechanism counters (observation only) ----------------
  // sampled on the falling edge, where all registered signals are stable
  // m_snap: for the base receiver, the rails its input register takes at
  // the next rising edge after trg rose; for the dual-use receiver, the
  // latch contents, closed at the edge where trg rose.
  logic [1:0] m_state;
  int         m_cnt;
  logic       m_err, m_cerr, m_derr, m_trg, m_trg_q = 1'b0;
  logic [RAILS-1:0] m_snap;
  if (RX_DUAL) begin : g_mon_dual
    assign m_state = dut.g_rx_dual.u_rx.u_smp.state;
    assign m_cnt   = int'(dut.g_rx_dual.u_rx.u_smp.cnt);
    assign m_err   = dut.g_rx_dual.u_rx.error;
    assign m_cerr  = dut.g_rx_dual.u_rx.checkblock_error;
    assign m_derr  = dut.g_rx_dual.u_rx.decode_error;
    assign m_trg   = dut.g_rx_dual.u_rx.trg;
    assign m_snap  = dut.g_rx_dual.u_rx.latch_q;
  end else begin : g_mon_base
    assign m_state = dut.g_rx_base.u_rx.u_smp.state;
    assign m_cnt   = int'(dut.g_rx_base.u_rx.u_smp.cnt);
    assign m_err   = dut.g_rx_base.u_rx.error;
    assign m_cerr  = dut.g_rx_base.u_rx.checkblock_error;
    assign m_derr  = dut.g_rx_base.u_rx.decode_error;
    assign m_trg   = dut.g_rx_base.u_rx.trg;
    assign m_snap  = dibus_rx;
  end
  always @(posedge clk) m_trg_q <= m_trg;

  always @(negedge clk) begin
    if (rst_n && m_state == 2'd1 && m_cnt >= DELTA_ED) begin
      if (m_err) n_resample++;
      if (m_cerr) n_check_err++;
      if (m_derr) n_decode_err++;
    end
    if (rst_n && m_trg && !m_trg_q) begin
      // a data block of the snapshot that is not a code word of its block code
      for (int b = 0; b < NFULL; b++) begin
        if ($countones(m_snap[b*N +: N]) != ((CODE == CODE_3OF6) ? 3 : 2)) n_invalid++;
      end
    end
  end

  task automatic report();
    check(sent_q.size() == 0, "words lost");
    check(n_recv == NWORDS, "word count");
    check(n_resample > 0, "no resampling happened");
    check(n_check_err > 0, "no check block error happened");
    if (CODE == CODE_3OF6) check(n_decode_err > 0, "no decode error (unused word) happened");
    check(n_invalid > 0, "no invalid word was captured");
    check(n_fault_words > 0, "no fault injected");
    check(n_stall > 0, "no consumer back-pressure");
    // every transfer: each rail of the code word rises and falls once
    check(n_trans == longint'(NWORDS) * 2 * (NFULL * ((CODE == CODE_3OF6) ? 3 : 2)
                                             + ((rem_bits(DATA_W, CODE) != 0) ? 1 : 0) + 1),
          $sformatf("%0d rail transitions", n_trans));
    if (EXP_RAILS != 0) check(RAILS == EXP_RAILS, $sformatf("%0d rails, expected %0d", RAILS, EXP_RAILS));
    if (EXP_P100 != 0) begin
      int p100;
      p100 = int'((n_trans * 100 + longint'(NWORDS) * DATA_W / 2) / (longint'(NWORDS) * DATA_W));
      check(p100 == EXP_P100, $sformatf("P = %0d/100 transitions per bit, expected %0d/100", p100, EXP_P100));
    end
    $display("SIZE[%0d bit %s]: rails=%0d transitions_per_bit=%0.3f", DATA_W, CODE.name(), RAILS,
             real'(n_trans) / (real'(NWORDS) * DATA_W));
    $display("MECH[%0d bit %s]: words=%0d faults=%0d resamples=%0d check_err=%0d decode_err=%0d invalid_captures=%0d stalls=%0d",
             DATA_W, CODE.name(), n_recv, n_fault_words, n_resample, n_check_err, n_decode_err, n_invalid, n_stall);
    finished = 1;
  endtask
endmodule
