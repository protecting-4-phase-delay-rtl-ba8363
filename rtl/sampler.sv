// Sampler (version B by default, version A selectable): captures the DI input and resamples until the error
// detection reports a fault-free snapshot.
//
// s = 1 starts sampling: trg rises at once (the input register captures on
// that edge). Delta_ED cycles later the error signal of the decoding logic is
// sampled. Error: trg is pulled low for Delta_P cycles and rises again, which
// takes a fresh snapshot, and the wait starts over. No error: c rises and
// trg stays high. s = 0 clears c and trg (asynchronous clear of the flip-flop
// holding c in the circuit). During the Delta_ED wait trg stays high; this is
// what separates version B from version A, whose trg is a short pulse.
// The error input must be valid DELTA_ED cycles after trg rises.
//
// VERSION_B = 0 gives version A instead. There, trg is a pulse of Delta_P
// cycles that starts the capture, and it is low during the rest of the
// Delta_ED wait. An error starts another pulse, and c rises with trg low.
// Error evaluation is again DELTA_ED cycles after the rising edge of trg,
// so DELTA_ED must exceed DELTA_P. The evaluated link uses version B.
module sampler #(
  parameter int unsigned DELTA_ED  = 6,
  parameter int unsigned DELTA_P   = 1,
  parameter bit          VERSION_B = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s,
  input  logic error,
  output logic trg,
  output logic c
);

  localparam int unsigned MAXD = (DELTA_ED > DELTA_P) ? DELTA_ED : DELTA_P;
  localparam int unsigned CW   = $clog2(MAXD + 1);

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,  // trg = 0, c = 0
    S_WAIT  = 2'd1,  // trg = 1 (version A: 0), error detection running
    S_PULSE = 2'd2,  // trg = 0 (version A: 1) for Delta_P: resample
    S_DONE  = 2'd3   // trg = 1 (version A: 0), c = 1
  } state_e;

  if (!VERSION_B && DELTA_ED <= DELTA_P) begin : g_bad_delta
    $error("sampler version A: DELTA_ED must exceed DELTA_P");
  end

  state_e        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else if (!s) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          state <= VERSION_B ? S_WAIT : S_PULSE;
          cnt   <= CW'(1);
        end
        S_WAIT: begin
          if (cnt >= CW'(DELTA_ED)) begin
            cnt <= CW'(1);
            if (error) state <= S_PULSE;
            else       state <= S_DONE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_PULSE: begin
          if (cnt >= CW'(DELTA_P)) begin
            state <= S_WAIT;
            // version A: the wait continues the count from the rise of trg
            cnt   <= VERSION_B ? CW'(1) : cnt + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Version B: trg is s AND the (inverted) resample pulse, as in the
  // circuit. Version A: trg is the pulse itself.
  assign trg = VERSION_B ? s && (state == S_WAIT || state == S_DONE)
                         : s && (state == S_PULSE);
  assign c   = s && (state == S_DONE);

endmodule
