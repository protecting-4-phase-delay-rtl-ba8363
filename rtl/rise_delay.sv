// Asymmetric delay element: a rising edge on `a` appears on `y` DELAY cycles
// later (provided `a` stays high), a falling edge passes at once.
//
// The link's matched delays (Delta_req, Delta_ack) only need to delay the
// edge that announces valid data; the return-to-zero edge carries no data and
// is not delayed. DELAY = 0 makes the element a wire.
module rise_delay #(
  parameter int unsigned DELAY = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  output logic y
);

  if (DELAY == 0) begin : g_wire
    assign y = a;
  end else begin : g_count
    localparam int unsigned CW = $clog2(DELAY + 1);
    logic [CW-1:0] cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                    cnt <= '0;
      else if (!a)                   cnt <= '0;
      else if (cnt != CW'(DELAY))    cnt <= cnt + 1'b1;
    end
    assign y = a && (cnt == CW'(DELAY));
  end

endmodule
