// Completion detector of the whole DI bus.
//
// Every block has its own detector (3-of-6 sorting network, 2-of-5 group
// detector, or an OR for the 1-of-n remainder and check blocks); a C gate
// joins them. done rises when every block holds a complete code word and
// falls when every block has returned to the spacer.
// Latency: one clk cycle for the C gate, plus one inside m-of-n detectors.
module bus_cd
  import ftdi_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter di_code_e    CODE   = CODE_3OF6,
  localparam int unsigned RAILS = total_rails(DATA_W, CODE)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RAILS-1:0] rails,
  output logic             done
);

  localparam int unsigned N     = blk_n(CODE);
  localparam int unsigned NFULL = n_full(DATA_W, CODE);
  localparam int unsigned REM   = rem_bits(DATA_W, CODE);
  localparam int unsigned DR    = data_rails(DATA_W, CODE);
  localparam int unsigned NCD   = NFULL + ((REM != 0) ? 1 : 0) + 1;

  logic [NCD-1:0] blk_done;

  for (genvar i = 0; i < NFULL; i++) begin : g_blk
    if (CODE == CODE_3OF6) begin : g_36
      cd_3of6 u_cd (.clk(clk), .rst_n(rst_n), .x(rails[i*N +: N]), .done(blk_done[i]));
    end else begin : g_25
      cd_2of5 u_cd (.clk(clk), .rst_n(rst_n), .x(rails[i*N +: N]), .done(blk_done[i]));
    end
  end

  if (REM != 0) begin : g_rem
    cd_1ofn #(.N(1 << REM)) u_cd (.x(rails[NFULL*N +: (1 << REM)]), .done(blk_done[NFULL]));
  end

  cd_1ofn #(.N(CHECK_RAILS)) u_cd_chk (.x(rails[DR +: CHECK_RAILS]), .done(blk_done[NCD-1]));

  c_element #(.N(NCD), .INIT(1'b0)) u_join (.clk(clk), .rst_n(rst_n), .in(blk_done), .q(done));

endmodule
