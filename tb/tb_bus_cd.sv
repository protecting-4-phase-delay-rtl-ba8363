// Testbench for bus_cd on the 8-bit 3-of-6 bus (two 3-of-6 detectors and a
// 1-of-4 detector joined by a C gate): the rails of a random code word arrive
// one at a time in random order; done must stay low until the last rail has
// arrived and rise within three cycles after it. During the spacer the rails
// fall one at a time; done must stay high until the last one has fallen and
// then drop within three cycles.
module tb_bus_cd;
  import ftdi_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] rails;
  logic done;
  int checks = 0, failures = 0;

  bus_cd #(.DATA_W(8), .CODE(CODE_3OF6)) dut (.clk(clk), .rst_n(rst_n), .rails(rails), .done(done));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [127:0] e;
    logic [15:0] word;
    rails = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      e = ref_bus(64'($urandom), 8, 1'b1, n);
      word = e[15:0];
      while (rails != word) begin
        int i;
        i = $urandom_range(15);
        if (word[i] && !rails[i]) begin
          rails[i] = 1'b1;
          repeat (3) @(posedge clk);
          #1;
          if (rails != word) check(!done, $sformatf("done early at %b", rails));
        end
      end
      check(done, $sformatf("done missing for %b", word));
      while (rails != 0) begin
        int i;
        i = $urandom_range(15);
        if (rails[i]) begin
          rails[i] = 1'b0;
          repeat (3) @(posedge clk);
          #1;
          if (rails != 0) check(done, "done dropped before spacer complete");
        end
      end
      check(!done, "done stuck after spacer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
