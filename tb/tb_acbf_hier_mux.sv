// tb_acbf_hier_mux: random partition outputs and drive flags; for every
// select value the multiplexer must return the addressed bit (0 when that
// partition is not driving) and its drive flag.
module tb_acbf_hier_mux;
  localparam int AW = 8;
  logic [2**AW-1:0] din, drive;
  logic [AW-1:0] sel;
  logic dout, dout_valid;
  int checks = 0, failures = 0;
  logic clk;

  acbf_hier_mux #(.ADDR_W(AW), .LOCAL_W(4)) dut (.din, .drive, .sel, .dout, .dout_valid);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int w = 0; w < 2**AW / 32; w++) begin
        din[w*32 +: 32]   = $urandom;
        drive[w*32 +: 32] = (r % 4 == 0) ? '1 : $urandom;
      end
      for (int s = 0; s < 2**AW; s++) begin
        sel = AW'(s);
        #1;
        checks++;
        if (dout_valid !== drive[s] || dout !== (din[s] & drive[s])) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d dout=%b valid=%b", s, dout, dout_valid);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
