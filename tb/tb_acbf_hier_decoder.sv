// tb_acbf_hier_decoder: exhaustive test of the 8-to-256 hierarchical decoder
// with the enable on and off: exactly the addressed line must be 1.
module tb_acbf_hier_decoder;
  localparam int AW = 8;
  logic en;
  logic [AW-1:0] addr;
  logic [2**AW-1:0] dec_out;
  int checks = 0, failures = 0;
  logic clk;

  acbf_hier_decoder #(.ADDR_W(AW)) dut (.en, .addr, .dec_out);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 2**AW; a++) begin
        en = e[0]; addr = AW'(a);
        #1;
        for (int k = 0; k < 2**AW; k++) begin
          checks++;
          if (dec_out[k] !== (e == 1 && k == a)) begin
            failures++;
            if (failures < 10) $display("FAIL en=%0d addr=%0d line %0d = %b", e, a, k, dec_out[k]);
          end
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
