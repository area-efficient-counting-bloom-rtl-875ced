// acbf_predec2to4: 2:4 predecoder with active-low outputs, the building block
// of the hierarchical decoder's pre-decode stage.
//
// Output n_out[i] is 0 when en is 1 and a == i, otherwise 1 (a NAND-style
// decoder). Active-low outputs let the following local decoder use NOR gates,
// the NAND-NOR pairing the design chooses for low power. The enable input is
// this implementation's way of turning the whole decoder off. Purely
// combinational.
module acbf_predec2to4 (
  input  logic       en,
  input  logic [1:0] a,
  output logic [3:0] n_out
);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      n_out[i] = ~(en & (a == 2'(i)));
    end
  end

endmodule
