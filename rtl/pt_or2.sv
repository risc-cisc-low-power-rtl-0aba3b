// pt_or2: two-transistor transfer-gate OR.
//
// The cell has one pMOS and one nMOS whose gates are both driven by in1.
// When in1 is low the pMOS conducts and passes in0 to out; when in1 is high
// the nMOS conducts and passes in1 itself, a logic 1, to out. The result is
// out = in0 OR in1 with two transistors. Passing a 1 through the nMOS is what
// gives the short spike seen in the analogue simulation of the cell; a
// restoring buffer after the gate removes it. That analogue effect is not
// modelled here.
//
// Interface: in0, in1 in; out out. Purely combinational.
// The pin names and the two-transistor cell follow the layout of the document;
// the connection of each diffusion is taken from the usual transfer-gate OR.
module pt_or2 (
  input  logic in0,
  input  logic in1,
  output logic out
);

  always_comb begin
    if (in1) out = in1;   // nMOS on: pass in1 (= 1)
    else     out = in0;   // pMOS on: pass in0
  end

endmodule
