// pt_and2: two-transistor transfer-gate AND.
//
// The cell has one nMOS and one pMOS whose gates are both driven by in1.
// When in1 is high the nMOS conducts and passes in0 to out; when in1 is low
// the pMOS conducts and passes in1 itself, a logic 0, to out. The result is
// out = in0 AND in1 with two transistors instead of the six of a static CMOS
// AND. The cell has no supply connection: out is driven from the inputs.
// At RTL this is a 2:1 selection on in1, which is what the cell does; the
// weak levels of a pass transistor (a 1 through the nMOS) are not modelled.
//
// Interface: in0, in1 in; out out. Purely combinational.
// The pin names and the two-transistor cell follow the layout of the document;
// which diffusion connects to which input is taken from the usual
// transfer-gate AND, as the layout does not label it.
module pt_and2 (
  input  logic in0,
  input  logic in1,
  output logic out
);

  always_comb begin
    if (in1) out = in0;   // nMOS on: pass in0
    else     out = in1;   // pMOS on: pass in1 (= 0)
  end

endmodule
