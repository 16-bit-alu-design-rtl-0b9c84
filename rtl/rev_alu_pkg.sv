// rev_alu_pkg: constants shared by the reversible ALU modules.
// Quantum costs of the gate types (number of V, V+ and CNOT primitives) as the
// document states them, and the per-slice gate budget of this design's bit
// slice: how many gates of each type it uses, how many constant inputs it
// ties off and how many garbage outputs it leaves. The slice figures are
// properties of this design's own gate arrangement, not the document's.
package rev_alu_pkg;
  // Quantum cost per gate type.
  localparam int unsigned QC_NOT     = 0;
  localparam int unsigned QC_FEYNMAN = 1;
  localparam int unsigned QC_TOFFOLI = 5;
  localparam int unsigned QC_PERES   = 4;
  localparam int unsigned QC_FREDKIN = 5;
  localparam int unsigned QC_DPG     = 6;

  // Gates in one ALU bit slice.
  localparam int unsigned SLICE_FEYNMAN = 7;
  localparam int unsigned SLICE_FREDKIN = 5;
  localparam int unsigned SLICE_TOFFOLI = 1;
  localparam int unsigned SLICE_DPG     = 1;
  localparam int unsigned SLICE_NOT     = 1;

  localparam int unsigned SLICE_QUANTUM_COST =
      SLICE_FEYNMAN * QC_FEYNMAN + SLICE_FREDKIN * QC_FREDKIN +
      SLICE_TOFFOLI * QC_TOFFOLI + SLICE_DPG * QC_DPG + SLICE_NOT * QC_NOT;

  // Constant inputs and garbage outputs of one slice.
  localparam int unsigned SLICE_CONST_INPUTS = 6;
  localparam int unsigned SLICE_GARBAGE      = 7;
endpackage
