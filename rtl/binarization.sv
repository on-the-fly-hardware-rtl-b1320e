// binarization: splits filtered pixels into background and target.
//
// A pixel brighter than the threshold T becomes white (1) and is a target
// candidate; any other pixel becomes black (0), deep-space background:
//   P'(r,c) = 1 if P(r,c) > T, else 0.
// The comparison is combinational, so the output has the timing of the input
// and runs in parallel with the histogram. T is supplied by the register
// bank, either written by the host or taken from the histogram of the
// previous frame (see reg_bank). The comparison follows the document; the source of T is this
// design's choice.
module binarization #(
  parameter int unsigned LUM_W = 8
) (
  input  logic [LUM_W-1:0] thr,
  input  logic             in_valid,
  input  logic [LUM_W-1:0] in_data,
  output logic             out_valid,
  output logic             out_bit
);
  always_comb begin
    out_valid = in_valid;
    out_bit   = in_data > thr;
  end
endmodule
