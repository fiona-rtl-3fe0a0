// ealu: the electronic arithmetic unit of FIONA-V.
//
// Executes the element-wise instructions
//   ADD.V  : y[i] = a[i] + b[i]      SUB.V  : y[i] = a[i] - b[i]
//   ADD.VS : y[i] = a[i] + s         SUB.VS : y[i] = a[i] - s
// on all NELEM lanes in parallel, where a = VS1, b = VS2 and s = RS2. wmask
// marks the lanes below vlen, the ones the instruction may write; lanes at or
// beyond vlen are computed but not written.
//
// Purely combinational: the result is valid in the cycle the operands are.
// Elements are two's-complement EW-bit values; sums wrap modulo 2^EW. Adding a
// Q-format scalar to a Q-format element needs no shift, so the unit is
// independent of the fraction width. The operations follow the document's
// instruction table; wrap-around overflow and the lane-parallel structure are
// this design's choices.
module ealu
  import fiona_pkg::*;
#(
  parameter int unsigned NELEM = fiona_pkg::FV_NELEM,
  parameter int unsigned EW    = fiona_pkg::FV_EW,
  localparam int unsigned VLW  = $clog2(NELEM+1)
) (
  input  ealu_op_e                  op,
  input  logic [NELEM-1:0][EW-1:0]  a,
  input  logic [NELEM-1:0][EW-1:0]  b,
  input  logic [EW-1:0]             s,
  input  logic [VLW-1:0]            vlen,
  output logic [NELEM-1:0][EW-1:0]  y,
  output logic [NELEM-1:0]          wmask
);

  always_comb begin
    for (int i = 0; i < NELEM; i++) begin
      unique case (op)
        EA_ADDV:  y[i] = a[i] + b[i];
        EA_SUBV:  y[i] = a[i] - b[i];
        EA_ADDVS: y[i] = a[i] + s;
        default:  y[i] = a[i] - s;     // EA_SUBVS
      endcase
      wmask[i] = (i < int'(vlen));
    end
  end

endmodule
