// misc_unit: the MISC group of FIONA-V instructions.
//
//   SHUFFLE.V : y[i] = a[b[i]]         (a = VS1, b = VS2 holds the indices)
//   MAX.V     : red = max of a[i], i < vlen
//   MIN.V     : red = min of a[i], i < vlen
//
// A shuffle index uses the low $clog2(NELEM) bits of b[i], so every index
// selects a lane. The reductions compare signed EW-bit elements and return the
// winner sign-extended to the 32-bit scalar result; with vlen = 0 they return
// 0. wmask marks the lanes below vlen that SHUFFLE.V may write.
//
// Purely combinational. The reduction is a linear chain of compare-selects,
// which synthesis is free to rebalance. The operations follow the document's
// instruction table; index wrap-around, signed compare and the vlen = 0 result
// are this design's choices.
module misc_unit
  import fiona_pkg::*;
#(
  parameter int unsigned NELEM = fiona_pkg::FV_NELEM,
  parameter int unsigned EW    = fiona_pkg::FV_EW,
  localparam int unsigned VLW  = $clog2(NELEM+1),
  localparam int unsigned IW   = $clog2(NELEM)
) (
  input  misc_op_e                  op,
  input  logic [NELEM-1:0][EW-1:0]  a,
  input  logic [NELEM-1:0][EW-1:0]  b,
  input  logic [VLW-1:0]            vlen,
  output logic [NELEM-1:0][EW-1:0]  y,
  output logic [NELEM-1:0]          wmask,
  output logic [31:0]               red
);

  logic signed [EW-1:0] best;

  always_comb begin
    for (int i = 0; i < NELEM; i++) begin
      y[i]     = a[b[i][IW-1:0]];
      wmask[i] = (i < int'(vlen));
    end
    best = signed'(a[0]);
    for (int i = 1; i < NELEM; i++) begin
      if (i < int'(vlen)) begin
        if (op == MI_MIN) begin
          if (signed'(a[i]) < best) best = signed'(a[i]);
        end else begin
          if (signed'(a[i]) > best) best = signed'(a[i]);
        end
      end
    end
    red = (vlen == '0) ? '0 : 32'(best);
  end

endmodule
