// nlu: non-linear activation unit of FIONA-V (the NLU instruction group).
//
//   PRELU.V   : y[i] = a[i] >= 0 ? a[i] : (alpha * a[i]) >>> FRAC
//   SIGMOID.V : y[i] = sigmoid(a[i])
//   TANH.V    : y[i] = tanh(a[i])
// for the lanes below vlen (wmask), a = VS1, alpha = RS2 (low EW bits). All
// values are signed fixed point with FRAC fraction bits.
//
// The sigmoid is the four-segment piecewise-linear PLAN approximation, which
// needs only shifts and adds (|x| = absolute value, 1 = 1.0):
//   |x| >= 5          : 1
//   2.375 <= |x| < 5  : |x|/32 + 0.84375
//   1 <= |x| < 2.375  : |x|/8  + 0.625
//   |x| < 1           : |x|/4  + 0.5
// and sigmoid(x) = 1 - sigmoid(|x|) for x < 0 (largest error about 0.019).
// tanh uses tanh(x) = 2*sigmoid(2x) - 1 on the same circuit.
//
// Purely combinational, all NELEM lanes in parallel. FRAC must be at least 5
// so the segment constants are exact. The three functions and the PReLU
// parameter come from the document's instruction table; the approximation,
// the number format and the lane-parallel structure are this design's.
module nlu
  import fiona_pkg::*;
#(
  parameter int unsigned NELEM = fiona_pkg::FV_NELEM,
  parameter int unsigned EW    = fiona_pkg::FV_EW,
  parameter int unsigned FRAC  = fiona_pkg::FV_FRAC,
  localparam int unsigned VLW  = $clog2(NELEM+1)
) (
  input  nlu_op_e                   op,
  input  logic [NELEM-1:0][EW-1:0]  a,
  input  logic [EW-1:0]             alpha,
  input  logic [VLW-1:0]            vlen,
  output logic [NELEM-1:0][EW-1:0]  y,
  output logic [NELEM-1:0]          wmask
);

  localparam int unsigned XW = EW + 2;   // room for 2x and its magnitude

  localparam logic [XW-1:0] ONE   = XW'(1) << FRAC;
  localparam logic [XW-1:0] T5    = XW'(5) << FRAC;         // 5.0
  localparam logic [XW-1:0] T2375 = XW'(19) << (FRAC - 3);  // 2.375
  localparam logic [XW-1:0] C0844 = XW'(27) << (FRAC - 5);  // 0.84375
  localparam logic [XW-1:0] C0625 = XW'(5) << (FRAC - 3);   // 0.625
  localparam logic [XW-1:0] C05   = XW'(1) << (FRAC - 1);   // 0.5

  // PLAN sigmoid of a signed XW-bit fixed-point value; result in 0..ONE
  function automatic logic [XW-1:0] sigmoid_plan(input logic signed [XW-1:0] x);
    logic [XW-1:0] m, p;
    m = x[XW-1] ? XW'(-x) : XW'(x);
    if (m >= T5)         p = ONE;
    else if (m >= T2375) p = (m >> 5) + C0844;
    else if (m >= ONE)   p = (m >> 3) + C0625;
    else                 p = (m >> 2) + C05;
    return x[XW-1] ? ONE - p : p;
  endfunction

  logic signed [XW-1:0]   x, x2, s1, s2;
  logic signed [2*EW-1:0] pr;

  always_comb begin
    for (int i = 0; i < NELEM; i++) begin
      x  = XW'(signed'(a[i]));
      x2 = x <<< 1;
      pr = signed'(a[i]) * signed'(alpha);
      s1 = sigmoid_plan(x);
      s2 = sigmoid_plan(x2);
      unique case (op)
        NL_PRELU:   y[i] = a[i][EW-1] ? EW'(pr >>> FRAC) : a[i];
        NL_SIGMOID: y[i] = EW'(s1);
        default:    y[i] = EW'((s2 <<< 1) - signed'(ONE));   // NL_TANH
      endcase
      wmask[i] = (i < int'(vlen));
    end
  end

endmodule
