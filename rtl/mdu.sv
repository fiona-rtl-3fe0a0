// mdu: multiply/divide unit of FIONA-V (MUL.VS and DIV.VS).
//
//   MUL.VS : y[i] = (a[i] * s) >>> FRAC
//   DIV.VS : y[i] = (a[i] << FRAC) / s      (quotient rounded toward zero)
// for i < vlen, with a = VS1, s = RS2 (low EW bits) and elements in signed
// fixed point with FRAC fraction bits. Results keep the low EW bits. Division
// by zero gives all ones, as RISC-V integer division does.
//
// The unit works through the elements one at a time, so it needs a single
// multiplier and a single divider. A multiply takes one cycle per element; a
// divide runs a restoring shift-subtract loop of EW+FRAC cycles on magnitudes
// and spends one more cycle fixing the sign and storing the element.
//
// Interface and timing: a one-cycle start pulse while busy is low latches op,
// a, s and vlen. done pulses for one cycle when y is complete; y and wmask
// (lanes below vlen) then hold until the next start. Counting the start cycle
// as cycle 0, done is high in cycle vlen + 1 for MUL.VS and vlen*(EW+FRAC+1) + 1
// for DIV.VS (cycle 1 when vlen = 0).
//
// The document names the unit and its two instructions; the element-serial
// structure, the fixed-point scaling and the divide-by-zero result are this
// design's.
module mdu
  import fiona_pkg::*;
#(
  parameter int unsigned NELEM = fiona_pkg::FV_NELEM,
  parameter int unsigned EW    = fiona_pkg::FV_EW,
  parameter int unsigned FRAC  = fiona_pkg::FV_FRAC,
  localparam int unsigned VLW  = $clog2(NELEM+1),
  localparam int unsigned QW   = EW + FRAC
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  mdu_op_e                   op,
  input  logic [NELEM-1:0][EW-1:0]  a,
  input  logic [EW-1:0]             s,
  input  logic [VLW-1:0]            vlen,
  output logic                      busy,
  output logic                      done,
  output logic [NELEM-1:0][EW-1:0]  y,
  output logic [NELEM-1:0]          wmask
);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_DIV, S_DONE} state_e;
  state_e state;

  logic [NELEM-1:0][EW-1:0] a_q;
  logic [EW-1:0]            s_q;
  logic [VLW-1:0]           vlen_q;
  logic [VLW-1:0]           idx;
  logic [$clog2(QW+1)-1:0]  step;
  logic [EW-1:0]            rem;    // partial remainder
  logic [QW-1:0]            quo;    // dividend shifting out, quotient shifting in

  // current element and its product
  logic signed [EW-1:0]   ai;
  logic signed [2*EW-1:0] prod;
  logic [EW-1:0]          smag;
  logic                   qneg;
  logic [EW:0]            rem_sh;
  logic [EW-1:0]          qres;

  always_comb begin
    ai     = signed'(a_q[idx[VLW-2:0]]);
    prod   = ai * signed'(s_q);
    smag   = s_q[EW-1] ? EW'(-signed'(s_q)) : s_q;
    qneg   = ai[EW-1] ^ s_q[EW-1];
    rem_sh = {rem[EW-1:0], quo[QW-1]};
    qres   = qneg ? EW'(-quo) : EW'(quo);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_q   <= '0;
      s_q   <= '0;
      vlen_q <= '0;
      idx   <= '0;
      step  <= '0;
      rem   <= '0;
      quo   <= '0;
      y     <= '0;
      wmask <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          a_q    <= a;
          s_q    <= s;
          vlen_q <= vlen;
          idx    <= '0;
          step   <= '0;
          for (int i = 0; i < NELEM; i++) wmask[i] <= (i < int'(vlen));
          if (vlen == '0)        state <= S_DONE;
          else if (op == MD_MUL) state <= S_MUL;
          else begin
            state <= S_DIV;
            rem   <= '0;
            quo   <= QW'({a[0][EW-1] ? EW'(-signed'(a[0])) : a[0]}) << FRAC;
          end
        end
        S_MUL: begin
          y[idx[VLW-2:0]] <= EW'(prod >>> FRAC);
          idx <= idx + 1'b1;
          if (idx + 1'b1 == vlen_q) state <= S_DONE;
        end
        S_DIV: begin
          if (step != QW[$bits(step)-1:0]) begin
            // one restoring step: shift in the next dividend bit
            if (rem_sh >= {1'b0, smag}) begin
              rem <= EW'(rem_sh - {1'b0, smag});
              quo <= {quo[QW-2:0], 1'b1};
            end else begin
              rem <= EW'(rem_sh);
              quo <= {quo[QW-2:0], 1'b0};
            end
            step <= step + 1'b1;
          end
          if (step == QW[$bits(step)-1:0]) begin
            y[idx[VLW-2:0]] <= (smag == '0) ? '1 : qres;
            idx  <= idx + 1'b1;
            step <= '0;
            rem  <= '0;
            if (idx + 1'b1 == vlen_q) state <= S_DONE;
            else quo <= QW'(a_q[idx[VLW-2:0] + 1'b1][EW-1]
                            ? EW'(-signed'(a_q[idx[VLW-2:0] + 1'b1]))
                            : a_q[idx[VLW-2:0] + 1'b1]) << FRAC;
          end
        end
        default: state <= S_IDLE;   // S_DONE
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

endmodule
