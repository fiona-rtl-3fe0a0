// puc: photonic-ALU unit controller of FIONA-V.
//
// The photonic core computes in the optical domain; this controller is its
// digital side. For a photonic instruction it
//   1. presents the operation and the operands to the DAC side (dac_valid,
//      held until dac_ready): vector a = VS1, vector b = VS2 and the MAT
//      weights, with every lane at or beyond vlen forced to zero so the
//      analogue side sees only the active elements;
//   2. waits for the digitised result (adc_valid with NELEM lanes);
//   3. captures it, and pulses done.
// The photonic operations, as the instruction table defines them, are
//   PO_DOTPROD (microring bank) : red = sum_i a[i]*b[i]  (lane 0 of the ADC word)
//   PO_MVMUL   (MZI mesh)       : y = MAT @ a
//   PO_CONV1D  (FIR)            : y = a convolved with b
// The arithmetic itself happens outside the FPGA; this block does not check it.
//
// Interface and timing: start (one cycle, while busy is low) latches the
// request; dac_valid rises the next cycle. The result is taken in the cycle
// adc_valid is high, and done is high the cycle after; y, wmask (lanes below
// vlen) and red hold until the next start. red is ADC lane 0 sign-extended.
// The latency is set by the analogue path, so it is not fixed here.
//
// The controller's role and the three operations follow the document; the
// handshake, the zeroing of inactive lanes and the result format are this
// design's.
module puc
  import fiona_pkg::*;
#(
  parameter int unsigned NELEM = fiona_pkg::FV_NELEM,
  parameter int unsigned EW    = fiona_pkg::FV_EW,
  parameter int unsigned MATN  = fiona_pkg::FV_MATN,
  localparam int unsigned VLW  = $clog2(NELEM+1)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start,
  input  pop_e                                 op,
  input  logic [NELEM-1:0][EW-1:0]             a,
  input  logic [NELEM-1:0][EW-1:0]             b,
  input  logic [MATN-1:0][MATN-1:0][EW-1:0]    mat,
  input  logic [VLW-1:0]                       vlen,
  output logic                                 busy,
  output logic                                 done,
  output logic [NELEM-1:0][EW-1:0]             y,
  output logic [NELEM-1:0]                     wmask,
  output logic [31:0]                          red,
  // DAC side (operands to the photonic core)
  output logic                                 dac_valid,
  input  logic                                 dac_ready,
  output pop_e                                 dac_op,
  output logic [NELEM-1:0][EW-1:0]             dac_a,
  output logic [NELEM-1:0][EW-1:0]             dac_b,
  output logic [MATN-1:0][MATN-1:0][EW-1:0]    dac_mat,
  // ADC side (results from the photonic core)
  input  logic                                 adc_valid,
  input  logic [NELEM-1:0][EW-1:0]             adc_data
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT, S_DONE} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      dac_op  <= PO_DOTPROD;
      dac_a   <= '0;
      dac_b   <= '0;
      for (int r = 0; r < MATN; r++) dac_mat[r] <= '0;
      y       <= '0;
      wmask   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          dac_op  <= op;
          dac_mat <= mat;
          for (int i = 0; i < NELEM; i++) begin
            dac_a[i] <= (i < int'(vlen)) ? a[i] : '0;
            dac_b[i] <= (i < int'(vlen)) ? b[i] : '0;
            wmask[i] <= (i < int'(vlen));
          end
          state <= S_SEND;
        end
        S_SEND: if (dac_ready) state <= S_WAIT;
        S_WAIT: if (adc_valid) begin
          y     <= adc_data;
          state <= S_DONE;
        end
        default: state <= S_IDLE;   // S_DONE
      endcase
    end
  end

  assign dac_valid = (state == S_SEND);
  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign red       = 32'(signed'(y[0]));

endmodule
