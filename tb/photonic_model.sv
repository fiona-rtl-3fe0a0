// photonic_model: behavioural model of the photonic core together with its
// DAC and ADC, as seen from the FPGA. Not for synthesis.
//
// It accepts an operation on the DAC side (dac_valid/dac_ready, ready held
// low on random cycles when the run-time copy STALLS_rt of STALLS is set), waits LATENCY cycles for the analogue
// path, and returns NELEM 16-bit ADC samples with adc_valid for one cycle.
// The optics are modelled as exact fixed-point arithmetic (FRAC fraction
// bits), each output saturated to the signed 16-bit ADC range:
//   dot product (microring bank): lane 0 = sum a[i]*b[i], other lanes 0
//   matrix-vector (MZI mesh)    : lane r = sum_c mat[r][c]*a[c]
//   convolution (FIR)           : lane i = sum_{k<=i} b[k]*a[i-k]
// Device noise and the DAC/ADC resolution are not modelled. n_ops counts the
// operations served.
module photonic_model #(
  parameter int NELEM   = 32,
  parameter int MATN    = 32,
  parameter int FRAC    = 8,
  parameter int LATENCY = 4,
  parameter bit STALLS  = 1'b1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              dac_valid,
  output logic                              dac_ready,
  input  fiona_pkg::pop_e                   dac_op,
  input  logic [NELEM-1:0][15:0]            dac_a,
  input  logic [NELEM-1:0][15:0]            dac_b,
  input  logic [MATN-1:0][MATN-1:0][15:0]   dac_mat,
  output logic                              adc_valid,
  output logic [NELEM-1:0][15:0]            adc_data
);
  int busy_cnt;
  int n_ops;
  bit STALLS_rt = STALLS;
  logic [NELEM-1:0][15:0] result;

  function automatic logic [15:0] sat(longint v);
    v = v >>> FRAC;
    if (v > 32767) return 16'h7fff;
    if (v < -32768) return 16'h8000;
    return 16'(v);
  endfunction

  function automatic longint sx(logic [15:0] v);
    return longint'(signed'(v));
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      dac_ready <= 1'b0;
      adc_valid <= 1'b0;
      adc_data  <= '0;
      busy_cnt  <= 0;
      n_ops     <= 0;
    end else begin
      adc_valid <= 1'b0;
      if (dac_valid && dac_ready) begin
        longint acc;
        result = '0;
        unique case (dac_op)
          fiona_pkg::PO_DOTPROD: begin
            acc = 0;
            for (int i = 0; i < NELEM; i++) acc += sx(dac_a[i]) * sx(dac_b[i]);
            result[0] = sat(acc);
          end
          fiona_pkg::PO_MVMUL:
            for (int r = 0; r < NELEM && r < MATN; r++) begin
              acc = 0;
              for (int c = 0; c < NELEM && c < MATN; c++) acc += sx(dac_mat[r][c]) * sx(dac_a[c]);
              result[r] = sat(acc);
            end
          default:
            for (int i = 0; i < NELEM; i++) begin
              acc = 0;
              for (int k = 0; k <= i; k++) acc += sx(dac_b[k]) * sx(dac_a[i-k]);
              result[i] = sat(acc);
            end
        endcase
        busy_cnt <= LATENCY;
        n_ops    <= n_ops + 1;
      end else if (busy_cnt > 0) begin
        busy_cnt <= busy_cnt - 1;
        if (busy_cnt == 1) begin
          adc_valid <= 1'b1;
          adc_data  <= result;
        end
      end
      dac_ready <= (busy_cnt == 0) && !(dac_valid && dac_ready) &&
                   (STALLS_rt ? ($urandom_range(0, 2) != 0) : 1'b1);
    end
  end
endmodule
