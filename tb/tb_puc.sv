// tb_puc: self-checking test of the photonic-ALU controller with
// photonic_model on its DAC/ADC ports.
//
// For random dot products, matrix-vector products and convolutions it checks
// that the operands reaching the DAC side are the inputs with lanes at or
// beyond vlen zeroed, that the matrix is passed unchanged, and that the
// captured result (y, wmask, and red for dot products) equals the result
// computed in the testbench. With a non-stalling model of latency L the
// operation must take L + 3 cycles from start to done.
module tb_puc;
  import fiona_pkg::*;
  localparam int NELEM = 32, EW = 16, MATN = 32, FRAC = 8, LAT = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  pop_e op;
  logic [NELEM-1:0][EW-1:0] a, b, y;
  logic [MATN-1:0][MATN-1:0][EW-1:0] mat;
  logic [5:0] vlen;
  logic [NELEM-1:0] wmask;
  logic [31:0] red;
  logic dac_valid, dac_ready, adc_valid;
  pop_e dac_op;
  logic [NELEM-1:0][EW-1:0] dac_a, dac_b, adc_data;
  logic [MATN-1:0][MATN-1:0][EW-1:0] dac_mat;
  int checks = 0, failures = 0;
  bit stalls_seen = 0;

  puc dut (.*);
  photonic_model #(.LATENCY(LAT)) u_ph (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] sat(longint v);
    v = v >>> FRAC;
    if (v > 32767) return 16'h7fff;
    if (v < -32768) return 16'h8000;
    return 16'(v);
  endfunction

  function automatic longint sx(logic [15:0] v);
    return longint'(signed'(v));
  endfunction

  initial begin
    start = 0; op = PO_DOTPROD; a = '0; b = '0; mat = '0; vlen = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [NELEM-1:0][EW-1:0] exp_y;
      int cyc;
      if (n == 150) u_ph.STALLS_rt = 1'b0;
      @(negedge clk);
      op = pop_e'(n % 3);
      for (int i = 0; i < NELEM; i++) begin a[i] = EW'($urandom_range(0, 1023) - 512); b[i] = EW'($urandom_range(0, 1023) - 512); end
      for (int r = 0; r < MATN; r++) for (int c = 0; c < MATN; c++) mat[r][c] = EW'($urandom_range(0, 511) - 256);
      vlen = (n < 3) ? 6'd0 : 6'($urandom_range(1, 32));
      // expected result
      exp_y = '0;
      if (op == PO_DOTPROD) begin
        automatic longint acc = 0;
        for (int i = 0; i < vlen; i++) acc += sx(a[i]) * sx(b[i]);
        exp_y[0] = sat(acc);
      end else if (op == PO_MVMUL) begin
        for (int r = 0; r < NELEM; r++) begin
          automatic longint acc = 0;
          for (int c = 0; c < vlen; c++) acc += sx(mat[r][c]) * sx(a[c]);
          exp_y[r] = sat(acc);
        end
      end else begin
        for (int i = 0; i < NELEM; i++) begin
          automatic longint acc = 0;
          for (int k = 0; k <= i; k++) if (k < vlen && i - k < vlen) acc += sx(b[k]) * sx(a[i-k]);
          exp_y[i] = sat(acc);
        end
      end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        if (dac_valid && !dac_ready) stalls_seen = 1;
        if (dac_valid) begin
          checks += 3;
          for (int i = 0; i < NELEM; i++)
            if (dac_a[i] !== ((i < vlen) ? a[i] : '0) || dac_b[i] !== ((i < vlen) ? b[i] : '0)) begin
              failures++; $display("operand lane %0d not masked right", i); break;
            end
          if (dac_mat !== mat) failures++;
          if (dac_op !== op) failures++;
        end
        @(negedge clk); cyc++;
      end
      checks += 3;
      if (y !== exp_y) begin failures++; if (failures < 10) $display("%s vlen %0d: result mismatch", op.name(), vlen); end
      for (int i = 0; i < NELEM; i++) if (wmask[i] !== (i < vlen)) begin failures++; break; end
      if (red !== 32'(signed'(exp_y[0]))) failures++;
      if (n >= 150) begin
        checks++;
        if (cyc != LAT + 3) begin failures++; $display("%s: %0d cycles, expected %0d", op.name(), cyc, LAT + 3); end
      end
    end
    checks++;
    if (!stalls_seen) begin failures++; $display("no DAC stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
