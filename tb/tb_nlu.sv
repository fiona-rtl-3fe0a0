// tb_nlu: self-checking test of the activation unit.
//
// PRELU.V is compared exactly with the product computed in the testbench.
// SIGMOID.V and TANH.V are compared with the exact functions ($exp, $tanh),
// evaluated in floating point: sigmoid must be within 0.025 of the true value
// (the approximation is good to about 0.019 plus truncation), tanh, which
// doubles that error, within 0.045; and the
// curve must not decrease as the input grows.
module tb_nlu;
  import fiona_pkg::*;
  localparam int NELEM = 32, EW = 16, FRAC = 8;
  nlu_op_e op;
  logic [NELEM-1:0][EW-1:0] a, y;
  logic [EW-1:0] alpha;
  logic [5:0] vlen;
  logic [NELEM-1:0] wmask;
  int checks = 0, failures = 0;

  nlu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fx(logic [EW-1:0] v);
    return real'(int'(signed'(v))) / real'(1 << FRAC);
  endfunction

  initial begin
    logic [EW-1:0] prev_s, prev_t;
    // sweep the whole input range for the smooth functions
    vlen = 6'd32;
    alpha = '0;
    prev_s = '0; prev_t = 16'h8000;
    for (int base = -32768; base < 32768; base += NELEM) begin
      logic [NELEM-1:0][EW-1:0] ys;
      for (int i = 0; i < NELEM; i++) a[i] = EW'(base + i);
      op = NL_SIGMOID; #1; ys = y;
      op = NL_TANH;    #1;
      for (int i = 0; i < NELEM; i++) begin
        real x, es, et;
        x  = fx(a[i]);
        es = 1.0 / (1.0 + $exp(-x));
        et = $tanh(x);
        checks += 4;
        if ((fx(ys[i]) - es) > 0.025 || (es - fx(ys[i])) > 0.025) begin
          failures++;
          if (failures < 10) $display("sigmoid(%f) = %f expected %f", x, fx(ys[i]), es);
        end
        if ((fx(y[i]) - et) > 0.045 || (et - fx(y[i])) > 0.045) begin
          failures++;
          if (failures < 10) $display("tanh(%f) = %f expected %f", x, fx(y[i]), et);
        end
        if (signed'(ys[i]) < signed'(prev_s)) failures++;
        if (signed'(y[i]) < signed'(prev_t)) failures++;
        prev_s = ys[i]; prev_t = y[i];
      end
    end
    // PReLU with random slopes and lengths
    op = NL_PRELU;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < NELEM; i++) a[i] = EW'($urandom());
      alpha = EW'($urandom_range(0, 512));
      vlen = 6'($urandom_range(0, 32));
      #1;
      for (int i = 0; i < NELEM; i++) begin
        int v, e;
        v = int'(signed'(a[i]));
        e = (v >= 0) ? v : ((v * int'(signed'(alpha))) >>> FRAC);
        checks += 2;
        if (y[i] !== EW'(e)) begin
          failures++;
          if (failures < 10) $display("prelu(%0d, alpha %0d) = %0d expected %0d", v, alpha, int'(signed'(y[i])), e);
        end
        if (wmask[i] !== (i < vlen)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
