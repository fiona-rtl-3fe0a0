// tb_misc_unit: self-checking test of SHUFFLE.V, MAX.V and MIN.V.
//
// Random vectors and lengths; the expected shuffle, maximum and minimum are
// computed in the testbench on signed values, including vlen = 0 and 1.
module tb_misc_unit;
  import fiona_pkg::*;
  localparam int NELEM = 32, EW = 16;
  misc_op_e op;
  logic [NELEM-1:0][EW-1:0] a, b, y;
  logic [5:0] vlen;
  logic [NELEM-1:0] wmask;
  logic [31:0] red;
  int checks = 0, failures = 0;

  misc_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int best;
      op = misc_op_e'($urandom_range(0, 2));
      for (int i = 0; i < NELEM; i++) begin a[i] = EW'($urandom()); b[i] = EW'($urandom()); end
      vlen = (n < 20) ? 6'(n % 2) : 6'($urandom_range(0, 32));
      #1;
      if (op == MI_SHUFFLE) begin
        for (int i = 0; i < NELEM; i++) begin
          checks += 2;
          if (y[i] !== a[b[i] % NELEM]) failures++;
          if (wmask[i] !== (i < vlen)) failures++;
        end
      end else begin
        best = 0;
        for (int i = 0; i < vlen; i++) begin
          int v;
          v = int'(signed'(a[i]));
          if (i == 0 || (op == MI_MAX && v > best) || (op == MI_MIN && v < best)) best = v;
        end
        checks++;
        if (red !== 32'(best)) begin
          failures++;
          if (failures < 10) $display("%s vlen %0d: %0d expected %0d", op.name(), vlen, int'(red), best);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
