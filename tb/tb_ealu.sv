// tb_ealu: self-checking test of the element-wise add/subtract unit.
//
// Drives random vectors, scalars, operations and lengths (0..32) and compares
// every lane and the write mask with sums computed in the testbench.
module tb_ealu;
  import fiona_pkg::*;
  localparam int NELEM = 32, EW = 16;
  ealu_op_e op;
  logic [NELEM-1:0][EW-1:0] a, b, y;
  logic [EW-1:0] s;
  logic [5:0] vlen;
  logic [NELEM-1:0] wmask;
  int checks = 0, failures = 0;

  ealu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = ealu_op_e'($urandom_range(0, 3));
      for (int i = 0; i < NELEM; i++) begin a[i] = EW'($urandom()); b[i] = EW'($urandom()); end
      s = EW'($urandom());
      vlen = 6'($urandom_range(0, 32));
      #1;
      for (int i = 0; i < NELEM; i++) begin
        int e;
        case (op)
          EA_ADDV:  e = int'(a[i]) + int'(b[i]);
          EA_SUBV:  e = int'(a[i]) - int'(b[i]);
          EA_ADDVS: e = int'(a[i]) + int'(s);
          default:  e = int'(a[i]) - int'(s);
        endcase
        checks += 2;
        if (y[i] !== EW'(e)) begin
          failures++;
          if (failures < 10) $display("op %s lane %0d: %h expected %h", op.name(), i, y[i], EW'(e));
        end
        if (wmask[i] !== (i < vlen)) failures++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
