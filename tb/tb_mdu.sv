// tb_mdu: self-checking test of the multiply/divide unit.
//
// Random vectors, scalars (including 0, 1 and negative values) and lengths
// 0..32. Each lane below vlen is compared with a fixed-point product or
// quotient computed in the testbench with 64-bit integers; lanes at or beyond
// vlen must not be flagged in wmask. The cycle count from start to done is
// checked against vlen + 1 (MUL.VS) and vlen*(EW+FRAC+1) + 1 (DIV.VS).
module tb_mdu;
  import fiona_pkg::*;
  localparam int NELEM = 32, EW = 16, FRAC = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  mdu_op_e op;
  logic [NELEM-1:0][EW-1:0] a, y;
  logic [EW-1:0] s;
  logic [5:0] vlen;
  logic [NELEM-1:0] wmask;
  int checks = 0, failures = 0;

  mdu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [EW-1:0] expect_elem(mdu_op_e o, logic [EW-1:0] x, logic [EW-1:0] sc);
    longint xv, sv, q;
    xv = longint'(signed'(x));
    sv = longint'(signed'(sc));
    if (o == MD_MUL) return EW'((xv * sv) >>> FRAC);
    if (sv == 0) return '1;
    q = ((xv < 0 ? -xv : xv) << FRAC) / (sv < 0 ? -sv : sv);
    if ((xv < 0) != (sv < 0)) q = -q;
    return EW'(q);
  endfunction

  initial begin
    start = 0; op = MD_MUL; a = '0; s = '0; vlen = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int cyc, lat;
      @(negedge clk);
      op = mdu_op_e'($urandom_range(0, 1));
      for (int i = 0; i < NELEM; i++) a[i] = EW'($urandom());
      case (n % 5)
        0: s = '0;
        1: s = EW'(1 << FRAC);           // 1.0
        2: s = EW'(-(3 << FRAC));        // -3.0
        default: s = EW'($urandom());
      endcase
      vlen = (n < 4) ? 6'(n) : 6'($urandom_range(0, 32));
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      lat = (op == MD_MUL) ? int'(vlen) + 1 : int'(vlen) * (EW + FRAC + 1) + 1;
      checks++;
      if (cyc != lat) begin failures++; $display("%s vlen %0d: %0d cycles, expected %0d", op.name(), vlen, cyc, lat); end
      for (int i = 0; i < NELEM; i++) begin
        checks++;
        if (wmask[i] !== (i < vlen)) failures++;
        if (i < vlen) begin
          checks++;
          if (y[i] !== expect_elem(op, a[i], s)) begin
            failures++;
            if (failures < 10) $display("%s a=%h s=%h: %h expected %h", op.name(), a[i], s, y[i], expect_elem(op, a[i], s));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
