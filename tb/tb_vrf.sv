// tb_vrf: self-checking test of the vector register file.
//
// Writes random data with random element masks to random registers for many
// cycles, mirrors every write in a reference array kept by the testbench, and
// compares both read ports against it every cycle. Also checks that register 0
// reads as zero after a write to it and that reset clears the file.
module tb_vrf;
  localparam int NREG = 32, NELEM = 32, EW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] ra1, ra2, wa;
  logic [NELEM-1:0][EW-1:0] rd1, rd2, wdata;
  logic we;
  logic [NELEM-1:0] wmask;
  logic [NELEM-1:0][EW-1:0] model [NREG];
  int checks = 0, failures = 0;

  vrf dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    logic [NELEM-1:0][EW-1:0] e1, e2;
    e1 = (ra1 == 0) ? '0 : model[ra1];
    e2 = (ra2 == 0) ? '0 : model[ra2];
    checks += 2;
    if (rd1 !== e1) begin failures++; $display("port1 r%0d mismatch", ra1); end
    if (rd2 !== e2) begin failures++; $display("port2 r%0d mismatch", ra2); end
  endtask

  initial begin
    for (int r = 0; r < NREG; r++) model[r] = '0;
    we = 0; wa = 0; ra1 = 0; ra2 = 0; wmask = '0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // after reset everything reads zero
    for (int r = 0; r < NREG; r++) begin
      ra1 = 5'(r); ra2 = 5'(NREG - 1 - r); #1; check_reads();
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0);
      wa = 5'($urandom_range(0, NREG - 1));
      wmask = NELEM'($urandom());
      for (int e = 0; e < NELEM; e++) wdata[e] = EW'($urandom());
      ra1 = 5'($urandom_range(0, NREG - 1));
      ra2 = (n % 7 == 0) ? wa : 5'($urandom_range(0, NREG - 1));
      #1; check_reads();   // old value before the write edge
      @(posedge clk);
      if (we && wa != 0)
        for (int e = 0; e < NELEM; e++) if (wmask[e]) model[wa][e] = wdata[e];
      #1; check_reads();
    end
    // an all-ones write to r0 leaves it zero
    @(negedge clk);
    we = 1; wa = 0; wmask = '1; wdata = '1; ra1 = 0;
    @(posedge clk); #1;
    checks++;
    if (rd1 !== '0) begin failures++; $display("r0 not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
