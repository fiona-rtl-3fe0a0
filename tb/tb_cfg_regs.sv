// tb_cfg_regs: self-checking test of the FIONA custom registers.
//
// Checks the reset values (STRIDE = 1, VLEN = 32, VMASK and MAT zero), then
// applies random STRIDE, VLEN, VMASK and MAT writes, mirrors them in a
// reference model and compares every register, including the clamped vlen_eff.
module tb_cfg_regs;
  localparam int NELEM = 32, EW = 16, NVMASK = 32, MATN = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic stride_we, vlen_we, vmask_we, mat_we;
  logic [31:0] wdata, vmask_wdata;
  logic [4:0] vmask_idx;
  logic [9:0] mat_idx;
  logic [EW-1:0] mat_wdata;
  logic [31:0] stride, vlen;
  logic [5:0] vlen_eff;
  logic [NVMASK-1:0][31:0] vmask;
  logic [MATN-1:0][MATN-1:0][EW-1:0] mat;
  logic [31:0] m_stride, m_vlen;
  logic [NVMASK-1:0][31:0] m_vmask;
  logic [MATN-1:0][MATN-1:0][EW-1:0] m_mat;
  int checks = 0, failures = 0;

  cfg_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    logic [5:0] ev;
    ev = (m_vlen > 32) ? 6'd32 : 6'(m_vlen);
    checks += 5;
    if (stride !== m_stride) begin failures++; $display("%s: stride %0d vs %0d", what, stride, m_stride); end
    if (vlen !== m_vlen) begin failures++; $display("%s: vlen", what); end
    if (vlen_eff !== ev) begin failures++; $display("%s: vlen_eff %0d vs %0d", what, vlen_eff, ev); end
    if (vmask !== m_vmask) begin failures++; $display("%s: vmask", what); end
    if (mat !== m_mat) begin failures++; $display("%s: mat", what); end
  endtask

  initial begin
    stride_we = 0; vlen_we = 0; vmask_we = 0; mat_we = 0;
    wdata = 0; vmask_wdata = 0; vmask_idx = 0; mat_idx = 0; mat_wdata = 0;
    m_stride = 1; m_vlen = 32; m_vmask = '0; m_mat = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 compare("reset");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      stride_we = ($urandom_range(0, 5) == 0);
      vlen_we   = ($urandom_range(0, 5) == 0);
      vmask_we  = ($urandom_range(0, 3) == 0);
      mat_we    = ($urandom_range(0, 1) == 0);
      wdata     = ($urandom_range(0, 1) == 0) ? 32'($urandom_range(0, 40)) : $urandom();
      vmask_idx = 5'($urandom());
      vmask_wdata = $urandom();
      mat_idx   = 10'($urandom());
      mat_wdata = EW'($urandom());
      @(posedge clk);
      if (stride_we) m_stride = wdata;
      if (vlen_we)   m_vlen   = wdata;
      if (vmask_we)  m_vmask[vmask_idx] = vmask_wdata;
      if (mat_we)    m_mat[mat_idx / 32][mat_idx % 32] = mat_wdata;
      #1 compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
