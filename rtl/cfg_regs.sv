// cfg_regs: the FIONA custom configuration registers.
//
// STRIDE (32 bits) is the element stride of LOAD.V/STORE.V, VLEN (32 bits) the
// number of elements an instruction works on, VMASK holds NVMASK groups of 32
// bits, and MAT is the MATN x MATN matrix of EW-bit weights that MVMul hands to
// the photonic mesh. All are written by the SET.R instruction; MAT is filled
// one element at a time (MAT[RS2+i] = Mem[RS1+i]) through the load/store unit.
//
// Interface: stride_we / vlen_we load wdata; vmask_we loads vmask_wdata into
// group vmask_idx; mat_we writes mat_wdata to the row-major flat element index
// mat_idx (row = mat_idx / MATN, column = mat_idx % MATN). Writes take effect on
// the rising edge. vlen_eff is VLEN clamped to 0..NELEM, the count the
// execution units use. Synchronous active-low reset sets STRIDE = 1,
// VLEN = NELEM and clears VMASK and MAT.
//
// Register names and sizes follow the document. The reset values, the row-major
// flat MAT index, the clamp of VLEN and the fact that VMASK is only held and
// brought out (the document does not say what reads it) are this design's.
module cfg_regs #(
  parameter int unsigned NELEM  = fiona_pkg::FV_NELEM,
  parameter int unsigned EW     = fiona_pkg::FV_EW,
  parameter int unsigned NVMASK = fiona_pkg::FV_NVMASK,
  parameter int unsigned MATN   = fiona_pkg::FV_MATN,
  localparam int unsigned MIW   = $clog2(MATN*MATN),
  localparam int unsigned VKW   = $clog2(NVMASK),
  localparam int unsigned VLW   = $clog2(NELEM+1)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            stride_we,
  input  logic                            vlen_we,
  input  logic [31:0]                     wdata,
  input  logic                            vmask_we,
  input  logic [VKW-1:0]                  vmask_idx,
  input  logic [31:0]                     vmask_wdata,
  input  logic                            mat_we,
  input  logic [MIW-1:0]                  mat_idx,
  input  logic [EW-1:0]                   mat_wdata,
  output logic [31:0]                     stride,
  output logic [31:0]                     vlen,
  output logic [VLW-1:0]                  vlen_eff,
  output logic [NVMASK-1:0][31:0]         vmask,
  output logic [MATN-1:0][MATN-1:0][EW-1:0] mat
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stride <= 32'd1;
      vlen   <= 32'(NELEM);
      vmask  <= '0;
      for (int r = 0; r < MATN; r++) mat[r] <= '0;
    end else begin
      if (stride_we) stride <= wdata;
      if (vlen_we)   vlen   <= wdata;
      if (vmask_we)  vmask[vmask_idx] <= vmask_wdata;
      if (mat_we)    mat[mat_idx / MIW'(MATN)][mat_idx % MIW'(MATN)] <= mat_wdata;
    end
  end

  assign vlen_eff = (vlen > 32'(NELEM)) ? VLW'(NELEM) : VLW'(vlen);

endmodule
