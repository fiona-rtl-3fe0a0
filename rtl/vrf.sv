// vrf: FIONA-V vector register file.
//
// NREG registers of NELEM elements, each EW bits wide (32 x 32 x 16 bits by
// default, as in the LightRocket register map). Register 0 always reads as all
// zero and ignores writes, like the scalar x0.
//
// Interface: two whole-vector read ports (ra1/rd1, ra2/rd2), combinational,
// so an operand is available in the cycle its address is presented. One write
// port writes register wa on the rising clock edge when we is high; wmask
// selects which elements are written, so a strided load can fill one element
// per cycle and an operation can leave elements at or beyond VLEN unchanged.
// Synchronous active-low reset clears every register. Read-during-write
// returns the old value.
//
// The register sizes and the zero register follow the document; the port
// count, element mask, combinational read and reset are this design's choices.
module vrf #(
  parameter int unsigned NREG  = fiona_pkg::FV_NVREG,
  parameter int unsigned NELEM = fiona_pkg::FV_NELEM,
  parameter int unsigned EW    = fiona_pkg::FV_EW,
  localparam int unsigned AW   = $clog2(NREG)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [AW-1:0]             ra1,
  output logic [NELEM-1:0][EW-1:0]  rd1,
  input  logic [AW-1:0]             ra2,
  output logic [NELEM-1:0][EW-1:0]  rd2,
  input  logic                      we,
  input  logic [AW-1:0]             wa,
  input  logic [NELEM-1:0]          wmask,
  input  logic [NELEM-1:0][EW-1:0]  wdata
);

  logic [NELEM-1:0][EW-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) regs[r] <= '0;
    end else if (we && wa != '0) begin
      for (int e = 0; e < NELEM; e++)
        if (wmask[e]) regs[wa][e] <= wdata[e];
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
