// fiona_pkg: shared sizes, instruction encodings and bus types of the FIONA-V
// vector coprocessor.
//
// The register sizes (32 vector registers of 32 elements x 16 bits, 32-bit
// scalars, VMASK of 32 x 32 bits, a 32 x 32 MAT of 16-bit weights) and the
// funct7 codes of the custom instructions follow the LightRocket register map
// and instruction table. The fixed-point format (Q8.8 elements), the RoCC
// opcode value, the rd-field codes that select a SET.R target and the bus
// structures are this design's own choices.
package fiona_pkg;

  // ---- sizes ---------------------------------------------------------------
  localparam int unsigned FV_XLEN     = 32;  // scalar register width
  localparam int unsigned FV_NVREG    = 32;  // vector registers
  localparam int unsigned FV_NELEM    = 32;  // elements per vector register
  localparam int unsigned FV_EW       = 16;  // element width
  localparam int unsigned FV_NVMASK   = 32;  // VMASK groups
  localparam int unsigned FV_MATN     = 32;  // MAT is FV_MATN x FV_MATN elements
  localparam int unsigned FV_FRAC     = 8;   // fraction bits of an element (Q8.8)

  // ---- RoCC instruction fields ---------------------------------------------
  // inst[31:25] funct7, [24:20] rs2, [19:15] rs1, [14] xd, [13] xs1, [12] xs2,
  // [11:7] rd, [6:0] opcode.
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;

  localparam logic [6:0] F_DOTPROD = 7'h41;
  localparam logic [6:0] F_MVMUL   = 7'h42;
  localparam logic [6:0] F_CONV1D  = 7'h43;
  localparam logic [6:0] F_ADDV    = 7'h01;
  localparam logic [6:0] F_SUBV    = 7'h02;
  localparam logic [6:0] F_ADDVS   = 7'h03;
  localparam logic [6:0] F_SUBVS   = 7'h04;
  localparam logic [6:0] F_MULVS   = 7'h05;
  localparam logic [6:0] F_DIVVS   = 7'h06;
  localparam logic [6:0] F_SHUFFLE = 7'h0A;
  localparam logic [6:0] F_MINMAX  = 7'h0B;  // rs2 field 0: MAX.V, 1: MIN.V
  localparam logic [6:0] F_NLU     = 7'h0F;  // xs2=1: PRELU.V; rs2 field 1: TANH.V, 2: SIGMOID.V
  localparam logic [6:0] F_LOADV   = 7'h10;
  localparam logic [6:0] F_STOREV  = 7'h11;
  localparam logic [6:0] F_SETR    = 7'h18;  // rd field selects the target below

  localparam logic [4:0] SETR_STRIDE = 5'd0;
  localparam logic [4:0] SETR_VLEN   = 5'd1;
  localparam logic [4:0] SETR_VMASK  = 5'd2;
  localparam logic [4:0] SETR_MAT    = 5'd3;

  typedef struct packed {
    logic [6:0] funct7;
    logic [4:0] rs2;
    logic [4:0] rs1;
    logic       xd;
    logic       xs1;
    logic       xs2;
    logic [4:0] rd;
    logic [6:0] opcode;
  } rocc_inst_t;

  typedef struct packed {
    rocc_inst_t      inst;
    logic [FV_XLEN-1:0] rs1;
    logic [FV_XLEN-1:0] rs2;
  } rocc_cmd_t;

  typedef struct packed {
    logic [4:0]      rd;
    logic [FV_XLEN-1:0] data;
  } rocc_resp_t;

  // ---- unit operation codes -------------------------------------------------
  typedef enum logic [1:0] {EA_ADDV, EA_SUBV, EA_ADDVS, EA_SUBVS} ealu_op_e;
  typedef enum logic [1:0] {MI_SHUFFLE, MI_MAX, MI_MIN} misc_op_e;
  typedef enum logic       {MD_MUL, MD_DIV} mdu_op_e;
  typedef enum logic [1:0] {NL_PRELU, NL_TANH, NL_SIGMOID} nlu_op_e;
  typedef enum logic [1:0] {PO_DOTPROD, PO_MVMUL, PO_CONV1D} pop_e;
  typedef enum logic [1:0] {LS_LOAD, LS_STORE, LS_MAT} lsu_op_e;

  // ---- memory port (element addressed, one 16-bit element per request) -----
  typedef struct packed {
    logic [FV_XLEN-1:0] addr;
    logic            we;
    logic [FV_EW-1:0]   wdata;
  } mem_req_t;

endpackage
