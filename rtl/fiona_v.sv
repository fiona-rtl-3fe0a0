// fiona_v: the FIONA-V vector coprocessor of LightRocket.
//
// FIONA-V sits beside a Rocket RISC-V core on the RoCC coprocessor port. The
// core runs the control flow and scalar code and sends FIONA-V one custom
// instruction at a time, together with the values of its two source scalar
// registers. FIONA-V holds 32 vector registers (32 x 16-bit elements), the
// custom registers STRIDE, VLEN, VMASK and MAT, and these units:
//   ealu      ADD.V SUB.V ADD.VS SUB.VS           (one cycle)
//   misc_unit SHUFFLE.V MAX.V MIN.V               (one cycle)
//   nlu       PRELU.V TANH.V SIGMOID.V            (one cycle)
//   mdu       MUL.VS DIV.VS                       (element-serial, multi-cycle)
//   lsu       LOAD.V STORE.V SET.R MAT            (one memory element at a time)
//   puc       DotProd MVMul Conv1D on the photonic core (through DAC/ADC ports)
// SET.R STRIDE / VLEN / VMASK complete in one cycle.
//
// Instruction word (RoCC format): [31:25] funct7 selects the instruction,
// [24:20] rs2 field, [19:15] rs1 field, [14] xd, [13] xs1, [12] xs2,
// [11:7] rd field, [6:0] opcode (not checked: the host only forwards custom
// opcodes). Vector operands come from the vector registers named by the rs1
// and rs2 fields; a vector result goes to the register named by rd. MAX.V uses
// rs2 field 0 and MIN.V 1; the NLU group is PRELU.V when xs2 = 1, else TANH.V
// (rs2 field 1) or SIGMOID.V (2); SET.R picks STRIDE (rd = 0), VLEN (1),
// VMASK (2, VMASK[RS2] = RS1) or MAT (3, MAT[RS2+i] = Mem[RS1+i]). Only the
// first VLEN elements (at most 32) of a destination are written.
//
// Sequencing: one instruction at a time. cmd_ready is high only when idle.
// After a command is accepted the decoded unit runs; when it finishes, an
// instruction with xd = 1 (DotProd, MAX.V, MIN.V) returns its scalar on the
// response port and waits for resp_ready. An unknown instruction changes
// nothing and, if xd = 1, returns 0. busy is high from acceptance until the
// instruction has finished.
//
// Performance counters count the busy cycles of photonic operations
// (perf_pops), electronic operations (perf_eops) and memory transfers
// (perf_mem, including SET.R MAT), the split by which run time is broken down,
// and the number of completed instructions (perf_insts).
//
// The instruction set, register sizes and unit split follow the document. The
// opcode-field use, the SET.R target codes, the numeric format (Q8.8), the
// one-instruction-at-a-time sequencing and the counters' exact definition are
// this design's. VMASK is only written and brought out (vmask): the document
// does not say what reads it.
module fiona_v
  import fiona_pkg::*;
#(
  parameter int unsigned NVREG  = fiona_pkg::FV_NVREG,
  parameter int unsigned NELEM  = fiona_pkg::FV_NELEM,
  parameter int unsigned EW     = fiona_pkg::FV_EW,
  parameter int unsigned NVMASK = fiona_pkg::FV_NVMASK,
  parameter int unsigned MATN   = fiona_pkg::FV_MATN,
  parameter int unsigned FRAC   = fiona_pkg::FV_FRAC
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // RoCC command / response
  input  logic                                 cmd_valid,
  output logic                                 cmd_ready,
  input  rocc_cmd_t                            cmd,
  output logic                                 resp_valid,
  input  logic                                 resp_ready,
  output rocc_resp_t                           resp,
  output logic                                 busy,
  // memory port toward the L1 data cache
  output logic                                 mem_req_valid,
  input  logic                                 mem_req_ready,
  output mem_req_t                             mem_req,
  input  logic                                 mem_resp_valid,
  input  logic [EW-1:0]                        mem_resp_rdata,
  // photonic core, DAC side
  output logic                                 dac_valid,
  input  logic                                 dac_ready,
  output pop_e                                 dac_op,
  output logic [NELEM-1:0][EW-1:0]             dac_a,
  output logic [NELEM-1:0][EW-1:0]             dac_b,
  output logic [MATN-1:0][MATN-1:0][EW-1:0]    dac_mat,
  // photonic core, ADC side
  input  logic                                 adc_valid,
  input  logic [NELEM-1:0][EW-1:0]             adc_data,
  // custom register VMASK, brought out
  output logic [NVMASK-1:0][31:0]              vmask,
  // performance counters
  output logic [31:0]                          perf_pops,
  output logic [31:0]                          perf_eops,
  output logic [31:0]                          perf_mem,
  output logic [31:0]                          perf_insts
);

  localparam int unsigned VLW = $clog2(NELEM+1);
  localparam int unsigned MIW = $clog2(MATN*MATN);
  localparam int unsigned VKW = $clog2(NVMASK);
  localparam int unsigned IW  = $clog2(NELEM);

  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_MDU, S_PUC, S_LSU, S_RESP} state_e;
  typedef enum logic [1:0] {C_EOP, C_POP, C_MEM} cat_e;

  state_e     state;
  rocc_cmd_t  cmd_q;
  rocc_inst_t inst;
  logic [31:0] resp_data_q;

  assign inst = cmd_q.inst;

  // ---- register files -----------------------------------------------------
  logic [NELEM-1:0][EW-1:0] vs1, vs2;
  logic                     vrf_we;
  logic [NELEM-1:0]         vrf_wmask;
  logic [NELEM-1:0][EW-1:0] vrf_wdata;

  vrf #(.NREG(NVREG), .NELEM(NELEM), .EW(EW)) u_vrf (
    .clk, .rst_n,
    .ra1(inst.rs1), .rd1(vs1),
    .ra2(inst.rs2), .rd2(vs2),
    .we(vrf_we), .wa(inst.rd), .wmask(vrf_wmask), .wdata(vrf_wdata)
  );

  logic                              cfg_stride_we, cfg_vlen_we, cfg_vmask_we, cfg_mat_we;
  logic [31:0]                       stride, vlen;
  logic [VLW-1:0]                    vlen_eff;
  logic [MATN-1:0][MATN-1:0][EW-1:0] mat;
  logic [MIW-1:0]                    lsu_elem_idx;
  logic [EW-1:0]                     lsu_elem_data;
  logic                              lsu_elem_we;

  cfg_regs #(.NELEM(NELEM), .EW(EW), .NVMASK(NVMASK), .MATN(MATN)) u_cfg (
    .clk, .rst_n,
    .stride_we(cfg_stride_we), .vlen_we(cfg_vlen_we), .wdata(cmd_q.rs1),
    .vmask_we(cfg_vmask_we), .vmask_idx(cmd_q.rs2[VKW-1:0]), .vmask_wdata(cmd_q.rs1),
    .mat_we(cfg_mat_we), .mat_idx(lsu_elem_idx), .mat_wdata(lsu_elem_data),
    .stride, .vlen, .vlen_eff, .vmask, .mat
  );

  // ---- decode -----------------------------------------------------------------
  ealu_op_e ea_op;
  misc_op_e mi_op;
  mdu_op_e  md_op;
  nlu_op_e  nl_op;
  pop_e     po_op;
  lsu_op_e  ls_op;
  logic is_ealu, is_misc_vec, is_misc_red, is_nlu, is_mdu, is_puc, is_lsu;
  logic is_set_reg, illegal;
  cat_e cat;

  always_comb begin
    ea_op = EA_ADDV;  mi_op = MI_SHUFFLE;  md_op = MD_MUL;  nl_op = NL_PRELU;
    po_op = PO_DOTPROD;  ls_op = LS_LOAD;
    is_ealu = 1'b0;  is_misc_vec = 1'b0;  is_misc_red = 1'b0;  is_nlu = 1'b0;
    is_mdu = 1'b0;  is_puc = 1'b0;  is_lsu = 1'b0;  is_set_reg = 1'b0;  illegal = 1'b0;
    unique case (inst.funct7)
      F_ADDV:    begin is_ealu = 1'b1; ea_op = EA_ADDV;  end
      F_SUBV:    begin is_ealu = 1'b1; ea_op = EA_SUBV;  end
      F_ADDVS:   begin is_ealu = 1'b1; ea_op = EA_ADDVS; end
      F_SUBVS:   begin is_ealu = 1'b1; ea_op = EA_SUBVS; end
      F_MULVS:   begin is_mdu = 1'b1;  md_op = MD_MUL;   end
      F_DIVVS:   begin is_mdu = 1'b1;  md_op = MD_DIV;   end
      F_SHUFFLE: begin is_misc_vec = 1'b1; mi_op = MI_SHUFFLE; end
      F_MINMAX: begin
        if (inst.rs2 == 5'd0)      begin is_misc_red = 1'b1; mi_op = MI_MAX; end
        else if (inst.rs2 == 5'd1) begin is_misc_red = 1'b1; mi_op = MI_MIN; end
        else illegal = 1'b1;
      end
      F_NLU: begin
        if (inst.xs2)              begin is_nlu = 1'b1; nl_op = NL_PRELU;   end
        else if (inst.rs2 == 5'd1) begin is_nlu = 1'b1; nl_op = NL_TANH;    end
        else if (inst.rs2 == 5'd2) begin is_nlu = 1'b1; nl_op = NL_SIGMOID; end
        else illegal = 1'b1;
      end
      F_DOTPROD: begin is_puc = 1'b1; po_op = PO_DOTPROD; end
      F_MVMUL:   begin is_puc = 1'b1; po_op = PO_MVMUL;   end
      F_CONV1D:  begin is_puc = 1'b1; po_op = PO_CONV1D;  end
      F_LOADV:   begin is_lsu = 1'b1; ls_op = LS_LOAD;    end
      F_STOREV:  begin is_lsu = 1'b1; ls_op = LS_STORE;   end
      F_SETR: begin
        unique case (inst.rd)
          SETR_STRIDE, SETR_VLEN, SETR_VMASK: is_set_reg = 1'b1;
          SETR_MAT: begin is_lsu = 1'b1; ls_op = LS_MAT; end
          default:  illegal = 1'b1;
        endcase
      end
      default: illegal = 1'b1;
    endcase
    cat = is_puc ? C_POP : (is_lsu ? C_MEM : C_EOP);
  end

  // ---- execution units ------------------------------------------------------
  logic [NELEM-1:0][EW-1:0] ea_y, mi_y, nl_y, md_y, po_y;
  logic [NELEM-1:0]         ea_m, mi_m, nl_m, md_m, po_m;
  logic [31:0]              mi_red, po_red;
  logic mdu_start, mdu_busy, mdu_done;
  logic puc_start, puc_busy, puc_done;
  logic lsu_start, lsu_busy, lsu_done;

  ealu #(.NELEM(NELEM), .EW(EW)) u_ealu (
    .op(ea_op), .a(vs1), .b(vs2), .s(cmd_q.rs2[EW-1:0]), .vlen(vlen_eff),
    .y(ea_y), .wmask(ea_m)
  );

  misc_unit #(.NELEM(NELEM), .EW(EW)) u_misc (
    .op(mi_op), .a(vs1), .b(vs2), .vlen(vlen_eff),
    .y(mi_y), .wmask(mi_m), .red(mi_red)
  );

  nlu #(.NELEM(NELEM), .EW(EW), .FRAC(FRAC)) u_nlu (
    .op(nl_op), .a(vs1), .alpha(cmd_q.rs2[EW-1:0]), .vlen(vlen_eff),
    .y(nl_y), .wmask(nl_m)
  );

  mdu #(.NELEM(NELEM), .EW(EW), .FRAC(FRAC)) u_mdu (
    .clk, .rst_n, .start(mdu_start), .op(md_op), .a(vs1), .s(cmd_q.rs2[EW-1:0]),
    .vlen(vlen_eff), .busy(mdu_busy), .done(mdu_done), .y(md_y), .wmask(md_m)
  );

  puc #(.NELEM(NELEM), .EW(EW), .MATN(MATN)) u_puc (
    .clk, .rst_n, .start(puc_start), .op(po_op), .a(vs1), .b(vs2), .mat,
    .vlen(vlen_eff), .busy(puc_busy), .done(puc_done), .y(po_y), .wmask(po_m),
    .red(po_red),
    .dac_valid, .dac_ready, .dac_op, .dac_a, .dac_b, .dac_mat,
    .adc_valid, .adc_data
  );

  lsu #(.NELEM(NELEM), .EW(EW), .MATN(MATN)) u_lsu (
    .clk, .rst_n, .start(lsu_start), .op(ls_op), .base(cmd_q.rs1), .stride,
    .mat_base(cmd_q.rs2[MIW-1:0]), .vlen(vlen_eff), .vdata(vs2),
    .busy(lsu_busy), .done(lsu_done),
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_rdata,
    .elem_we(lsu_elem_we), .elem_idx(lsu_elem_idx), .elem_data(lsu_elem_data)
  );

  // ---- control ----------------------------------------------------------------
  logic finish;          // the instruction completes this cycle
  logic [31:0] fin_data; // its scalar result

  always_comb begin
    mdu_start     = 1'b0;
    puc_start     = 1'b0;
    lsu_start     = 1'b0;
    cfg_stride_we = 1'b0;
    cfg_vlen_we   = 1'b0;
    cfg_vmask_we  = 1'b0;
    cfg_mat_we    = 1'b0;
    vrf_we        = 1'b0;
    vrf_wmask     = '0;
    vrf_wdata     = ea_y;
    finish        = 1'b0;
    fin_data      = '0;
    unique case (state)
      S_EXEC: begin
        if (is_ealu) begin
          vrf_we = 1'b1; vrf_wmask = ea_m; vrf_wdata = ea_y; finish = 1'b1;
        end else if (is_misc_vec) begin
          vrf_we = 1'b1; vrf_wmask = mi_m; vrf_wdata = mi_y; finish = 1'b1;
        end else if (is_misc_red) begin
          fin_data = mi_red; finish = 1'b1;
        end else if (is_nlu) begin
          vrf_we = 1'b1; vrf_wmask = nl_m; vrf_wdata = nl_y; finish = 1'b1;
        end else if (is_set_reg) begin
          cfg_stride_we = (inst.rd == SETR_STRIDE);
          cfg_vlen_we   = (inst.rd == SETR_VLEN);
          cfg_vmask_we  = (inst.rd == SETR_VMASK);
          finish        = 1'b1;
        end else if (is_mdu) mdu_start = 1'b1;
        else if (is_puc)     puc_start = 1'b1;
        else if (is_lsu)     lsu_start = 1'b1;
        else finish = 1'b1;   // illegal: no effect
      end
      S_MDU: if (mdu_done) begin
        vrf_we = 1'b1; vrf_wmask = md_m; vrf_wdata = md_y; finish = 1'b1;
      end
      S_PUC: if (puc_done) begin
        if (po_op == PO_DOTPROD) fin_data = po_red;
        else begin
          vrf_we = 1'b1; vrf_wmask = po_m; vrf_wdata = po_y;
        end
        finish = 1'b1;
      end
      S_LSU: begin
        if (lsu_elem_we) begin
          if (ls_op == LS_MAT) cfg_mat_we = 1'b1;
          else begin
            vrf_we    = 1'b1;
            vrf_wmask = NELEM'(1) << lsu_elem_idx[IW-1:0];
            vrf_wdata = {NELEM{lsu_elem_data}};
          end
        end
        finish = lsu_done;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cmd_q       <= '0;
      resp_data_q <= '0;
      perf_pops   <= '0;
      perf_eops   <= '0;
      perf_mem    <= '0;
      perf_insts  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cmd_q <= cmd;
          state <= S_EXEC;
        end
        S_EXEC: begin
          if (is_mdu)      state <= S_MDU;
          else if (is_puc) state <= S_PUC;
          else if (is_lsu) state <= S_LSU;
        end
        S_RESP: if (resp_ready) state <= S_IDLE;
        default: ;
      endcase
      if (finish) begin
        resp_data_q <= fin_data;
        perf_insts  <= perf_insts + 1'b1;
        state       <= inst.xd ? S_RESP : S_IDLE;
      end
      if (state inside {S_EXEC, S_MDU, S_PUC, S_LSU}) begin
        unique case (cat)
          C_POP:   perf_pops <= perf_pops + 1'b1;
          C_MEM:   perf_mem  <= perf_mem + 1'b1;
          default: perf_eops <= perf_eops + 1'b1;
        endcase
      end
    end
  end

  assign cmd_ready  = (state == S_IDLE);
  assign busy       = (state != S_IDLE);
  assign resp_valid = (state == S_RESP);
  assign resp.rd    = inst.rd;
  assign resp.data  = resp_data_q;

  // ---- protocol checks --------------------------------------------------------
  // A response stays stable until it is taken.
  logic       resp_stall_q;
  rocc_resp_t resp_prev_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      resp_stall_q <= 1'b0;
      resp_prev_q  <= '0;
    end else begin
      resp_stall_q <= resp_valid && !resp_ready;
      resp_prev_q  <= resp;
      if (resp_stall_q)
        assert (resp_valid && resp == resp_prev_q)
          else $error("fiona_v: response changed before it was accepted");
      // the units are only started from the execute state, one at a time
      assert (!(mdu_busy && puc_busy) && !(mdu_busy && lsu_busy) && !(puc_busy && lsu_busy))
        else $error("fiona_v: two multi-cycle units busy at once");
    end
  end

endmodule
